// tb_pkt_fifo: random push/pop traffic against a queue model; checks order,
// the full and empty flags, the one-cycle push-to-head latency and clear.
module tb_pkt_fifo;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic push_valid = 0, push_ready, pop_valid, pop_ready = 0, empty;
  pkt_t push_pkt = '0, pop_pkt;
  int checks = 0, failures = 0;
  pkt_t model[$];

  pkt_fifo #(.DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !pop_valid && push_ready, "empty after reset");
    // Latency: a pushed packet is at the head one clock later.
    push_valid = 1; push_pkt = '0; push_pkt.payload = 16'h1234;
    @(negedge clk);
    push_valid = 0;
    check(pop_valid && pop_pkt.payload == 16'h1234, "head one cycle after push");
    pop_ready = 1; @(negedge clk); pop_ready = 0;
    check(empty, "empty after pop");
    // Fill to depth: not ready when full.
    for (int i = 0; i < 2; i++) begin
      push_valid = 1; push_pkt.payload = 16'(i); @(negedge clk);
    end
    push_valid = 0;
    check(!push_ready, "full after two pushes");
    pop_ready = 1; @(negedge clk); @(negedge clk); pop_ready = 0;
    check(empty, "drained");
    // Random traffic.
    for (int cyc = 0; cyc < 5000; cyc++) begin
      push_valid = $urandom_range(0, 1) == 1;
      pop_ready  = $urandom_range(0, 1) == 1;
      push_pkt   = pkt_t'({$urandom, $urandom});
      #1;
      check(push_ready == (model.size() < 2), "push_ready matches occupancy");
      check(pop_valid == (model.size() > 0), "pop_valid matches occupancy");
      if (pop_valid && model.size() > 0) check(pop_pkt == model[0], "order");
      @(posedge clk);
      if (pop_valid && pop_ready) void'(model.pop_front());
      if (push_valid && push_ready) model.push_back(push_pkt);
      @(negedge clk);
    end
    // Clear.
    push_valid = 1; @(negedge clk); push_valid = 0;
    clear = 1; @(negedge clk); clear = 0;
    check(empty, "empty after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
