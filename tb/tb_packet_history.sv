// tb_packet_history: flooding is requested exactly on the fifth encounter of
// a packet (and after), other packets are counted separately, a flooded copy
// spreads once and is then reported as duplicate, replacement and clear work.
module tb_packet_history;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, is_flood_copy = 0, commit = 0;
  logic flood_now, dup;
  pkt_id_t id = '0;
  int checks = 0, failures = 0;

  packet_history #(.DEPTH(4), .THRESHOLD(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pkt_id_t mk(int s);
    return '{src_x: coord_t'(s % 3), src_y: coord_t'(s / 3), seq: 8'(s * 7)};
  endfunction

  // Present a packet, check the answer, commit it.
  task automatic see(int s, bit fl, bit exp_flood, bit exp_dup, string msg);
    id = mk(s); is_flood_copy = fl; #1;
    checks++;
    if (flood_now !== exp_flood || dup !== exp_dup) begin
      failures++;
      $display("FAIL %s: flood_now=%b dup=%b exp %b %b", msg, flood_now, dup, exp_flood, exp_dup);
    end
    commit = 1; @(negedge clk); commit = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; @(negedge clk);
    for (int n = 1; n <= 4; n++) begin
      see(1, 0, 0, 0, $sformatf("pkt1 encounter %0d", n));
      see(2, 0, 0, 0, $sformatf("pkt2 encounter %0d", n));
    end
    see(1, 0, 1, 0, "pkt1 fifth encounter floods");
    see(1, 0, 1, 0, "pkt1 sixth encounter floods");
    see(1, 1, 0, 1, "pkt1 flooded copy is duplicate here");
    see(2, 0, 1, 0, "pkt2 fifth encounter floods");
    see(3, 1, 1, 0, "pkt3 first flooded copy spreads");
    see(3, 1, 0, 1, "pkt3 second flooded copy dropped");
    // pkt 4 fills the table; 5 evicts the oldest allocation (pkt 1).
    see(4, 0, 0, 0, "pkt4 first");
    see(5, 0, 0, 0, "pkt5 first (evicts)");
    see(1, 1, 1, 0, "pkt1 forgotten after eviction");
    see(3, 1, 0, 1, "pkt3 still held");
    see(2, 0, 0, 0, "pkt2 evicted as the oldest entry");
    clear = 1; @(negedge clk); clear = 0;
    see(3, 1, 1, 0, "pkt3 forgotten after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
