// tb_port_status: all ports suspected faulty after clear, a port turns
// fault-free one clock after an acknowledgement on it, status holds, local
// port always usable, force_bad masks a port.
module tb_port_status;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [NPORTS-1:0] ack_in = '0, force_bad = '0, ok;
  int checks = 0, failures = 0;

  port_status dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [4:0] exp, string msg);
    checks++;
    if (ok !== exp) begin failures++; $display("FAIL %s: ok=%b exp=%b", msg, ok, exp); end
  endtask

  initial begin
    logic [4:0] model;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(5'b00001, "after reset");
    ack_in = 5'b00100; @(negedge clk); ack_in = 0;
    check(5'b00101, "east acked");
    ack_in = 5'b10001; @(negedge clk); ack_in = 0;
    check(5'b10101, "west acked, local ack ignored");
    repeat (5) @(negedge clk);
    check(5'b10101, "holds");
    force_bad = 5'b00100; #1;
    check(5'b10001, "east forced bad");
    force_bad = 0;
    clear = 1; ack_in = 5'b00010; @(negedge clk); clear = 0; ack_in = 0;
    check(5'b00001, "clear wins, all suspected");
    model = 5'b00001;
    for (int i = 0; i < 50; i++) begin
      ack_in = 5'($urandom) & 5'b11110;
      if ($urandom_range(0, 7) == 0) begin clear = 1; model = 5'b00001; end
      else model = model | ack_in;
      @(negedge clk); ack_in = 0; clear = 0;
      check(model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
