// tb_test_controller: start pulse -> one clear cycle -> test packet offered
// until accepted -> wait for QUIET_CYCLES idle cycles -> done; busy restarts
// the quiet count; po_reached latches.
module tb_test_controller;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, net_busy = 0, inj_ready = 0, po_test_rx = 0;
  logic test_mode, test_clear, inj_valid, test_done, po_reached;
  pkt_t inj_pkt;
  int checks = 0, failures = 0;

  test_controller #(.QUIET_CYCLES(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1; @(negedge clk);
    check(!test_mode && !test_done && !inj_valid, "idle after reset");
    start = 1; @(negedge clk); start = 0;
    check(test_mode && test_clear && !inj_valid, "clear cycle");
    @(negedge clk);
    check(test_mode && !test_clear && inj_valid && inj_pkt.ptype == PKT_TEST, "offer test packet");
    repeat (3) @(negedge clk);
    check(inj_valid, "offer held until taken");
    inj_ready = 1; @(negedge clk); inj_ready = 0;
    check(!inj_valid && test_mode, "waiting");
    // Busy for a while, with idle gaps shorter than QUIET_CYCLES.
    net_busy = 1; repeat (5) @(negedge clk);
    net_busy = 0; repeat (2) @(negedge clk);
    check(test_mode && !test_done, "short gap does not end the session");
    po_test_rx = 1;
    net_busy = 1; @(negedge clk); net_busy = 0; po_test_rx = 0;
    cyc = 0;
    while (!test_done && cyc < 20) begin @(negedge clk); cyc++; end
    check(test_done && !test_mode, "done after quiet");
    check(cyc == 3, $sformatf("quiet cycles counted: %0d", cyc));
    check(po_reached, "PO reached latched");
    start = 1; @(negedge clk); start = 0;
    check(test_clear && test_mode && !test_done, "restart from done");
    @(negedge clk);
    check(!po_reached, "PO flag cleared on new session");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
