// tb_noc_switch: one switch at mesh position (1,1), its neighbours played by
// the testbench. Checks the test session (acknowledgement back through the
// incoming port, a single flood to all ports and the processor, port status
// set only by acknowledgements, faulty port dropping), then the rerouting
// rules, the two-clock forwarding latency, back-pressure, flooding on the
// fifth encounter and suppression of duplicate flooded copies.
module tb_noc_switch;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0, test_mode = 0, test_clear = 0;
  logic [NPORTS-1:0] port_fault = '0, link_off = '0, port_ok;
  logic in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  pkt_t in_pkt [NPORTS], out_pkt [NPORTS];
  logic busy;
  sw_event_t ev;
  int checks = 0, failures = 0;
  pkt_t q [NPORTS][$];
  int n_flood_start = 0, n_drop = 0, n_excl = 0;

  noc_switch #(.MY_X(1), .MY_Y(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++)
      if (out_valid[p] && out_ready[p]) q[p].push_back(out_pkt[p]);
    if (ev.flood_start) n_flood_start++;
    if (ev.drop) n_drop++;
    if (ev.rt_excl_in) n_excl++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic pkt_t data(int dx, int dy, int seq);
    pkt_t p = '0;
    p.ptype = PKT_DATA; p.src_x = 0; p.src_y = 0;
    p.dst_x = coord_t'(dx); p.dst_y = coord_t'(dy); p.seq = 8'(seq); p.payload = 16'(seq * 3 + 1);
    return p;
  endfunction

  task automatic send(port_e port, pkt_t p);
    in_valid[port] = 1; in_pkt[port] = p;
    @(negedge clk);
    while (!in_ready[port]) @(negedge clk);
    in_valid[port] = 0;
  endtask

  task automatic settle();
    repeat (6) @(negedge clk);
  endtask

  task automatic flush();
    for (int p = 0; p < NPORTS; p++) q[p].delete();
  endtask

  function automatic string counts();
    return $sformatf("L%0d N%0d E%0d S%0d W%0d", q[0].size(), q[1].size(), q[2].size(),
                     q[3].size(), q[4].size());
  endfunction

  initial begin
    pkt_t t, p;
    int lat;
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i] = 0; in_pkt[i] = '0; out_ready[i] = 1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------------- test session
    test_mode = 1; test_clear = 1; @(negedge clk); test_clear = 0;
    check(port_ok == 5'b00001, "all neighbour ports suspected faulty");
    t = '0; t.ptype = PKT_TEST;
    send(P_WEST, t); settle();
    check(q[P_NORTH].size() == 1 && q[P_EAST].size() == 1 && q[P_SOUTH].size() == 1 &&
          q[P_LOCAL].size() == 1 && q[P_WEST].size() == 2, {"test flood + ack: ", counts()});
    if (q[P_WEST].size() == 2)
      check(q[P_WEST][0].ptype == PKT_TEST && q[P_WEST][1].ptype == PKT_ACK &&
            q[P_WEST][1].src_x == 1 && q[P_WEST][1].src_y == 1, "west: test copy then ack");
    if (q[P_LOCAL].size() == 1) check(q[P_LOCAL][0].ptype == PKT_TEST, "copy to processor");
    check(port_ok == 5'b00001, "receiving a test packet proves nothing");
    flush();
    send(P_NORTH, t); settle();
    check(q[P_NORTH].size() == 1 && q[P_NORTH][0].ptype == PKT_ACK && q[P_EAST].size() == 0
          && q[P_LOCAL].size() == 0, {"second test packet: only ack: ", counts()});
    flush();
    t.ptype = PKT_ACK;
    send(P_NORTH, t); send(P_EAST, t); @(negedge clk);
    check(port_ok == 5'b00111, $sformatf("acks on N,E mark them fault-free: %b", port_ok));
    port_fault[P_SOUTH] = 1;
    send(P_SOUTH, t); settle();
    check(port_ok == 5'b00111, "ack through a faulty port is lost");
    t.ptype = PKT_TEST;
    test_clear = 1; @(negedge clk); test_clear = 0;
    check(port_ok == 5'b00001, "new session clears status");
    send(P_WEST, t); settle();
    check(q[P_SOUTH].size() == 0 && q[P_NORTH].size() == 1, {"faulty south port drops: ", counts()});
    flush();
    t.ptype = PKT_ACK;
    send(P_NORTH, t); send(P_EAST, t); settle();
    port_fault = '0;
    // ---------------- normal operation, usable ports N and E
    test_mode = 0;
    flush();
    // Latency: XY east, two clocks from the link transfer to the output.
    in_valid[P_LOCAL] = 1; in_pkt[P_LOCAL] = data(2, 1, 1);
    @(negedge clk); in_valid[P_LOCAL] = 0;
    lat = 1;
    while (!out_valid[P_EAST] && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 2, $sformatf("forwarding latency %0d clocks", lat));
    settle();
    check(q[P_EAST].size() == 1 && q[P_EAST][0] == data(2, 1, 1), "XY east (rule d)");
    flush();
    send(P_EAST, data(2, 1, 2)); settle();
    check(q[P_NORTH].size() == 1 && counts() == "L0 N1 E0 S0 W0", {"incoming excluded, reroute north: ", counts()});
    check(n_excl == 1, "exclusion of the incoming port seen");
    flush();
    send(P_NORTH, data(1, 1, 3)); settle();
    check(q[P_LOCAL].size() == 1 && q[P_LOCAL][0] == data(1, 1, 3), "delivered to processor");
    flush();
    link_off[P_NORTH] = 1;
    send(P_EAST, data(0, 1, 4)); settle();
    check(counts() == "L0 N0 E1 S0 W0", {"single usable port: back east (rule a): ", counts()});
    link_off = '0;
    flush();
    // Back-pressure: east output blocked.
    out_ready[P_EAST] = 0;
    send(P_LOCAL, data(3, 1, 5)); send(P_LOCAL, data(3, 1, 6)); settle();
    check(q[P_EAST].size() == 0 && out_valid[P_EAST], "held while blocked");
    out_ready[P_EAST] = 1; settle();
    check(q[P_EAST].size() == 2 && q[P_EAST][0].seq == 5 && q[P_EAST][1].seq == 6, "released in order");
    flush();
    // Fifth encounter floods (to N and E, not back to the processor).
    for (int n = 1; n <= 5; n++) begin send(P_LOCAL, data(1, 3, 9)); settle(); end
    check(q[P_NORTH].size() == 5 && q[P_EAST].size() == 1, {"flood on fifth encounter: ", counts()});
    if (q[P_NORTH].size() == 5)
      check(!q[P_NORTH][3].flood && q[P_NORTH][4].flood && q[P_EAST][0].flood, "flood mark set");
    check(n_flood_start == 1, "flooding started once");
    flush();
    // Flooded copy of another packet: forwarded once, then duplicate dropped.
    p = data(3, 3, 20); p.flood = 1;
    send(P_NORTH, p); settle();
    check(counts() == "L0 N0 E1 S0 W0", {"flooded copy forwarded except incoming: ", counts()});
    lat = n_drop;
    send(P_EAST, p); settle();
    check(counts() == "L0 N0 E1 S0 W0" && n_drop == lat + 1, "duplicate flooded copy dropped");
    // Data during a test session is dropped.
    flush();
    test_mode = 1;
    send(P_LOCAL, data(2, 1, 30)); settle();
    check(counts() == "L0 N0 E0 S0 W0", "data dropped in test mode");
    check(!busy, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
