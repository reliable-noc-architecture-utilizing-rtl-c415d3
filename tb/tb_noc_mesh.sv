// tb_noc_mesh: end-to-end test of a 3 x 3 mesh.
//
// Part A replays the worked example: switches 5 and 6 (positions (1,1) and
// (2,1)) are faulty; after the test session every port status must match the
// fault map, and a packet from switch 1 to switch 9 must take the path
// 1-2-3-2-1-4-7-8-9 with the rule applied at each hop. A packet addressed to
// the faulty switch 6 can never arrive: it must be flooded and the network
// must then fall quiet.
// Part B cuts three links so that switches 1, 2, 5, 4 form a ring whose only
// exit is 5 -> 8. First the exit is disabled with link_off: a packet to 9
// circles until its fifth encounter and is flooded. Then many packets from 1
// to 9 and from 1 to 3 are sent with the exit open: the random choice at
// switch 5 lets some of them circle, and every packet must arrive exactly
// once. Each mechanism of the design is counted and must occur.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int W = 3, H = 3, N = W * H;

  logic clk = 0, rst_n = 0, start_test = 0;
  logic test_mode, test_done, test_reached_po;
  logic [NPORTS-1:0] port_fault [N], link_off [N], port_ok [N];
  logic pe_in_valid [N], pe_in_ready [N], pe_out_valid [N], pe_out_ready [N];
  pkt_t pe_in_pkt [N], pe_out_pkt [N];
  sw_event_t sw_ev [N];

  int checks = 0, failures = 0;
  longint cycle = 0, last_activity = 0;
  int n_test_flood, n_ack_sent, n_ack_rcvd, n_deliver, n_single, n_excl, n_normal,
      n_random, n_flood_start, n_flood_fwd, n_drop, n_test_copies;
  int rx_count [256];
  int rx_where [256];
  string path;

  noc_mesh #(.MESH_W(W), .MESH_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (sw_ev[i] != '0) last_activity <= cycle;
        n_test_flood  += int'(sw_ev[i].test_flood);
        n_ack_sent    += int'(sw_ev[i].ack_sent);
        n_ack_rcvd    += int'(sw_ev[i].ack_rcvd);
        n_deliver     += int'(sw_ev[i].deliver);
        n_single      += int'(sw_ev[i].rt_single);
        n_excl        += int'(sw_ev[i].rt_excl_in);
        n_normal      += int'(sw_ev[i].rt_normal);
        n_random      += int'(sw_ev[i].rt_random);
        n_flood_start += int'(sw_ev[i].flood_start);
        n_flood_fwd   += int'(sw_ev[i].flood_fwd);
        n_drop        += int'(sw_ev[i].drop);
        if (sw_ev[i].rt_normal) path = {path, $sformatf("%0dn ", i + 1)};
        if (sw_ev[i].rt_single) path = {path, $sformatf("%0ds ", i + 1)};
        if (sw_ev[i].rt_random) path = {path, $sformatf("%0dr ", i + 1)};
        if (sw_ev[i].deliver)   path = {path, $sformatf("%0dd ", i + 1)};
        if (pe_out_valid[i] && pe_out_ready[i]) begin
          last_activity <= cycle;
          if (pe_out_pkt[i].ptype == PKT_TEST) n_test_copies++;
          else if (pe_out_pkt[i].ptype == PKT_DATA) begin
            rx_count[pe_out_pkt[i].seq]++;
            rx_where[pe_out_pkt[i].seq] = i;
          end
        end
      end
    end
  end

  function automatic int nbr(int i, int p);
    int x = i % W, y = i / W;
    case (p)
      1: return (y < H - 1) ? i + W : -1;
      2: return (x < W - 1) ? i + 1 : -1;
      3: return (y > 0) ? i - W : -1;
      4: return (x > 0) ? i - 1 : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opp(int p);
    return (p == 1) ? 3 : (p == 3) ? 1 : (p == 2) ? 4 : 2;
  endfunction

  task automatic run_test_session();
    int t = 0;
    int j;
    bit exp_ok;
    start_test = 1; @(negedge clk); start_test = 0;
    while (!test_done && t < 2000) begin @(negedge clk); t++; end
    check(test_done && !test_mode, "test session ends");
    check(test_reached_po, "test packet reached PO");
    // Port status against the fault map.
    for (int i = 0; i < N; i++)
      for (int p = 1; p <= 4; p++) begin
        j = nbr(i, p);
        exp_ok = (j >= 0) && !port_fault[i][p] && !port_fault[j][opp(p)];
        check(port_ok[i][p] == exp_ok,
              $sformatf("switch %0d port %0d status %0d expected %0d", i + 1, p, port_ok[i][p], exp_ok));
      end
  endtask

  function automatic pkt_t data(int src, int dst, int seq);
    pkt_t p = '0;
    p.ptype = PKT_DATA;
    p.src_x = coord_t'(src % W); p.src_y = coord_t'(src / W);
    p.dst_x = coord_t'(dst % W); p.dst_y = coord_t'(dst / W);
    p.seq = 8'(seq); p.payload = 16'(seq * 13 + 5);
    return p;
  endfunction

  task automatic inject(int src, pkt_t p);
    pe_in_valid[src] = 1; pe_in_pkt[src] = p;
    @(negedge clk);
    while (!pe_in_ready[src]) @(negedge clk);
    pe_in_valid[src] = 0;
  endtask

  // Wait until nothing has happened for 40 cycles.
  task automatic wait_quiet();
    @(negedge clk);
    while (cycle - last_activity < 40) @(negedge clk);
  endtask

  initial begin
    longint t0;
    int fl0, seq;
    for (int i = 0; i < N; i++) begin
      port_fault[i] = '0; link_off[i] = '0;
      pe_in_valid[i] = 0; pe_in_pkt[i] = '0; pe_out_ready[i] = 1;
    end
    for (int s = 0; s < 256; s++) begin rx_count[s] = 0; rx_where[s] = -1; end
    {n_test_flood, n_ack_sent, n_ack_rcvd, n_deliver, n_single, n_excl, n_normal,
     n_random, n_flood_start, n_flood_fwd, n_drop, n_test_copies} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------------------------------------------------------- Part A
    port_fault[4] = '1; port_fault[5] = '1;
    run_test_session();
    check(n_test_flood == 7, $sformatf("each reachable switch flooded once: %0d", n_test_flood));
    path = "";
    t0 = cycle;
    inject(0, data(0, 8, 1));
    wait_quiet();
    check(rx_count[1] == 1 && rx_where[1] == 8, "packet 1 -> 9 delivered once");
    check(path == "1n 2n 3s 2r 1r 4r 7n 8n 9d ", {"path ", path});
    $display("worked example path: %s", path);
    // Unreachable destination (faulty switch 6).
    fl0 = n_flood_start;
    inject(0, data(0, 5, 2));
    wait_quiet();
    check(n_flood_start > fl0, "packet to an unreachable switch gets flooded");
    check(rx_count[2] == 0, "nothing delivered from the unreachable case");

    // ---------------------------------------------------------------- Part B
    port_fault[4] = '0; port_fault[5] = '0;
    port_fault[3][P_NORTH] = 1;   // link 4-7
    port_fault[1][P_EAST]  = 1;   // link 2-3
    port_fault[4][P_EAST]  = 1;   // link 5-6
    run_test_session();
    // Ring with its exit disabled: circles, then flooded on the fifth encounter.
    link_off[4][P_NORTH] = 1;
    fl0 = n_flood_start;
    inject(0, data(0, 8, 3));
    wait_quiet();
    check(n_flood_start == fl0 + 1, "closed ring: flooded once on the fifth encounter");
    check(rx_count[3] == 0, "closed ring: no delivery");
    link_off[4][P_NORTH] = 0;
    // Exit open: random choice at switch 5, every packet arrives exactly once.
    fl0 = n_flood_start;
    for (seq = 10; seq < 110; seq++) begin
      inject(0, data(0, (seq % 2 == 0) ? 8 : 2, seq));
      wait_quiet();
      check(rx_count[seq] == 1, $sformatf("packet %0d delivered exactly once (%0d)", seq, rx_count[seq]));
      check(rx_where[seq] == ((seq % 2 == 0) ? 8 : 2), $sformatf("packet %0d at the right switch", seq));
    end
    $display("open ring: %0d of 100 packets needed flooding", n_flood_start - fl0);

    // ---------------------------------------------------------------- coverage
    $display("events: test_flood=%0d ack_sent=%0d ack_rcvd=%0d test_copies=%0d deliver=%0d",
             n_test_flood, n_ack_sent, n_ack_rcvd, n_test_copies, n_deliver);
    $display("        single=%0d excl_in=%0d normal=%0d random=%0d flood_start=%0d flood_fwd=%0d drop=%0d",
             n_single, n_excl, n_normal, n_random, n_flood_start, n_flood_fwd, n_drop);
    check(n_test_flood > 0,  "mechanism: test flood");
    check(n_ack_sent > 0,    "mechanism: acknowledgement sent");
    check(n_ack_rcvd > 0,    "mechanism: acknowledgement received");
    check(n_test_copies > 0, "mechanism: test copy to processor");
    check(n_deliver > 0,     "mechanism: delivery");
    check(n_single > 0,      "mechanism: single-port rule");
    check(n_excl > 0,        "mechanism: incoming port excluded");
    check(n_normal > 0,      "mechanism: XY routing");
    check(n_random > 0,      "mechanism: random reroute");
    check(n_flood_start > 0, "mechanism: flooding started");
    check(n_flood_fwd > 0,   "mechanism: flooded copy forwarded");
    check(n_drop > 0,        "mechanism: duplicate or undeliverable packet dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
