// tb_noc_mesh_full: the mesh at its default size (10 x 10) with random port
// faults. After the test session every port status must match the fault map.
// Then packets are sent one at a time between random pairs of switches; a
// packet whose destination is reachable over fault-free links must arrive
// exactly once, at the right switch, with its payload intact; a packet whose
// destination is cut off must never arrive, and the network must fall quiet
// after each packet (no packet circulates for ever).
module tb_noc_mesh_full;
  import noc_pkg::*;

  localparam int W = 10, H = 10, N = W * H;
  localparam int NPKT = 150;
  localparam int FAULT_PERCENT = 25;

  logic clk = 0, rst_n = 0, start_test = 0;
  logic test_mode, test_done, test_reached_po;
  logic [NPORTS-1:0] port_fault [N], link_off [N], port_ok [N];
  logic pe_in_valid [N], pe_in_ready [N], pe_out_valid [N], pe_out_ready [N];
  pkt_t pe_in_pkt [N], pe_out_pkt [N];
  sw_event_t sw_ev [N];

  int checks = 0, failures = 0;
  longint cycle = 0, last_activity = 0;
  int rx_count, rx_where, n_flood, n_reach, n_unreach;
  pkt_t rx_pkt, cur;
  int comp [N];

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n)
      for (int i = 0; i < N; i++) begin
        if (sw_ev[i] != '0) last_activity <= cycle;
        if (sw_ev[i].flood_start) n_flood++;
        if (pe_out_valid[i] && pe_out_ready[i] && pe_out_pkt[i].ptype == PKT_DATA &&
            pe_out_pkt[i].src_x == cur.src_x && pe_out_pkt[i].src_y == cur.src_y &&
            pe_out_pkt[i].seq == cur.seq) begin
          rx_count++;
          rx_where = i;
          rx_pkt = pe_out_pkt[i];
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

  function automatic bit link_good(int i, int p);
    int j = nbr(i, p);
    return (j >= 0) && !port_fault[i][p] && !port_fault[j][opp(p)];
  endfunction

  // Label connected groups of switches over fault-free links.
  task automatic label_components();
    int stack [$];
    int i;
    for (int i = 0; i < N; i++) comp[i] = -1;
    for (int s = 0; s < N; s++) if (comp[s] < 0) begin
      comp[s] = s; stack.push_back(s);
      while (stack.size() > 0) begin
        i = stack.pop_back();
        for (int p = 1; p <= 4; p++)
          if (link_good(i, p) && comp[nbr(i, p)] < 0) begin
            comp[nbr(i, p)] = s; stack.push_back(nbr(i, p));
          end
      end
    end
  endtask

  initial begin
    int t, src, dst;
    bit exp_ok;
    for (int i = 0; i < N; i++) begin
      link_off[i] = '0; pe_in_valid[i] = 0; pe_in_pkt[i] = '0; pe_out_ready[i] = 1;
      port_fault[i] = '0;
      for (int p = 1; p <= 4; p++) port_fault[i][p] = ($urandom_range(0, 99) < FAULT_PERCENT);
    end
    // Keep PI and PO connected to each other along the bottom row so the
    // session can be checked to reach PO.
    for (int x = 0; x < W - 1; x++) begin port_fault[x][P_EAST] = 0; port_fault[x+1][P_WEST] = 0; end
    cur = '0; rx_count = 0; rx_where = -1; n_flood = 0; n_reach = 0; n_unreach = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    start_test = 1; @(negedge clk); start_test = 0;
    t = 0;
    while (!test_done && t < 20000) begin @(negedge clk); t++; end
    check(test_done, "test session ends");
    check(test_reached_po, "test packet reached PO");
    $display("test session took %0d cycles", t);
    label_components();
    for (int i = 0; i < N; i++)
      for (int p = 1; p <= 4; p++) begin
        // Ports of switches cut off from PI cannot be tested.
        exp_ok = link_good(i, p) && comp[i] == comp[0];
        check(port_ok[i][p] == exp_ok,
              $sformatf("switch %0d port %0d status %0d expected %0d", i, p, port_ok[i][p], exp_ok));
      end

    for (int k = 0; k < NPKT; k++) begin
      // Sources in PI's group, so their ports were tested.
      do src = $urandom_range(0, N - 1); while (comp[src] != comp[0]);
      do dst = $urandom_range(0, N - 1); while (dst == src);
      cur = '0;
      cur.ptype = PKT_DATA;
      cur.src_x = coord_t'(src % W); cur.src_y = coord_t'(src / W);
      cur.dst_x = coord_t'(dst % W); cur.dst_y = coord_t'(dst / W);
      cur.seq = 8'(k); cur.payload = 16'($urandom);
      rx_count = 0; rx_where = -1;
      pe_in_valid[src] = 1; pe_in_pkt[src] = cur;
      @(negedge clk);
      while (!pe_in_ready[src]) @(negedge clk);
      pe_in_valid[src] = 0;
      @(negedge clk);
      while (cycle - last_activity < 60) @(negedge clk);
      if (comp[dst] == comp[src]) begin
        n_reach++;
        check(rx_count == 1 && rx_where == dst,
              $sformatf("packet %0d (%0d->%0d) arrived %0d times at %0d", k, src, dst, rx_count, rx_where));
        check(rx_count == 0 || rx_pkt.payload == cur.payload, "payload intact");
      end else begin
        n_unreach++;
        check(rx_count == 0, $sformatf("packet %0d to cut-off switch %0d must not arrive", k, dst));
      end
    end
    $display("%0d reachable, %0d unreachable packets; flooding started %0d times",
             n_reach, n_unreach, n_flood);
    check(n_reach > 0, "some packets reachable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
