// tb_reroute_unit: checks the rerouting decision exhaustively on a 3 x 3
// grid of positions (every destination, incoming port, port status pattern,
// flood request and random value) against a reference model written as a
// plain list of the rules, and replays the four cases of the rule figure and
// the decisions of the worked 3 x 3 example.
module tb_reroute_unit;
  import noc_pkg::*;

  coord_t            cur_x, cur_y, dst_x, dst_y;
  port_e             in_port;
  logic [NPORTS-1:0] port_ok, out_mask;
  logic              flood, excl_in;
  logic [1:0]        rnd;
  route_e            decision;
  int checks = 0, failures = 0;

  reroute_unit dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: rules in order, random pick = first usable candidate at or
  // after port 1 + rnd (wrapping over 1..4).
  task automatic reference(output logic [4:0] m, output route_e d, output logic ex);
    int n = 0;
    logic [4:0] c;
    int want;
    for (int p = 1; p <= 4; p++) if (port_ok[p]) n++;
    m = 0; ex = 0; d = RT_DROP;
    if (dst_x == cur_x && dst_y == cur_y) begin d = RT_LOCAL; m = 5'b00001; return; end
    if (n == 0) return;
    if (n == 1) begin d = RT_SINGLE; m = {port_ok[4:1], 1'b0}; return; end
    c = {port_ok[4:1], 1'b0};
    if (in_port != P_LOCAL && c[in_port]) begin ex = 1; c[in_port] = 0; end
    if (flood) begin d = RT_FLOOD; m = c; return; end
    want = (dst_x > cur_x) ? 2 : (dst_x < cur_x) ? 4 : (dst_y > cur_y) ? 1 : 3;
    if (c[want]) begin d = RT_NORMAL; m = 5'b1 << want; return; end
    d = RT_RANDOM;
    for (int k = 0; k < 4; k++) begin
      int idx = 1 + ((rnd + k) % 4);
      if (c[idx]) begin m = 5'b1 << idx; return; end
    end
  endtask

  task automatic expect_case(string name, logic [4:0] m_exp, route_e d_exp);
    #1;
    checks++;
    if (out_mask !== m_exp || decision !== d_exp) begin
      failures++;
      $display("FAIL %s: mask=%b dec=%s, expected mask=%b dec=%s",
               name, out_mask, decision.name(), m_exp, d_exp.name());
    end
  endtask

  initial begin
    logic [4:0] m_ref; route_e d_ref; logic ex_ref;
    int seen_random_e = 0, seen_random_w = 0;

    // Figure 1: packet from the south, destination two switches north.
    cur_x = 1; cur_y = 1; dst_x = 1; dst_y = 3; in_port = P_SOUTH; flood = 0; rnd = 0;
    port_ok = 5'b01000;            // (a) only south usable -> back south
    expect_case("fig1a", 5'b01000, RT_SINGLE);
    port_ok = 5'b11000;            // (b) south and west: incoming excluded -> west
    expect_case("fig1b", 5'b10000, RT_RANDOM);
    port_ok = 5'b11100;            // (c) north faulty -> east or west at random
    for (int r = 0; r < 4; r++) begin
      rnd = 2'(r); #1;
      checks++;
      if (!(out_mask == 5'b00100 || out_mask == 5'b10000) || decision != RT_RANDOM) begin
        failures++; $display("FAIL fig1c rnd=%0d mask=%b", r, out_mask);
      end
      if (out_mask == 5'b00100) seen_random_e++;
      if (out_mask == 5'b10000) seen_random_w++;
    end
    checks++;
    if (seen_random_e == 0 || seen_random_w == 0) begin
      failures++; $display("FAIL fig1c: random choice never varies");
    end
    port_ok = 5'b11110;            // (d) fault free -> north (XY)
    expect_case("fig1d", 5'b00010, RT_NORMAL);

    // Worked example: switches 5 and 6 faulty, source (0,0), destination (2,2).
    dst_x = 2; dst_y = 2; rnd = 1;
    cur_x = 0; cur_y = 0; in_port = P_LOCAL; port_ok = 5'b00110;
    expect_case("ex sw1 step1", 5'b00100, RT_NORMAL);
    cur_x = 1; cur_y = 0; in_port = P_WEST;  port_ok = 5'b10100;
    expect_case("ex sw2 step2", 5'b00100, RT_NORMAL);
    cur_x = 2; cur_y = 0; in_port = P_WEST;  port_ok = 5'b10000;
    expect_case("ex sw3 step3", 5'b10000, RT_SINGLE);
    cur_x = 1; cur_y = 0; in_port = P_EAST;  port_ok = 5'b10100;
    expect_case("ex sw2 step4", 5'b10000, RT_RANDOM);
    cur_x = 0; cur_y = 0; in_port = P_EAST;  port_ok = 5'b00110;
    expect_case("ex sw1 step5", 5'b00010, RT_RANDOM);
    cur_x = 0; cur_y = 1; in_port = P_SOUTH; port_ok = 5'b01010;
    expect_case("ex sw4 step6", 5'b00010, RT_RANDOM);
    cur_x = 0; cur_y = 2; in_port = P_SOUTH; port_ok = 5'b01100;
    expect_case("ex sw7 step7", 5'b00100, RT_NORMAL);
    cur_x = 1; cur_y = 2; in_port = P_WEST;  port_ok = 5'b10100;
    expect_case("ex sw8 step8", 5'b00100, RT_NORMAL);
    cur_x = 2; cur_y = 2; in_port = P_WEST;  port_ok = 5'b10000;
    expect_case("ex sw9 arrive", 5'b00001, RT_LOCAL);

    // Exhaustive comparison.
    for (int cx = 0; cx < 3; cx++) for (int cy = 0; cy < 3; cy++)
    for (int dx = 0; dx < 3; dx++) for (int dy = 0; dy < 3; dy++)
    for (int ip = 0; ip < 5; ip++) for (int ok = 0; ok < 16; ok++)
    for (int fl = 0; fl < 2; fl++) for (int r = 0; r < 4; r++) begin
      cur_x = coord_t'(cx); cur_y = coord_t'(cy); dst_x = coord_t'(dx); dst_y = coord_t'(dy);
      in_port = port_e'(ip); port_ok = {4'(ok), 1'b1}; flood = fl[0]; rnd = 2'(r);
      #1;
      reference(m_ref, d_ref, ex_ref);
      checks++;
      if (out_mask !== m_ref || decision !== d_ref || excl_in !== ex_ref) begin
        failures++;
        if (failures < 10)
          $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) in=%0d ok=%b fl=%0d rnd=%0d: %b %s %b / ref %b %s %b",
                   cx, cy, dx, dy, ip, port_ok, fl, r, out_mask, decision.name(), excl_in,
                   m_ref, d_ref.name(), ex_ref);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
