// reroute_unit: local rerouting decision of one switch (combinational).
//
// Given where a packet is going, the port it came in by and which neighbour
// ports are usable, it picks the output port(s) by these rules, in order:
//   1. the packet has reached this switch: deliver it to the local port;
//   2. no neighbour port is usable: drop it;
//   3. only one neighbour port is usable: use it, even if the packet came from
//      there (Figure 1.a);
//   4. otherwise the incoming port counts as faulty (Figure 1.b), and
//      - if flooding is requested, copy to every remaining usable port;
//      - if the XY direction (x first, then y) is usable, take it (Figure 1.d);
//      - else take a random remaining usable port (Figure 1.c).
// The random choice rotates the search start among the four neighbour ports by
// the two rnd bits and takes the first candidate found; the rnd source is the
// caller's. Rule order and the random scheme are this design's reading of the
// described rules. Output mask bit i is port_e value i. There is no clock.
module reroute_unit
  import noc_pkg::*;
(
  input  coord_t             cur_x,
  input  coord_t             cur_y,
  input  coord_t             dst_x,
  input  coord_t             dst_y,
  input  port_e              in_port,
  input  logic [NPORTS-1:0]  port_ok,     // bit 0 (local) is ignored
  input  logic               flood,       // flood instead of routing
  input  logic [1:0]         rnd,
  output logic [NPORTS-1:0]  out_mask,
  output route_e             decision,
  output logic               excl_in      // a usable incoming port was excluded
);

  logic [NPORTS-1:0] mesh_ok, in_bit, cand, pref_bit, pick;
  logic [2:0]        n_ok;
  port_e             pref;
  logic              at_dest;

  always_comb begin
    mesh_ok = {port_ok[NPORTS-1:1], 1'b0};
    in_bit  = (in_port == P_LOCAL) ? '0 : (NPORTS'(1) << in_port);
    n_ok    = 3'(mesh_ok[1]) + 3'(mesh_ok[2]) + 3'(mesh_ok[3]) + 3'(mesh_ok[4]);
    at_dest = (dst_x == cur_x) && (dst_y == cur_y);
    cand    = mesh_ok & ~in_bit;

    // XY-routing preference.
    if      (dst_x > cur_x) pref = P_EAST;
    else if (dst_x < cur_x) pref = P_WEST;
    else if (dst_y > cur_y) pref = P_NORTH;
    else if (dst_y < cur_y) pref = P_SOUTH;
    else                    pref = P_LOCAL;
    pref_bit = NPORTS'(1) << pref;

    // Random pick: search the four neighbour ports starting at 1 + rnd.
    pick = '0;
    for (int k = 3; k >= 0; k--) begin
      int idx;
      idx = 1 + ((int'(rnd) + k) % 4);
      if (cand[idx]) pick = NPORTS'(1) << idx;
    end

    excl_in  = 1'b0;
    out_mask = '0;
    decision = RT_DROP;
    if (at_dest) begin
      decision = RT_LOCAL;
      out_mask = NPORTS'(1);
    end else if (n_ok == 3'd0) begin
      decision = RT_DROP;
    end else if (n_ok == 3'd1) begin
      decision = RT_SINGLE;
      out_mask = mesh_ok;
    end else begin
      excl_in = |(mesh_ok & in_bit);
      if (flood) begin
        decision = RT_FLOOD;
        out_mask = cand;
      end else if (|(cand & pref_bit)) begin
        decision = RT_NORMAL;
        out_mask = pref_bit;
      end else begin
        decision = RT_RANDOM;
        out_mask = pick;
      end
    end
  end

endmodule
