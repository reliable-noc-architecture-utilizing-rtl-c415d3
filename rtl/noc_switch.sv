// noc_switch: self-reconfiguring five-port mesh switch.
//
// The switch has a local port (its processor) and four neighbour ports. Each
// input port has a small FIFO; a round-robin arbiter looks at one FIFO head
// per cycle and, when every output that the head needs is free, moves it in
// that cycle into one-entry output registers (several at once when copying).
// The arbiter moves on to the next input every cycle, so a blocked head does
// not stall the others.
//
// Test session (test_mode = 1). test_clear (one cycle) marks every neighbour
// port suspected faulty and forgets earlier test packets. A test packet is
// acknowledged back through the port it came in by (unless it came from the
// local port) and, the first time only, copied to all four neighbour ports
// and to the local port. An acknowledgement arriving on a port marks that port
// fault-free in port_status. Acknowledgements wait in a per-port pending bit
// and take an output register when the routing path leaves it free.
//
// Normal operation (test_mode = 0). Data packets are routed by reroute_unit
// using the port status. packet_history counts how often each packet was seen;
// on the fifth encounter the packet is flooded (copied to all usable ports
// but the incoming one, marked as a flooded copy). A switch forwards a flooded
// copy once and discards later copies. A packet for this switch goes to the
// local port.
//
// Port faults. port_fault[p] models a faulty port as in the description: the
// port drops everything, incoming packets are accepted and discarded and
// outgoing packets are discarded. link_off[p] makes the router avoid a port
// that is not faulty (for example a congested link).
//
// Timing: a packet written into an input FIFO can leave through an output
// register two clocks later at the earliest; a link transfer happens on
// valid && ready. Port index = port_e value. FIFO depth, history size, the
// random source, the packet format and the arbitration are this design's
// choices; the rules and the threshold follow the description.
module noc_switch
  import noc_pkg::*;
#(
  parameter int unsigned MY_X            = 0,
  parameter int unsigned MY_Y            = 0,
  parameter int unsigned FIFO_DEPTH      = 2,
  parameter int unsigned HIST_DEPTH      = 8,
  parameter int unsigned FLOOD_THRESHOLD = FLOOD_THRESHOLD_DEF,
  parameter logic [15:0] LFSR_SEED       = 16'hACE1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               test_mode,
  input  logic               test_clear,
  input  logic [NPORTS-1:0]  port_fault,
  input  logic [NPORTS-1:0]  link_off,
  input  logic               in_valid  [NPORTS],
  output logic               in_ready  [NPORTS],
  input  pkt_t               in_pkt    [NPORTS],
  output logic               out_valid [NPORTS],
  input  logic               out_ready [NPORTS],
  output pkt_t               out_pkt   [NPORTS],
  output logic [NPORTS-1:0]  port_ok,
  output logic               busy,
  output sw_event_t          ev
);

  // ---------------------------------------------------------------- inputs
  logic              f_push [NPORTS];
  logic              f_ready[NPORTS];
  logic              f_valid[NPORTS];
  logic              f_pop  [NPORTS];
  pkt_t              f_head [NPORTS];
  logic [NPORTS-1:0] f_nonempty;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    logic f_empty;
    assign f_push[p]   = in_valid[p] && !port_fault[p];
    assign in_ready[p] = port_fault[p] ? 1'b1 : f_ready[p];
    pkt_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clear(test_clear),
      .push_valid(f_push[p]), .push_ready(f_ready[p]), .push_pkt(in_pkt[p]),
      .pop_valid(f_valid[p]), .pop_ready(f_pop[p]), .pop_pkt(f_head[p]),
      .empty(f_empty)
    );
    assign f_nonempty[p] = !f_empty;
  end

  // ---------------------------------------------------------------- arbiter
  logic [2:0] rr_ptr;
  logic [2:0] sel;
  logic       have;

  always_comb begin
    have = 1'b0;
    sel  = 3'd0;
    for (int k = NPORTS - 1; k >= 0; k--) begin
      int idx;
      idx = (int'(rr_ptr) + k) % NPORTS;
      if (f_valid[idx]) begin
        have = 1'b1;
        sel  = 3'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rr_ptr <= '0;
    else if (have) rr_ptr <= (sel == 3'(NPORTS - 1)) ? 3'd0 : sel + 3'd1;
  end

  pkt_t  head;
  port_e in_port;
  assign head    = f_head[sel];
  assign in_port = port_e'(sel);

  // ---------------------------------------------------- status, history, route
  logic [NPORTS-1:0] ack_in;
  logic [15:0]       rnd;
  logic              h_flood, h_dup, h_commit;
  logic [NPORTS-1:0] rt_mask;
  route_e            rt_dec;
  logic              rt_excl;

  port_status u_status (
    .clk, .rst_n, .clear(test_clear), .ack_in, .force_bad(link_off), .ok(port_ok)
  );

  packet_history #(.DEPTH(HIST_DEPTH), .THRESHOLD(FLOOD_THRESHOLD)) u_hist (
    .clk, .rst_n, .clear(test_clear),
    .id(pkt_id(head)), .is_flood_copy(head.flood),
    .flood_now(h_flood), .dup(h_dup), .commit(h_commit)
  );

  lfsr16 #(.SEED(LFSR_SEED)) u_lfsr (.clk, .rst_n, .value(rnd));

  reroute_unit u_route (
    .cur_x(coord_t'(MY_X)), .cur_y(coord_t'(MY_Y)),
    .dst_x(head.dst_x), .dst_y(head.dst_y),
    .in_port, .port_ok, .flood(h_flood), .rnd(rnd[1:0]),
    .out_mask(rt_mask), .decision(rt_dec), .excl_in(rt_excl)
  );

  // ---------------------------------------------------------------- decision
  logic              test_seen;
  logic [NPORTS-1:0] ack_pend;
  logic [NPORTS-1:0] out_free;
  logic [NPORTS-1:0] mask;
  logic              is_data, go;
  logic              set_seen;
  logic [NPORTS-1:0] set_ack;
  pkt_t              fwd_pkt;

  always_comb begin
    mask     = '0;
    is_data  = 1'b0;
    set_seen = 1'b0;
    set_ack  = '0;
    ack_in   = '0;
    fwd_pkt  = head;
    unique case (head.ptype)
      PKT_ACK: ;
      PKT_TEST: if (test_mode) begin
        if (!test_seen)
          mask = (in_port == P_LOCAL) ? 5'b11110 : 5'b11111;
        set_seen = 1'b1;
        if (in_port != P_LOCAL) set_ack = NPORTS'(1) << in_port;
      end
      PKT_DATA: if (!test_mode && !(head.flood && h_dup)) begin
        is_data = 1'b1;
        mask    = rt_mask;
        fwd_pkt.flood = head.flood || h_flood;
      end
      default: ;
    endcase
    go = have && ((mask & ~out_free) == '0);
    if (go && head.ptype == PKT_ACK && test_mode && in_port != P_LOCAL)
      ack_in = NPORTS'(1) << in_port;
  end

  assign h_commit = go && is_data;

  for (genvar p = 0; p < NPORTS; p++) begin : g_pop
    assign f_pop[p] = go && (sel == 3'(p));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) test_seen <= 1'b0;
    else if (test_clear) test_seen <= 1'b0;
    else if (go && set_seen) test_seen <= 1'b1;
  end

  // ---------------------------------------------------------------- outputs
  logic              oq_valid [NPORTS];
  pkt_t              oq_pkt   [NPORTS];
  pkt_t              ack_pkt;
  logic [NPORTS-1:0] ack_take;

  always_comb begin
    ack_pkt       = '0;
    ack_pkt.ptype = PKT_ACK;
    ack_pkt.src_x = coord_t'(MY_X);
    ack_pkt.src_y = coord_t'(MY_Y);
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_out
    logic drain;
    assign drain       = oq_valid[p] && (out_ready[p] || port_fault[p]);
    assign out_free[p] = !oq_valid[p] || drain;
    assign out_valid[p] = oq_valid[p] && !port_fault[p];
    assign out_pkt[p]   = oq_pkt[p];
    assign ack_take[p]  = ack_pend[p] && out_free[p] && !(go && mask[p]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        oq_valid[p] <= 1'b0;
        oq_pkt[p]   <= '0;
        ack_pend[p] <= 1'b0;
      end else if (test_clear) begin
        oq_valid[p] <= 1'b0;
        ack_pend[p] <= 1'b0;
      end else begin
        if (go && mask[p]) begin
          oq_valid[p] <= 1'b1;
          oq_pkt[p]   <= fwd_pkt;
        end else if (ack_take[p]) begin
          oq_valid[p] <= 1'b1;
          oq_pkt[p]   <= ack_pkt;
        end else if (drain) begin
          oq_valid[p] <= 1'b0;
        end
        if (ack_take[p])               ack_pend[p] <= 1'b0;
        else if (go && set_ack[p])     ack_pend[p] <= 1'b1;
      end
    end
  end

  always_comb begin
    busy = (|f_nonempty) || (|ack_pend);
    for (int p = 0; p < NPORTS; p++) busy = busy || oq_valid[p];
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    ev             = '0;
    ev.test_flood  = go && head.ptype == PKT_TEST && test_mode && !test_seen;
    ev.ack_sent    = |ack_take;
    ev.ack_rcvd    = |ack_in;
    ev.deliver     = go && is_data && rt_dec == RT_LOCAL;
    ev.rt_single   = go && is_data && rt_dec == RT_SINGLE;
    ev.rt_excl_in  = go && is_data && !h_flood && rt_excl;
    ev.rt_normal   = go && is_data && rt_dec == RT_NORMAL;
    ev.rt_random   = go && is_data && rt_dec == RT_RANDOM;
    ev.flood_start = go && is_data && !head.flood && h_flood && rt_dec != RT_LOCAL;
    ev.flood_fwd   = go && is_data && head.flood && rt_dec != RT_LOCAL && rt_dec != RT_DROP;
    ev.drop        = go && (mask == '0) && !(head.ptype == PKT_ACK && test_mode)
                     && !(head.ptype == PKT_TEST && test_mode);
  end

endmodule
