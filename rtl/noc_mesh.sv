// noc_mesh: fault-tolerant, self-reconfiguring 2-D mesh network on chip.
//
// MESH_W x MESH_H noc_switch instances, switch (x,y) at index y*MESH_W + x,
// each linked to its four neighbours by a packet-wide valid/ready link in
// each direction. Links off the mesh edge are tied off: nothing arrives on
// them and whatever is sent into them is dropped, so a port on the edge
// behaves like a faulty port and is found faulty by the test session. The
// test_controller starts a test session on start_test, injecting the test
// packet at PI (switch (0,0), bottom-left) and ending the session when the
// whole network is quiet; test_reached_po reports that the test packet
// reached PO (switch (MESH_W-1,0), bottom-right). After the session each
// switch routes around the ports it found faulty.
//
// The local port of every switch is brought out (pe_in_* injects packets
// from the processor, pe_out_* delivers them), as are the per-port fault
// injection inputs (port_fault: the port drops every packet), the per-port
// routing disable (link_off), the tested port status and the per-switch event
// pulses. While the test packet is being injected, the PI processor's input is
// held off. The mesh size defaults to the largest the description evaluates
// (100 switches, taken as 10 x 10); the other sizes are this design's.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_W          = 10,
  parameter int unsigned MESH_H          = 10,
  parameter int unsigned FIFO_DEPTH      = 2,
  parameter int unsigned HIST_DEPTH      = 8,
  parameter int unsigned FLOOD_THRESHOLD = FLOOD_THRESHOLD_DEF,
  localparam int unsigned N              = MESH_W * MESH_H
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_test,
  output logic               test_mode,
  output logic               test_done,
  output logic               test_reached_po,
  input  logic [NPORTS-1:0]  port_fault  [N],
  input  logic [NPORTS-1:0]  link_off    [N],
  input  logic               pe_in_valid [N],
  output logic               pe_in_ready [N],
  input  pkt_t               pe_in_pkt   [N],
  output logic               pe_out_valid[N],
  input  logic               pe_out_ready[N],
  output pkt_t               pe_out_pkt  [N],
  output logic [NPORTS-1:0]  port_ok     [N],
  output sw_event_t          sw_ev       [N]
);

  logic s_in_valid  [N][NPORTS];
  logic s_in_ready  [N][NPORTS];
  pkt_t s_in_pkt    [N][NPORTS];
  logic s_out_valid [N][NPORTS];
  logic s_out_ready [N][NPORTS];
  pkt_t s_out_pkt   [N][NPORTS];
  logic [N-1:0] sw_busy;

  logic test_clear, inj_valid, po_test_rx;
  pkt_t inj_pkt;

  test_controller u_ctl (
    .clk, .rst_n, .start(start_test), .net_busy(|sw_busy),
    .inj_ready(s_in_ready[0][P_LOCAL]), .po_test_rx,
    .test_mode, .test_clear, .inj_valid, .inj_pkt, .test_done,
    .po_reached(test_reached_po)
  );

  assign po_test_rx = s_out_valid[MESH_W-1][P_LOCAL] && pe_out_ready[MESH_W-1]
                      && s_out_pkt[MESH_W-1][P_LOCAL].ptype == PKT_TEST;

  for (genvar y = 0; y < MESH_H; y++) begin : g_y
    for (genvar x = 0; x < MESH_W; x++) begin : g_x
      localparam int unsigned I = y * MESH_W + x;

      noc_switch #(
        .MY_X(x), .MY_Y(y), .FIFO_DEPTH(FIFO_DEPTH), .HIST_DEPTH(HIST_DEPTH),
        .FLOOD_THRESHOLD(FLOOD_THRESHOLD),
        .LFSR_SEED(16'hACE1 ^ 16'(I * 40503 + 1))
      ) u_sw (
        .clk, .rst_n, .test_mode, .test_clear,
        .port_fault(port_fault[I]), .link_off(link_off[I]),
        .in_valid(s_in_valid[I]), .in_ready(s_in_ready[I]), .in_pkt(s_in_pkt[I]),
        .out_valid(s_out_valid[I]), .out_ready(s_out_ready[I]), .out_pkt(s_out_pkt[I]),
        .port_ok(port_ok[I]), .busy(sw_busy[I]), .ev(sw_ev[I])
      );

      // Local port: processor, with the test packet injected at PI.
      if (I == 0) begin : g_pi
        assign s_in_valid[I][P_LOCAL] = inj_valid || pe_in_valid[I];
        assign s_in_pkt[I][P_LOCAL]   = inj_valid ? inj_pkt : pe_in_pkt[I];
        assign pe_in_ready[I]         = !inj_valid && s_in_ready[I][P_LOCAL];
      end else begin : g_pe
        assign s_in_valid[I][P_LOCAL] = pe_in_valid[I];
        assign s_in_pkt[I][P_LOCAL]   = pe_in_pkt[I];
        assign pe_in_ready[I]         = s_in_ready[I][P_LOCAL];
      end
      assign pe_out_valid[I]         = s_out_valid[I][P_LOCAL];
      assign pe_out_pkt[I]           = s_out_pkt[I][P_LOCAL];
      assign s_out_ready[I][P_LOCAL] = pe_out_ready[I];

      // North link.
      if (y < MESH_H - 1) begin : g_n
        assign s_in_valid[I][P_NORTH]  = s_out_valid[I+MESH_W][P_SOUTH];
        assign s_in_pkt[I][P_NORTH]    = s_out_pkt[I+MESH_W][P_SOUTH];
        assign s_out_ready[I][P_NORTH] = s_in_ready[I+MESH_W][P_SOUTH];
      end else begin : g_n_edge
        assign s_in_valid[I][P_NORTH]  = 1'b0;
        assign s_in_pkt[I][P_NORTH]    = '0;
        assign s_out_ready[I][P_NORTH] = 1'b1;
      end
      // South link.
      if (y > 0) begin : g_s
        assign s_in_valid[I][P_SOUTH]  = s_out_valid[I-MESH_W][P_NORTH];
        assign s_in_pkt[I][P_SOUTH]    = s_out_pkt[I-MESH_W][P_NORTH];
        assign s_out_ready[I][P_SOUTH] = s_in_ready[I-MESH_W][P_NORTH];
      end else begin : g_s_edge
        assign s_in_valid[I][P_SOUTH]  = 1'b0;
        assign s_in_pkt[I][P_SOUTH]    = '0;
        assign s_out_ready[I][P_SOUTH] = 1'b1;
      end
      // East link.
      if (x < MESH_W - 1) begin : g_e
        assign s_in_valid[I][P_EAST]  = s_out_valid[I+1][P_WEST];
        assign s_in_pkt[I][P_EAST]    = s_out_pkt[I+1][P_WEST];
        assign s_out_ready[I][P_EAST] = s_in_ready[I+1][P_WEST];
      end else begin : g_e_edge
        assign s_in_valid[I][P_EAST]  = 1'b0;
        assign s_in_pkt[I][P_EAST]    = '0;
        assign s_out_ready[I][P_EAST] = 1'b1;
      end
      // West link.
      if (x > 0) begin : g_w
        assign s_in_valid[I][P_WEST]  = s_out_valid[I-1][P_EAST];
        assign s_in_pkt[I][P_WEST]    = s_out_pkt[I-1][P_EAST];
        assign s_out_ready[I][P_WEST] = s_in_ready[I-1][P_EAST];
      end else begin : g_w_edge
        assign s_in_valid[I][P_WEST]  = 1'b0;
        assign s_in_pkt[I][P_WEST]    = '0;
        assign s_out_ready[I][P_WEST] = 1'b1;
      end
    end
  end

endmodule
