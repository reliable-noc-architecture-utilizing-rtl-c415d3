// test_controller: runs the offline port test session of the mesh.
//
// On a start pulse it puts every switch into test mode, pulses test_clear for
// one cycle (all ports suspected faulty again), then offers one test packet
// to the local input of the PI switch, which floods it through the mesh. The
// session is over when no test or acknowledgement packet is travelling any
// more: the controller waits until the network has been idle (net_busy low)
// for QUIET_CYCLES consecutive cycles, then leaves test mode and raises
// test_done. po_reached records that a copy of the test packet reached the
// local port of the PO switch during the session.
// States: IDLE -> CLEAR (1 cycle) -> INJECT (until the packet is taken) ->
// WAIT -> DONE. At reset the mesh is in normal mode with every port still
// suspected faulty, so a session must run before data is sent. Starting the
// session at PI and ending it when the network is quiet follow the
// description; the global idle signal and the quiet count are this design's
// choices.
module test_controller
  import noc_pkg::*;
#(
  parameter int unsigned QUIET_CYCLES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic net_busy,
  input  logic inj_ready,
  input  logic po_test_rx,
  output logic test_mode,
  output logic test_clear,
  output logic inj_valid,
  output pkt_t inj_pkt,
  output logic test_done,
  output logic po_reached
);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_INJECT, S_WAIT, S_DONE} state_e;

  localparam int unsigned QW = $clog2(QUIET_CYCLES + 1);

  state_e        state;
  logic [QW-1:0] quiet;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      quiet      <= '0;
      po_reached <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) state <= S_CLEAR;
        S_CLEAR: begin
          state      <= S_INJECT;
          po_reached <= 1'b0;
        end
        S_INJECT: if (inj_ready) begin
          state <= S_WAIT;
          quiet <= '0;
        end
        S_WAIT: begin
          if (net_busy)                       quiet <= '0;
          else if (quiet == QW'(QUIET_CYCLES - 1)) state <= S_DONE;
          else                                quiet <= quiet + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      if (po_test_rx && state != S_CLEAR) po_reached <= 1'b1;
    end
  end

  assign test_mode  = (state == S_CLEAR) || (state == S_INJECT) || (state == S_WAIT);
  assign test_clear = (state == S_CLEAR);
  assign inj_valid  = (state == S_INJECT);
  assign test_done  = (state == S_DONE);

  always_comb begin
    inj_pkt       = '0;
    inj_pkt.ptype = PKT_TEST;
  end

endmodule
