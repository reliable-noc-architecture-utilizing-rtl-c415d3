// port_status: fault status of the four neighbour ports of one switch.
//
// Every port starts a test session suspected faulty: the clear input resets
// all four bits to 0. A port becomes known fault-free (bit set to 1) only when
// an acknowledgement packet arrives through it, which proves that a test packet
// left through that port and an answer came back. The status is held after
// the test session and is what the routing unit uses to avoid faulty links.
// The local processor port is not tested and is always reported usable.
// Bit i of ok corresponds to port_e value i (bit 0 local, 1 north, 2 east,
// 3 south, 4 west). An acknowledgement on port p sets bit p one clock later.
// The status at reset and the extra force input (which lets a link be marked
// faulty at run time, for example to steer around congestion) are this
// design's choices.
module port_status
  import noc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,      // test session start: all suspected faulty
  input  logic [NPORTS-1:0]  ack_in,     // acknowledgement received on port i
  input  logic [NPORTS-1:0]  force_bad,  // mark a port unusable while high
  output logic [NPORTS-1:0]  ok          // port usable for routing
);

  logic [NPORTS-1:1] tested_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     tested_ok <= '0;
    else if (clear) tested_ok <= '0;
    else            tested_ok <= tested_ok | ack_in[NPORTS-1:1];
  end

  assign ok = {tested_ok, 1'b1} & ~force_bad;

endmodule
