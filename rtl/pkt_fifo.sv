// pkt_fifo: input buffer of one switch port.
//
// A small first-in first-out queue of packets with valid/ready handshakes on
// both sides, standing where the reference model connects switches through
// FIFO channels. It is a circular buffer of DEPTH entries with read and write
// pointers and an occupancy count. A push happens on a cycle with
// push_valid && push_ready, a pop on pop_valid && pop_ready; both may happen in
// the same cycle. Data written in one cycle is visible at the head in the next
// (one cycle of latency, no fall-through). The depth of two is this design's
// choice: it is enough to hold the at most one test packet and one
// acknowledgement that can reach a port during a test session, so the test
// session can never block.
module pkt_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,       // synchronous flush
  input  logic push_valid,
  output logic push_ready,
  input  pkt_t push_pkt,
  output logic pop_valid,
  input  logic pop_ready,
  output pkt_t pop_pkt,
  output logic empty
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pkt_t             mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [PW:0]      count;
  logic             do_push, do_pop;

  assign push_ready = (count < (PW+1)'(DEPTH));
  assign pop_valid  = (count != '0);
  assign empty      = (count == '0);
  assign pop_pkt    = mem[rd_ptr];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_pkt;
  end

endmodule
