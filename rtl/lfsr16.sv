// lfsr16: free-running 16-bit pseudo-random source.
//
// Galois LFSR with polynomial x^16 + x^14 + x^13 + x^11 + 1 (maximal length),
// advanced every clock. It supplies the random choice of the rerouting rules.
// SEED must be nonzero; each switch gets a different one so that neighbouring
// switches do not make the same choices. The random source is this design's
// choice: the description only says the port is chosen randomly.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) value <= (SEED == '0) ? 16'h0001 : SEED;
    else        value <= {1'b0, value[15:1]} ^ (value[0] ? 16'hB400 : 16'h0000);
  end

endmodule
