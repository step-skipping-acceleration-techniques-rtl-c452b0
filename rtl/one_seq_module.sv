// End-of-1-sequence module: marks the first 0 met when scanning from the left.
//
// This is the cell chain of the straight end-of-1-sequence detector cut into a
// module of T inputs with a chain input and output. Bit T-1 is the leftmost bit.
// The chain signal "ones" is the AND of all bits to the left; output k is
// NOT x[k] AND ones, and the chain goes on through one 2-input AND gate per bit.
// Purely combinational.
//
// ones_in  : every bit to the left of this module is 1 (1 at the chain head)
// y        : one-hot, y[k]=1 when x[k] is the first 0 (all zero if !ones_in or x all 1)
// ones_out : ones_in AND all bits of x
//
// The gate structure follows the published cell chain; T is this design's parameter.
module one_seq_module #(
  parameter int unsigned T = 4
) (
  input  logic [T-1:0] x,
  input  logic         ones_in,
  output logic [T-1:0] y,
  output logic         ones_out
);

  logic [T:0] ones;   // ones[k+1] is the chain value entering bit k

  assign ones[T] = ones_in;
  for (genvar k = 0; k < T; k++) begin : g_cell
    assign y[k]    = ~x[k] & ones[k+1];
    assign ones[k] = ones[k+1] & x[k];
  end

  assign ones_out = ones[0];

endmodule
