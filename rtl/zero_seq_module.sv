// End-of-0-sequence module: marks the first 1 met when scanning from the left.
//
// This is the cell chain of the straight end-of-0-sequence detector, cut into a
// module of T inputs with a chain input and a chain output, so that modules can be
// strung together (T+1 inputs, T+1 outputs). Bit T-1 is the leftmost bit. The chain
// signal "seen" is the OR of all bits to the left; output k is x[k] AND NOT seen,
// and the chain is carried on through one 2-input OR gate per bit, as in the
// original cell chain. Purely combinational.
//
// seen_in  : a 1 was already found to the left of this module (0 at the chain head)
// y        : one-hot, y[k]=1 when x[k] is the first 1 (all zero if seen_in or x==0)
// seen_out : seen_in OR any bit of x
//
// The gate structure follows the published cell chain; the module width T is a free
// parameter of this design.
module zero_seq_module #(
  parameter int unsigned T = 4
) (
  input  logic [T-1:0] x,
  input  logic         seen_in,
  output logic [T-1:0] y,
  output logic         seen_out
);

  logic [T:0] seen;   // seen[k+1] is the chain value entering bit k

  assign seen[T] = seen_in;
  for (genvar k = 0; k < T; k++) begin : g_cell
    assign y[k]    = x[k] & ~seen[k+1];
    assign seen[k] = seen[k+1] | x[k];
  end

  assign seen_out = seen[0];

endmodule
