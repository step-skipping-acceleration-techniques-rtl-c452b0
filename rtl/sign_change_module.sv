// Two's complement sign change module (cell chain).
//
// Negating a two's complement number complements every bit to the left of its
// rightmost 1. The chain signal c runs from the LSB to the MSB through one 2-input
// OR gate per bit (c = "a 1 was met to the right"); each bit is then flipped by an
// XOR gate driven by (en AND c). With en = 0 the module passes x unchanged.
// T+1 inputs (bits and chain in) and T+1 outputs (bits and chain out), so modules
// can be strung together. Combinational.
//
// x, z  : operand and result, bit 0 is the LSB
// en    : 1 negates, 0 passes x through
// c_in  : a 1 was met to the right of this module (0 at the LSB)
// c_out : c_in OR any bit of x
//
// The OR/AND/XOR cell follows the published sign change circuit, enable included;
// the width T is this design's parameter.
module sign_change_module #(
  parameter int unsigned T = 4
) (
  input  logic [T-1:0] x,
  input  logic         en,
  input  logic         c_in,
  output logic [T-1:0] z,
  output logic         c_out
);

  logic [T:0] c;   // c[k] is the chain value entering bit k

  assign c[0] = c_in;
  for (genvar k = 0; k < T; k++) begin : g_cell
    assign z[k]   = x[k] ^ (en & c[k]);
    assign c[k+1] = c[k] | x[k];
  end

  assign c_out = c[T];

endmodule
