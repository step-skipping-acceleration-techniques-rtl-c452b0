// Accelerated two's complement sign change (z = en ? -x : x).
//
// The W-bit operand is cut into W/K slices of K bits, each made of K/T chained
// sign_change_module instances whose chain starts at 0 inside the slice. A skip
// signal runs from the LSB slice towards the MSB through one 2-input OR gate per
// slice; it says that a 1 was met in some lower slice. When the skip input of a
// slice is 1, every bit of the slice must be complemented, so a multiplexer picks
// x XOR en for the whole slice; otherwise it picks the slice's own chain result.
// The long path is one slice chain plus one OR gate per slice.
//
// x  : operand (bit 0 LSB)   en : 1 negates, 0 passes x   z : result
// -x of the most negative number is itself, as in any two's complement negation.
//
// Slicing, OR skip chain and slice multiplexer follow the published accelerated
// circuit; the widths W, K and T are this design's choice. When K does not divide
// W the top slice is narrower, and when T does not divide a slice its last module
// is fed zeros above the slice. Combinational.
module sign_change_acc #(
  parameter int unsigned W = 16,
  parameter int unsigned K = 16,
  parameter int unsigned T = 4
) (
  input  logic [W-1:0] x,
  input  logic         en,
  output logic [W-1:0] z
);

  localparam int unsigned NS = (W + K - 1) / K;

  logic [NS:0] skip;     // skip[s]: a 1 was met below slice s
  assign skip[0] = 1'b0;

  for (genvar s = 0; s < NS; s++) begin : g_slice
    localparam int unsigned LO = s * K;
    localparam int unsigned SW = (LO + K <= W) ? K : W - LO;   // slice width
    localparam int unsigned NM = (SW + T - 1) / T;             // modules
    logic [NM*T-1:0] xs, zs;
    logic [NM:0]     chain;
    assign xs = (NM*T)'(x[LO +: SW]);
    assign chain[0] = 1'b0;
    for (genvar m = 0; m < NM; m++) begin : g_mod
      sign_change_module #(.T(T)) u_mod (
        .x    (xs[m*T +: T]),
        .en   (en),
        .c_in (chain[m]),
        .z    (zs[m*T +: T]),
        .c_out(chain[m+1])
      );
    end
    assign skip[s+1]    = skip[s] | chain[NM];
    assign z[LO +: SW]  = skip[s] ? (xs[SW-1:0] ^ {SW{en}}) : zs[SW-1:0];
  end

endmodule
