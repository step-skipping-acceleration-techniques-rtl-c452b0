// Carry-skip adder: z = x + y + c_in.
//
// Each bit has a generate/propagate cell (g = x AND y, p = x XOR y), a carry-chain
// cell (q(i+1) = p ? q(i) : g) and a mod-2 sum cell (z = p XOR q). The carry chain
// is cut into groups of S bits; each group also forms its group propagate
// P = AND of its p bits, and a 2-to-1 multiplexer per group hands on q at the group
// input when P = 1 and the group's own ripple carry otherwise. A carry therefore
// crosses a group in one multiplexer delay. If S does not divide W the last
// (leftmost) group is shorter. Combinational.
//
// x, y : addends    c_in : q(0)    z : sum    c_out : q(W)
//
// The cells and the grouped multiplexer bypass follow the published carry-skip
// adder; the widths are this design's choice. Every group keeps its multiplexer,
// the first one included, so the adder can be used as a building block.
module carry_skip_adder #(
  parameter int unsigned W = 32,
  parameter int unsigned S = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         c_in,
  output logic [W-1:0] z,
  output logic         c_out
);

  localparam int unsigned NG = (W + S - 1) / S;

  logic [W-1:0] g, p, q;       // q[i] is the carry into bit i
  logic [NG:0]  qg;            // carry at the group boundaries

  assign g = x & y;
  assign p = x ^ y;
  assign qg[0] = c_in;

  for (genvar j = 0; j < NG; j++) begin : g_grp
    localparam int unsigned LO = j * S;
    localparam int unsigned GS = (LO + S <= W) ? S : W - LO;
    logic [GS:0] r;            // ripple carries inside the group
    assign r[0] = qg[j];
    for (genvar b = 0; b < GS; b++) begin : g_bit
      assign q[LO+b] = r[b];
      assign r[b+1]  = p[LO+b] ? r[b] : g[LO+b];
    end
    assign qg[j+1] = (&p[LO +: GS]) ? qg[j] : r[GS];
  end

  assign z     = p ^ q;
  assign c_out = qg[NG];

endmodule
