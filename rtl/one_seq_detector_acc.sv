// Accelerated end-of-1-sequence detector: one-hot mark of the first 0 from the left.
//
// Same slicing as the end-of-0-sequence detector: N/K slices of K/T chained
// one_seq_module instances, each slice chain starting at 1. A skip chain of one
// 2-input AND gate per slice carries "every bit further left is 1"; a 2-input
// multiplexer per bit passes the slice result when that signal is 1 and forces 0
// otherwise, so a 0 found in an early slice silences all later slices within one
// gate delay per slice.
//
// x     : input vector, bit N-1 leftmost
// y     : one-hot, y[k]=1 when x[k] is the first 0 from the left; 0 when x is all 1
// found : x has a 0 (inverse of the last AND gate of the skip chain)
//
// Structure follows the published accelerated circuit; K is the slice width in
// bits, T (module width) is this design's choice. Combinational.
module one_seq_detector_acc #(
  parameter int unsigned N = 512,
  parameter int unsigned K = 128,
  parameter int unsigned T = 4
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y,
  output logic         found
);

  localparam int unsigned NS = N / K;
  localparam int unsigned NM = K / T;

  logic [NS:0] ones;                    // ones[s]: all bits left of slice s are 1
  assign ones[0] = 1'b1;

  for (genvar s = 0; s < NS; s++) begin : g_slice
    localparam int unsigned HI = N - 1 - s * K;
    logic [K-1:0] xs, ys;
    logic [NM:0]  chain;
    assign xs = x[HI -: K];
    assign chain[NM] = 1'b1;
    for (genvar m = 0; m < NM; m++) begin : g_mod
      one_seq_module #(.T(T)) u_mod (
        .x       (xs[m*T +: T]),
        .ones_in (chain[m+1]),
        .y       (ys[m*T +: T]),
        .ones_out(chain[m])
      );
    end
    assign ones[s+1]  = ones[s] & chain[0];
    assign y[HI -: K] = ones[s] ? ys : '0;
  end

  assign found = ~ones[NS];

  initial begin
    assert (N % K == 0 && K % T == 0)
      else $error("one_seq_detector_acc: K must divide N and T must divide K");
  end

endmodule
