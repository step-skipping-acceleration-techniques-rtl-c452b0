// Accelerated end-of-0-sequence detector: one-hot mark of the first 1 from the left.
//
// The N input bits (bit N-1 leftmost) are cut into N/K slices of K bits, and each
// slice into K/T chained zero_seq_module instances whose chain starts at 0 inside
// the slice, so all slices search in parallel. A skip chain of one 2-input OR gate
// per slice carries "a 1 was found further left" from slice to slice; when it is
// set, a 2-input multiplexer per bit forces the slice outputs to 0, otherwise it
// passes the slice's local result. The long path is thus s = K/T module delays plus
// one OR gate per slice plus one multiplexer, instead of N cell delays.
//
// x     : input vector
// y     : one-hot, y[k]=1 when x[k] is the first 1 from the left; 0 when x==0
// found : x has a 1 (output of the last OR gate of the skip chain)
//
// Slices, modules, OR skip chain and multiplexers follow the published accelerated
// circuit. K is the slice width in bits ("block size"); T, the module width, is
// this design's choice. K must divide N and T must divide K. Combinational.
module zero_seq_detector_acc #(
  parameter int unsigned N = 512,
  parameter int unsigned K = 64,
  parameter int unsigned T = 4
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y,
  output logic         found
);

  localparam int unsigned NS = N / K;   // slices
  localparam int unsigned NM = K / T;   // modules per slice

  logic [NS:0] skip;                    // skip[s]: a 1 was found left of slice s
  assign skip[0] = 1'b0;

  for (genvar s = 0; s < NS; s++) begin : g_slice
    localparam int unsigned HI = N - 1 - s * K;   // leftmost bit of the slice
    logic [K-1:0] xs, ys;
    logic [NM:0]  chain;
    assign xs = x[HI -: K];
    assign chain[NM] = 1'b0;
    for (genvar m = 0; m < NM; m++) begin : g_mod
      zero_seq_module #(.T(T)) u_mod (
        .x       (xs[m*T +: T]),
        .seen_in (chain[m+1]),
        .y       (ys[m*T +: T]),
        .seen_out(chain[m])
      );
    end
    assign skip[s+1]  = skip[s] | chain[0];
    assign y[HI -: K] = skip[s] ? '0 : ys;
  end

  assign found = skip[NS];

  initial begin
    assert (N % K == 0 && K % T == 0)
      else $error("zero_seq_detector_acc: K must divide N and T must divide K");
  end

endmodule
