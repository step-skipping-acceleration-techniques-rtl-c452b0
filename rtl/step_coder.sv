// Next-step coding: one-hot detector output to binary step number.
//
// The detectors deliver a one-hot vector whose bit N-1 stands for position 1 (the
// leftmost bit) and bit 0 for position N. This coder is a plain OR-plane encoder:
// code bit b is the OR of every one-hot line whose position number has bit b set,
// so it needs no priority logic. With no line set, code is 0 and valid is 0.
// Combinational.
//
// The coder's existence and role follow the published next-step coding figure;
// its internal form and the position numbering are this design's choice.
module step_coder #(
  parameter int unsigned N  = 512,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  onehot,
  output logic [CW-1:0] code,
  output logic          valid
);

  always_comb begin
    code = '0;
    for (int k = 0; k < N; k++) begin
      if (onehot[k]) code = code | CW'(N - k);
    end
  end

  assign valid = |onehot;

endmodule
