// Sequence detector between input and output registers.
//
// The accelerated end-of-0-sequence detector (ONE_SEQ = 0) or end-of-1-sequence
// detector (ONE_SEQ = 1) placed between an N-bit input register and an output
// register holding the one-hot result and the found flag, so that its delay is
// measured from register to register. Latency: x is sampled at one rising edge and
// y/found change at the next one (two-cycle pipeline, one result per cycle).
// The registers have no reset; they only carry data.
//
// Inserting I/O registers around the detectors follows the published measurement
// set-up; the register arrangement in detail is this design's choice.
module seq_detector_ioreg #(
  parameter int unsigned N       = 512,
  parameter int unsigned K       = 64,
  parameter int unsigned T       = 4,
  parameter bit          ONE_SEQ = 1'b0
) (
  input  logic         clk,
  input  logic [N-1:0] x,
  output logic [N-1:0] y,
  output logic         found
);

  logic [N-1:0] x_q, y_d;
  logic         found_d;

  if (ONE_SEQ) begin : g_one
    one_seq_detector_acc #(.N(N), .K(K), .T(T)) u_det (.x(x_q), .y(y_d), .found(found_d));
  end else begin : g_zero
    zero_seq_detector_acc #(.N(N), .K(K), .T(T)) u_det (.x(x_q), .y(y_d), .found(found_d));
  end

  always_ff @(posedge clk) begin
    x_q   <= x;
    y     <= y_d;
    found <= found_d;
  end

endmodule
