// Step-skipping circuits, top level.
//
// Two independent parts stand side by side:
//   * ln_step_skip: the logarithm unit, which uses the accelerated end-of-0 and
//     end-of-1 sequence detectors, the step coder, the accelerated sign change
//     circuit, carry-skip adders and the ln(1 +- 2^-i) table to compute ln(x) with
//     one clock cycle per non-zero normalisation step. Ports ln_*.
//   * two seq_detector_ioreg instances: the accelerated end-of-0-sequence (slice
//     width K0) and end-of-1-sequence (slice width K1) detectors of width N between
//     input and output registers, the configuration used for register-to-register
//     timing. They share the input det_x. Ports det*.
// Defaults are the largest size evaluated (N = 512) with the fastest slice widths
// reported for it with I/O registers (K0 = 64, K1 = 128); the module width T = 4 is
// this design's choice. Single clock, synchronous active-low reset for the
// logarithm unit.
module step_skip_top #(
  parameter int unsigned N  = 512,
  parameter int unsigned K0 = 64,
  parameter int unsigned K1 = 128,
  parameter int unsigned T  = 4,
  localparam int unsigned IW = $clog2(N + 2)
) (
  input  logic         clk,
  input  logic         rst_n,
  // logarithm unit
  input  logic         ln_start,
  input  logic [N:0]   ln_x,
  output logic         ln_busy,
  output logic         ln_done,
  output logic [N+1:0] ln_y,
  output logic [N:0]   ln_xf,
  output logic [IW-1:0] ln_steps,
  // registered detectors
  input  logic [N-1:0] det_x,
  output logic [N-1:0] det0_y,
  output logic         det0_found,
  output logic [N-1:0] det1_y,
  output logic         det1_found
);

  ln_step_skip #(.N(N), .K0(K0), .K1(K1), .T(T)) u_ln (
    .clk(clk), .rst_n(rst_n), .start(ln_start), .x_in(ln_x),
    .busy(ln_busy), .done(ln_done), .y_out(ln_y), .x_out(ln_xf), .steps(ln_steps)
  );

  seq_detector_ioreg #(.N(N), .K(K0), .T(T), .ONE_SEQ(1'b0)) u_det0 (
    .clk(clk), .x(det_x), .y(det0_y), .found(det0_found)
  );

  seq_detector_ioreg #(.N(N), .K(K1), .T(T), .ONE_SEQ(1'b1)) u_det1 (
    .clk(clk), .x(det_x), .y(det1_y), .found(det1_found)
  );

endmodule
