// Step-skipping logarithm unit: y = ln(x) for x in [1/2, 2).
//
// Multiplicative normalisation with one shift and one add per step: the auxiliary
// value x(i) is driven towards 1 by x(i+1) = x(i) + a(i)*x(i)*2^-i, and the result
// by y(i+1) = y(i) - ln(1 + a(i)*2^-i), so that y ends at ln(x). The digit is
//     x(i) > 1 :  a(i) = -x_i(i)
//     x(i) < 1 :  a(i) = +x_i(i) AND NOT x_(i+1)(i)
// where x_k is fraction bit k (x = x_0 . x_1 x_2 ... x_N). Most steps have a(i) = 0
// and change nothing, so instead of visiting them this unit uses the sequence
// detectors to jump straight to the next step whose digit is not zero:
//   * x_0 = 1: the end-of-0-sequence detector, fed with the fraction bits at
//     positions >= i, marks the first 1; every step before it has a = 0 and the
//     marked step j has a(j) = -1.
//   * x_0 = 0: the end-of-1-sequence detector, fed with bits x_2 .. x_N (and a 1
//     beyond x_N), positions below i+1 forced to 1, marks the first 0 at x_(j+1);
//     steps i .. j-1 have a = 0 and step j has a(j) = +1 provided x_j = 1. In the
//     rare case j = i with x_i = 0, a(i) = 0 and the unit only advances i by one.
// The step coder turns the mark into j, which sets the barrel shift x >> j and
// the table index. The sign change circuit negates the shifted operand when
// a = -1 (x path) or the table entry when a = +1 (y path), and two carry-skip
// adders complete the step. So every clock cycle performs one non-zero step.
// The run stops when x = 1 exactly, when no further non-zero step exists, or
// after step N. The result is exactly that of visiting every step i = 1..N.
//
// Interface: pulse start with x_in (1 integer bit, N fraction bits, x_in >= 1/2)
// while busy is low. busy stays high while steps run; done pulses for one cycle
// when y_out (two's complement, 2 integer bits, N fraction bits) and x_out (the
// final auxiliary value) are valid; they hold until the next start. steps counts
// the working cycles of the last run. Latency: 1 + (number of non-zero steps) +
// 1 cycles from start to done. Synchronous active-low reset.
//
// The recurrences, digit rules, table of ln(1 +- 2^-i) and the use of the
// detectors and the coder to skip a(i) = 0 steps follow the published algorithm;
// the one-step-per-cycle controller, the number formats, the handling of the last
// bit (treated as followed by a 1, so no +1 step at i = N), the fallback for
// x_i = 0 and the choice of the sign change circuit and carry-skip adders as the
// datapath are this design's choices.
module ln_step_skip
  import step_skip_pkg::*;
#(
  parameter int unsigned N      = 512,   // fraction bits = detector width
  parameter int unsigned K0     = 64,    // end-of-0-sequence slice width
  parameter int unsigned K1     = 128,   // end-of-1-sequence slice width
  parameter int unsigned T      = 4,     // detector / sign change module width
  parameter int unsigned ADD_S  = 16,    // carry-skip group size
  parameter int unsigned SC_K   = 16,    // sign change slice width
  localparam int unsigned XW    = N + 1,
  localparam int unsigned YW    = N + 2,
  localparam int unsigned IW    = $clog2(N + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] x_in,
  output logic          busy,
  output logic          done,
  output logic [YW-1:0] y_out,
  output logic [XW-1:0] x_out,
  output logic [IW-1:0] steps
);

  localparam int unsigned CW = $clog2(N + 1);                 // step coder width
  localparam logic [XW-1:0] ONE = XW'(1) << N;

  ln_state_e     state;
  logic [XW-1:0] x_r;
  logic [YW-1:0] y_r;
  logic [IW-1:0] i_r;

  // ---------------------------------------------------------------- step search
  logic [N-1:0] frac, mask_ge, det0_in, det1_in, det0_y, det1_y, sel_y;
  logic         det0_found, det1_found, found, gt_one, fallback, finish;
  logic [CW-1:0] j_code;
  logic          j_valid;
  digit_e        digit;

  assign frac   = x_r[N-1:0];
  assign gt_one = x_r[N];                // x_0

  // mask_ge[k] is 1 where fraction bit k (position N-k) is at a position >= i
  always_comb begin
    for (int k = 0; k < N; k++) mask_ge[k] = (k + int'(i_r) <= int'(N));
  end

  assign det0_in = frac & mask_ge;
  // bit k holds x at position N-k+1, so that the first 0 at position j+1 marks j
  assign det1_in = {frac[N-2:0], 1'b1} | ~mask_ge;

  zero_seq_detector_acc #(.N(N), .K(K0), .T(T)) u_det0 (
    .x(det0_in), .y(det0_y), .found(det0_found)
  );
  one_seq_detector_acc #(.N(N), .K(K1), .T(T)) u_det1 (
    .x(det1_in), .y(det1_y), .found(det1_found)
  );

  assign sel_y = gt_one ? det0_y : det1_y;
  assign found = gt_one ? det0_found : det1_found;

  step_coder #(.N(N)) u_coder (.onehot(sel_y), .code(j_code), .valid(j_valid));

  always_comb begin
    fallback = 1'b0;
    if (gt_one) digit = A_MINUS;
    else if (IW'(j_code) == i_r && !frac[N - int'(i_r)]) begin
      digit    = A_ZERO;
      fallback = 1'b1;
    end else digit = A_PLUS;
  end

  assign finish = (x_r == ONE) || !found || (i_r > IW'(N));

  // ------------------------------------------------------------------ datapath
  logic [XW-1:0] x_sh, x_next;
  logic [XW-1:0] x_op;
  logic [YW-1:0] lut_val, y_op, y_next;
  logic          x_co, y_co;

  assign x_sh = x_r >> j_code;

  sign_change_acc #(.W(XW), .K(SC_K), .T(T)) u_neg_x (
    .x(x_sh), .en(digit == A_MINUS), .z(x_op)
  );
  carry_skip_adder #(.W(XW), .S(ADD_S)) u_add_x (
    .x(x_r), .y(x_op), .c_in(1'b0), .z(x_next), .c_out(x_co)
  );

  ln_lut #(.N(N)) u_lut (.idx(j_code), .minus(digit == A_MINUS), .val(lut_val));

  // a = +1 subtracts ln(1+2^-i); a = -1 adds -ln(1-2^-i)
  sign_change_acc #(.W(YW), .K(SC_K), .T(T)) u_neg_y (
    .x(lut_val), .en(digit == A_PLUS), .z(y_op)
  );
  carry_skip_adder #(.W(YW), .S(ADD_S)) u_add_y (
    .x(y_r), .y(y_op), .c_in(1'b0), .z(y_next), .c_out(y_co)
  );

  // ---------------------------------------------------------------- controller
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= LN_IDLE;
      x_r   <= ONE;
      y_r   <= '0;
      i_r   <= IW'(1);
      steps <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        LN_IDLE: if (start) begin
          x_r   <= x_in;
          y_r   <= '0;
          i_r   <= IW'(1);
          steps <= '0;
          state <= LN_RUN;
        end
        LN_RUN: begin
          if (finish) begin
            done  <= 1'b1;
            state <= LN_IDLE;
          end else begin
            steps <= steps + 1'b1;
            if (fallback) i_r <= i_r + 1'b1;
            else begin
              x_r <= x_next;
              y_r <= y_next;
              i_r <= IW'(j_code) + 1'b1;
            end
          end
        end
        default: state <= LN_IDLE;
      endcase
    end
  end

  assign busy  = (state == LN_RUN);
  assign y_out = y_r;
  assign x_out = x_r;

  // ----------------------------------------------------------------- checks
  a_arg_range: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state == LN_IDLE) |-> (x_in[N] || x_in[N-1]))
    else $error("ln_step_skip: argument below 1/2");
  a_skip_forward: assert property (@(posedge clk) disable iff (!rst_n)
    (state == LN_RUN && !finish && !fallback) |-> (IW'(j_code) >= i_r && j_valid))
    else $error("ln_step_skip: detector pointed at a step already passed");

endmodule
