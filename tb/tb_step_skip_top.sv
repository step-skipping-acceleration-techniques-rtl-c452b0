// End-to-end test of step_skip_top at its default size (N = 512, K0 = 64,
// K1 = 128, T = 4).
//
// Logarithm unit: for directed and random arguments in [1/2, 2) the testbench
// replays the plain algorithm (every step i = 1..N) on the auxiliary value, which
// must match x_out bit for bit; it accumulates its own table values, computed
// from ln(1+u) = 2*atanh(u/(2+u)) and -ln(1-u) = 2*atanh(u/(2-u)) with 32 guard
// bits (a different series from the one in the design), and y_out must lie within
// one unit in the last place per step of that sum; y_out must also agree with the
// double-precision ln(x), and the latency must be steps + 2 cycles.
// Registered detectors: random vectors every cycle, results two edges later.
// Mechanisms counted (each must occur): multi-step jumps with x > 1 and with
// x < 1, x crossing 1 in both directions during a run, stop on x = 1, stop with no
// further non-zero step, negation of the shifted operand (a = -1) and of the
// table value (a = +1), a sign change skip signal crossing a slice, a carry
// crossing a whole adder group through its multiplexer, and the skip chains of
// both registered detectors silencing a later slice.
module tb_step_skip_top;
  import step_skip_pkg::*;
  localparam int N = 512, K0 = 64, K1 = 128;
  localparam int IW = $clog2(N + 2);
  localparam int G = 32;
  localparam int W = N + G + 2;
  localparam int W2 = 2 * W;
  localparam logic [N:0] ONE = (N+1)'(1) << N;

  logic clk = 0, rst_n = 0, ln_start = 0;
  logic [N:0] ln_x, ln_xf;
  logic [N+1:0] ln_y;
  logic ln_busy, ln_done;
  logic [IW-1:0] ln_steps;
  logic [N-1:0] det_x, det0_y, det1_y;
  logic det0_found, det1_found;
  logic det_run = 0;

  int checks = 0, failures = 0;
  int n_jump_gt = 0, n_jump_lt = 0, n_switch = 0, n_switch_up = 0, n_exit_one = 0, n_exit_none = 0;
  int n_minus = 0, n_plus = 0, n_sc_skip = 0, n_carry_skip = 0, n_det0_skip = 0, n_det1_skip = 0;
  longint max_xerr = 0;
  int runs_gt = 0, runs_lt = 0, steps_gt = 0, steps_lt = 0;

  always #5 clk = ~clk;

  step_skip_top dut (
    .clk(clk), .rst_n(rst_n), .ln_start(ln_start), .ln_x(ln_x), .ln_busy(ln_busy),
    .ln_done(ln_done), .ln_y(ln_y), .ln_xf(ln_xf), .ln_steps(ln_steps),
    .det_x(det_x), .det0_y(det0_y), .det0_found(det0_found),
    .det1_y(det1_y), .det1_found(det1_found)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference table
  logic [N+1:0] ref_p [N+1];
  logic [N+1:0] ref_m [N+1];

  // 2*atanh(1/d) with G guard bits, rounded to N fraction bits
  function automatic logic [N+1:0] atanh2(int i, bit minus);
    logic [W-1:0] v, t, acc, d, oneg;
    logic [W2-1:0] prod;
    oneg = W'(1) << (N + G);
    d = (W'(1) << (i + 1));
    d = minus ? d - 1'b1 : d + 1'b1;
    v = oneg / d;                         // v = 1/d
    t = v; acc = '0;
    for (int m = 0; t != 0; m++) begin
      acc = acc + t / W'(2 * m + 1);
      prod = W2'(t) * W2'(v);
      prod = prod >> (N + G);
      prod = prod * W2'(v);
      t = W'(prod >> (N + G));
    end
    acc = acc << 1;
    acc = acc + (W'(1) << (G - 1));
    return (N+2)'(acc >> G);
  endfunction

  // ------------------------------------------------------- mechanism monitors
  logic prev_gt;
  logic prev_run = 0;
  always @(posedge clk) begin
    if (dut.u_ln.state == LN_RUN && !dut.u_ln.finish && !dut.u_ln.fallback) begin
      logic [N:0] pv;
      if (int'(dut.u_ln.j_code) > int'(dut.u_ln.i_r)) begin
        if (dut.u_ln.gt_one) n_jump_gt++; else n_jump_lt++;
      end
      if (dut.u_ln.digit == A_MINUS) begin
        n_minus++;
        // lowest 1 of the shifted operand below the top slice: skip crosses slices
        if (|dut.u_ln.x_sh[N-16:0]) n_sc_skip++;
      end
      if (dut.u_ln.digit == A_PLUS) n_plus++;
      pv = dut.u_ln.x_r ^ dut.u_ln.x_op;
      for (int gi = 0; gi + 16 <= N + 1; gi += 16) if (&pv[gi +: 16]) begin n_carry_skip++; break; end
    end
    if (dut.u_ln.state == LN_RUN && prev_run && prev_gt && !dut.u_ln.gt_one) n_switch++;
    if (dut.u_ln.state == LN_RUN && prev_run && !prev_gt && dut.u_ln.gt_one) n_switch_up++;
    prev_run <= (dut.u_ln.state == LN_RUN);
    prev_gt  <= dut.u_ln.gt_one;
  end

  // ---------------------------------------------------------------- ln runs
  task automatic run_one(logic [N:0] xa);
    logic [N:0] xx = xa;
    logic [N+2:0] yy = '0;                 // exact reference sum, one spare bit
    logic [N+2:0] diff;
    logic [N:0] xerr;
    int nz = 0, cyc = 0;
    real xr, yr, lnr;
    for (int i = 1; i <= N; i++) begin
      bit xi, xi1;
      int a;
      if (xx == ONE) break;
      xi  = xx[N - i];
      xi1 = (i < N) ? xx[N - i - 1] : 1'b1;
      a = xx[N] ? (xi ? -1 : 0) : ((xi && !xi1) ? 1 : 0);
      if (a == 1)  begin xx = xx + (xx >> i); yy = yy - {1'b0, ref_p[i]}; nz++; end
      if (a == -1) begin xx = xx - (xx >> i); yy = yy + {1'b0, ref_m[i]}; nz++; end
    end
    @(negedge clk);
    ln_x = xa; ln_start = 1;
    @(negedge clk);
    ln_start = 0; cyc = 1;
    while (!ln_done) begin @(negedge clk); cyc++; end
    if (ln_xf == ONE) n_exit_one++; else n_exit_none++;
    if (xa[N]) begin runs_gt++; steps_gt += int'(ln_steps); end
    else begin runs_lt++; steps_lt += int'(ln_steps); end
    checks++;
    if (ln_xf !== xx) begin failures++; $display("FAIL x=%h: x_out differs from replay", xa); end
    diff = {ln_y[N+1], ln_y} - yy;
    if (diff[N+2]) diff = -diff;
    checks++;
    if (diff > (N+3)'(nz + 1)) begin
      failures++; $display("FAIL x=%h: y_out off the reference by %0d ulp", xa, diff);
    end
    xerr = (ln_xf > ONE) ? ln_xf - ONE : ONE - ln_xf;
    if (longint'(xerr) > max_xerr) max_xerr = longint'(xerr);
    checks++;
    if (xerr > (N+1)'(4096)) begin failures++; $display("FAIL x=%h: x_out far from 1", xa); end
    xr  = real'(xa[N -: 60]) / 2.0 ** 59;
    lnr = $ln(xr);
    yr  = real'($signed(ln_y[N+1 -: 62])) / 2.0 ** 60;
    checks++;
    if (yr - lnr > 1e-12 || lnr - yr > 1e-12) begin
      failures++; $display("FAIL x=%f y=%.15f ln=%.15f", xr, yr, lnr);
    end
    checks++;
    if (int'(ln_steps) != nz || cyc != int'(ln_steps) + 2) begin
      failures++; $display("FAIL x=%h steps=%0d nonzero=%0d cycles=%0d", xa, ln_steps, nz, cyc);
    end
  endtask

  // ---------------------------------------------------------- detector stream
  function automatic logic [N-1:0] first1(logic [N-1:0] v);
    for (int k = N - 1; k >= 0; k--) if (v[k]) return N'(1) << k;
    return '0;
  endfunction

  function automatic bit later_slice_has1(logic [N-1:0] v, int k);
    for (int b = N - 1; b >= 0; b--) if (v[b]) return |(v & ((N'(1) << ((b / k) * k)) - 1));
    return 0;
  endfunction

  initial begin : det_stream
    logic [N-1:0] hist [3];
    int n = 0;
    wait (det_run);
    while (det_run) begin
      logic [N-1:0] v;
      int p = $urandom_range(N - 1);
      for (int w = 0; w < N / 32; w++) v[w*32 +: 32] = $urandom;
      if (n % 2) v = v >> p; else v = ~(~v >> p);
      det_x <= v;
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = v;
      #1;
      if (n >= 2) begin
        if (later_slice_has1(hist[1], K0)) n_det0_skip++;
        if (later_slice_has1(~hist[1], K1)) n_det1_skip++;
        checks++;
        if (det0_y !== first1(hist[1]) || det0_found !== (hist[1] != 0) ||
            det1_y !== first1(~hist[1]) || det1_found !== (hist[1] != '1)) begin
          failures++; $display("FAIL detectors for %h", hist[1]);
        end
      end
      n++;
    end
  end

  task automatic need(string what, int cnt);
    checks++;
    $display("  %-40s %0d", what, cnt);
    if (cnt == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    ref_p[0] = '0; ref_m[0] = '0;
    for (int i = 1; i <= N; i++) begin
      ref_p[i] = atanh2(i, 1'b0);
      ref_m[i] = atanh2(i, 1'b1);
    end
    ln_x = '0; det_x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    det_run = 1;
    run_one(ONE);
    run_one(ONE >> 1);
    run_one('1);
    run_one(ONE | (ONE >> 1));
    run_one((ONE >> 1) | (ONE >> 2));
    run_one(ONE + 1'b1);
    run_one(ONE - 1'b1);
    for (int n = 0; n < 24; n++) begin
      logic [N:0] v;
      for (int w = 0; w < N / 32; w++) v[w*32 +: 32] = $urandom;
      v[N] = 1'b0;
      v[N] = n[0];
      if (!v[N]) v[N-1] = 1'b1;
      run_one(v);
    end
    det_run = 0;
    @(posedge clk);
    $display("mechanisms:");
    need("multi-step jump while x > 1", n_jump_gt);
    need("multi-step jump while x < 1", n_jump_lt);
    need("switch from x > 1 to x < 1", n_switch);
    need("switch from x < 1 to x > 1", n_switch_up);
    need("stop on x = 1", n_exit_one);
    need("stop with no further non-zero step", n_exit_none);
    need("a = -1 step (operand negated)", n_minus);
    need("a = +1 step (table value negated)", n_plus);
    need("sign change skip across slices", n_sc_skip);
    need("carry across a whole adder group", n_carry_skip);
    need("0-sequence detector slice skip", n_det0_skip);
    need("1-sequence detector slice skip", n_det1_skip);
    $display("largest |x_out - 1| = %0d ulp", max_xerr);
    $display("working cycles per run: x >= 1: %0d runs, mean %0d; x < 1: %0d runs, mean %0d",
             runs_gt, steps_gt / runs_gt, runs_lt, steps_lt / runs_lt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
