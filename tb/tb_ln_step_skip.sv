// Test of ln_step_skip at N = 32 (K0 = 8, K1 = 16, T = 4, 8-bit adder groups and
// sign change slices). For each argument the testbench runs its own model of the
// plain algorithm, visiting every step i = 1..N with the digit rules, and expects:
//   * x_out and y_out bit-exact equal to the model (model table from $ln, rounded),
//   * y_out within 2^-(N-7) of the double-precision ln(x),
//   * steps = number of non-zero digits + single-step advances, and start-to-done
//     latency = steps + 2 cycles.
// Arguments: directed corner values and random values in [1/2, 2).
module tb_ln_step_skip;
  import step_skip_pkg::*;
  localparam int N = 32;
  localparam int IW = $clog2(N + 2);
  localparam logic [N:0] ONE = (N+1)'(1) << N;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N:0] x_in, x_out;
  logic [N+1:0] y_out;
  logic busy, done;
  logic [IW-1:0] steps;
  int checks = 0, failures = 0, fallbacks = 0, skips = 0, total_fallbacks = 0;

  always #5 clk = ~clk;

  ln_step_skip #(.N(N), .K0(8), .K1(16), .T(4), .ADD_S(8), .SC_K(8)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(x_in), .busy(busy), .done(done),
    .y_out(y_out), .x_out(x_out), .steps(steps)
  );

  // observe the controller: single-step advances and multi-step jumps
  always @(posedge clk) if (dut.state == LN_RUN && !dut.finish) begin
    if (dut.fallback) fallbacks++;
    else if (int'(dut.j_code) > int'(dut.i_r)) skips++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lut(int i, int a);
    real r = (a > 0) ? $ln(1.0 + 2.0 ** (-i)) : -$ln(1.0 - 2.0 ** (-i));
    return longint'(r * 2.0 ** N);
  endfunction

  task automatic run_one(logic [N:0] xa);
    logic [N:0] xx = xa;
    logic signed [N+1:0] yy = '0;
    int nz = 0, cyc = 0;
    real xr, lnr, yr;
    for (int i = 1; i <= N; i++) begin
      bit xi, xi1;
      int a;
      if (xx == ONE) break;
      xi  = xx[N - i];
      xi1 = (i < N) ? xx[N - i - 1] : 1'b1;
      a = xx[N] ? (xi ? -1 : 0) : ((xi && !xi1) ? 1 : 0);
      if (a == 1)  begin xx = xx + (xx >> i); yy = yy - (N+2)'(lut(i, 1));  nz++; end
      if (a == -1) begin xx = xx - (xx >> i); yy = yy + (N+2)'(lut(i, -1)); nz++; end
    end
    fallbacks = 0;
    @(negedge clk);
    x_in = xa; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    total_fallbacks += fallbacks;
    checks++;
    if (x_out !== xx) begin failures++; $display("FAIL x=%h x_out=%h exp=%h", xa, x_out, xx); end
    checks++;
    if (y_out !== yy) begin failures++; $display("FAIL x=%h y_out=%h exp=%h", xa, y_out, yy); end
    xr  = real'(xa) / 2.0 ** N;
    lnr = $ln(xr);
    yr  = real'($signed(y_out)) / 2.0 ** N;
    checks++;
    if (yr - lnr > 2.0 ** (7 - N) || lnr - yr > 2.0 ** (7 - N)) begin
      failures++; $display("FAIL x=%f y=%.12f ln=%.12f", xr, yr, lnr);
    end
    checks++;
    if (int'(steps) != nz + fallbacks || cyc != int'(steps) + 2) begin
      failures++;
      $display("FAIL x=%h steps=%0d nonzero=%0d fallbacks=%0d cycles=%0d", xa, steps, nz, fallbacks, cyc);
    end
  endtask

  initial begin
    x_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(ONE);
    run_one(ONE >> 1);                 // 1/2
    run_one('1);                       // 2 - 2^-N
    run_one(ONE | (ONE >> 1));         // 1.5
    run_one((ONE >> 1) | (ONE >> 2));  // 0.75
    run_one(ONE + 1'b1);
    run_one(ONE - 1'b1);
    for (int n = 0; n < 400; n++) begin
      logic [N:0] v = {$urandom, $urandom};
      if (!v[N] && !v[N-1]) v[N-1] = 1'b1;
      run_one(v);
    end
    checks++;
    if (skips == 0) begin failures++; $display("FAIL no step was ever skipped"); end
    $display("multi-step jumps=%0d single-step advances=%0d", skips, total_fallbacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
