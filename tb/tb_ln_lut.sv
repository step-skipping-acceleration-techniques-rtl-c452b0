// Test of ln_lut at N = 40: every entry of both tables is compared with the
// double-precision value of ln(1 + 2^-i) or -ln(1 - 2^-i) scaled by 2^N, within
// one unit in the last place, and indices out of range must read 0.
module tb_ln_lut;
  localparam int N = 40;
  localparam int IW = $clog2(N + 1);
  logic [IW-1:0] idx;
  logic minus;
  logic [N+1:0] val;
  int checks = 0, failures = 0;

  ln_lut #(.N(N)) dut (.idx(idx), .minus(minus), .val(val));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int i = 0; i <= N + 1 && i < (1 << IW); i++) begin
        real r, got;
        idx = IW'(i); minus = m[0];
        #1;
        if (i == 0 || i > N) r = 0.0;
        else if (m == 0) r = $ln(1.0 + 2.0 ** (-i)) * 2.0 ** N;
        else             r = -$ln(1.0 - 2.0 ** (-i)) * 2.0 ** N;
        got = real'(val);
        checks++;
        if (got - r > 1.0 || r - got > 1.0) begin
          failures++;
          $display("FAIL i=%0d minus=%0d val=%0d exp=%f", i, m, val, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
