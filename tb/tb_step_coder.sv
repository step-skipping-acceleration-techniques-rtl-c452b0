// Test of step_coder at its default width: every one-hot position must code to
// its position number counted from the left (bit N-1 is position 1), and an
// all-zero input to code 0 with valid low.
module tb_step_coder;
  localparam int N = 512;
  localparam int CW = $clog2(N + 1);
  logic [N-1:0] oh;
  logic [CW-1:0] code;
  logic valid;
  int checks = 0, failures = 0;

  step_coder #(.N(N)) dut (.onehot(oh), .code(code), .valid(valid));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oh = '0; #1;
    checks++;
    if (code !== '0 || valid !== 1'b0) begin failures++; $display("FAIL zero input"); end
    for (int pos = 1; pos <= N; pos++) begin
      oh = '0; oh[N - pos] = 1'b1; #1;
      checks++;
      if (int'(code) != pos || valid !== 1'b1) begin
        failures++;
        $display("FAIL pos=%0d code=%0d valid=%b", pos, code, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
