// Exhaustive test of one_seq_module (T = 4): every input word with both chain
// inputs, against a left-to-right scan for the first 0.
module tb_one_seq_module;
  localparam int T = 4;
  logic [T-1:0] x, y, exp_y;
  logic ones_in, ones_out, exp_ones;
  int checks = 0, failures = 0;

  one_seq_module #(.T(T)) dut (.x(x), .ones_in(ones_in), .y(y), .ones_out(ones_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < (1 << T); v++) begin
        bit s;
        x = T'(v); ones_in = c[0];
        s = c[0]; exp_y = '0;
        for (int k = T - 1; k >= 0; k--) begin
          if (!x[k] && s) exp_y[k] = 1'b1;
          s = s & x[k];
        end
        exp_ones = s;
        #1;
        checks++;
        if (y !== exp_y || ones_out !== exp_ones) begin
          failures++;
          $display("FAIL x=%b ones_in=%b y=%b exp=%b ones_out=%b", x, ones_in, y, exp_y, ones_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
