// Exhaustive test of zero_seq_module (T = 4): every input word with both chain
// inputs. Expected one-hot and chain output are worked out by a left-to-right scan.
module tb_zero_seq_module;
  localparam int T = 4;
  logic [T-1:0] x, y, exp_y;
  logic seen_in, seen_out, exp_seen;
  int checks = 0, failures = 0;

  zero_seq_module #(.T(T)) dut (.x(x), .seen_in(seen_in), .y(y), .seen_out(seen_out));

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
        x = T'(v); seen_in = c[0];
        s = c[0]; exp_y = '0;
        for (int k = T - 1; k >= 0; k--) begin
          if (x[k] && !s) begin exp_y[k] = 1'b1; s = 1'b1; end
        end
        exp_seen = c[0] | (v != 0);
        #1;
        checks++;
        if (y !== exp_y || seen_out !== exp_seen) begin
          failures++;
          $display("FAIL x=%b seen_in=%b y=%b exp=%b seen_out=%b", x, seen_in, y, exp_y, seen_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
