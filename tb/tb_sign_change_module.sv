// Exhaustive test of sign_change_module (T = 4): all words, both chain inputs and
// both enable values. With c_in = 0 and en = 1 the result is the negation mod 2^T;
// with c_in = 1 every bit is complemented; with en = 0 x passes unchanged.
module tb_sign_change_module;
  localparam int T = 4;
  logic [T-1:0] x, z, exp_z;
  logic en, c_in, c_out;
  int checks = 0, failures = 0;

  sign_change_module #(.T(T)) dut (.x(x), .en(en), .c_in(c_in), .z(z), .c_out(c_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < 2; c++)
        for (int v = 0; v < (1 << T); v++) begin
          x = T'(v); en = e[0]; c_in = c[0];
          if (!en)      exp_z = x;
          else if (c_in) exp_z = ~x;
          else          exp_z = T'(-v);
          #1;
          checks++;
          if (z !== exp_z || c_out !== (c_in | (v != 0))) begin
            failures++;
            $display("FAIL x=%b en=%b c_in=%b z=%b exp=%b c_out=%b", x, en, c_in, z, exp_z, c_out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
