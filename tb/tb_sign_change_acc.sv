// Test of sign_change_acc at W = 40, K = 16, T = 4 (the top slice is 8 bits wide).
// Operands with a random number of trailing zeros place the rightmost 1 in every
// slice, so the OR skip chain decides the upper slices. Expected: z = -x mod 2^W
// when en = 1, z = x when en = 0.
module tb_sign_change_acc;
  localparam int W = 40, K = 16, T = 4;
  logic [W-1:0] x, z, exp_z;
  logic en;
  int checks = 0, failures = 0, skipped = 0;

  sign_change_acc #(.W(W), .K(K), .T(T)) dut (.x(x), .en(en), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    exp_z = en ? (~x + 1'b1) : x;
    #1;
    checks++;
    if (z !== exp_z) begin
      failures++;
      $display("FAIL x=%h en=%b z=%h exp=%h", x, en, z, exp_z);
    end
  endtask

  initial begin
    en = 1; x = '0; check();
    x = W'(1) << (W - 1); check();
    // sparse operands: one 1 low, at most one 1 in the top bit, empty slices between
    for (int tz = 0; tz < W; tz++) begin
      x = W'(1) << tz; check();
      x = (W'(1) << tz) | (W'(1) << (W - 1)); check();
    end
    for (int n = 0; n < 3000; n++) begin
      int tz = $urandom_range(W - 1);
      x = {$urandom, $urandom};
      x = (x >> tz) << tz;
      x[tz] = 1'b1;
      en = ($urandom_range(3) != 0);
      if (en && tz < W - K) skipped++;
      check();
    end
    if (skipped == 0) begin failures++; $display("FAIL skip never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
