// Random and directed test of one_seq_detector_acc (N = 64, K = 16, T = 4).
// Each vector has its first 0 at a chosen position (all 1 to its left) and random
// bits to the right, against a left-to-right scan for the first 0.
module tb_one_seq_detector_acc;
  localparam int N = 64, K = 16, T = 4;
  logic [N-1:0] x, y, exp_y;
  logic found;
  int checks = 0, failures = 0;

  one_seq_detector_acc #(.N(N), .K(K), .T(T)) dut (.x(x), .y(y), .found(found));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    bit s = 1;
    exp_y = '0;
    for (int k = N - 1; k >= 0; k--) begin
      if (!x[k] && s) exp_y[k] = 1'b1;
      s = s & x[k];
    end
    #1;
    checks++;
    if (y !== exp_y || found !== (x != '1)) begin
      failures++;
      $display("FAIL x=%h y=%h exp=%h found=%b", x, y, exp_y, found);
    end
  endtask

  initial begin
    x = '0; check();
    x = '1; check();
    for (int p = 0; p < N; p++) begin
      x = ~(N'(1) << p); check();
    end
    for (int n = 0; n < 2000; n++) begin
      int p = $urandom_range(N - 1);
      x = {$urandom, $urandom};
      x = (x & ((N'(1) << p) - 1)) | ~((N'(1) << (p + 1)) - 1);
      if (p == N - 1) x = x & ~(N'(1) << p);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
