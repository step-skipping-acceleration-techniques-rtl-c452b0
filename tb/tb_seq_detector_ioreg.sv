// Test of seq_detector_ioreg in both variants (N = 64, K = 16, T = 4): a new
// random vector is applied every cycle and the registered result must appear two
// rising edges later, equal to a left-to-right scan for the first 1 (variant 0)
// or the first 0 (variant 1).
module tb_seq_detector_ioreg;
  localparam int N = 64, K = 16, T = 4;
  logic clk = 0;
  logic [N-1:0] x, y0, y1;
  logic f0, f1;
  logic [N-1:0] hist [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_detector_ioreg #(.N(N), .K(K), .T(T), .ONE_SEQ(1'b0)) dut0 (.clk(clk), .x(x), .y(y0), .found(f0));
  seq_detector_ioreg #(.N(N), .K(K), .T(T), .ONE_SEQ(1'b1)) dut1 (.clk(clk), .x(x), .y(y1), .found(f1));

  function automatic logic [N-1:0] first1(logic [N-1:0] v);
    for (int k = N - 1; k >= 0; k--) if (v[k]) return N'(1) << k;
    return '0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [N-1:0] v;
      int p = $urandom_range(N - 1);
      v = {$urandom, $urandom};
      if (n % 2) v = v >> p; else v = ~(~v >> p);
      x <= v;
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = v;
      #1;
      if (n >= 2) begin
        checks++;
        if (y0 !== first1(hist[1]) || f0 !== (hist[1] != 0) ||
            y1 !== first1(~hist[1]) || f1 !== (hist[1] != '1)) begin
          failures++;
          $display("FAIL v=%h y0=%h y1=%h", hist[1], y0, y1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
