// Sweep of the detector configurations of the published evaluation: the
// accelerated end-of-0-sequence and end-of-1-sequence detectors at every
// (N, K) pair of the timing tables (N = 16..512, K = 4..128, T = 4), and the
// straight cell chains (one module of width N, no slicing) at N = 16..512.
// Each configuration gets 300 random vectors whose first 1 (first 0) is placed at
// a random position with random bits behind it, and is compared with a
// left-to-right scan.
module tb_detector_configs;
  localparam int NC = 17;
  localparam int CN [NC] = '{16, 32, 32, 64, 64, 128, 128, 128, 256, 256, 256, 256,
                             512, 512, 512, 512, 512};
  localparam int CK [NC] = '{4, 4, 8, 8, 16, 8, 16, 32, 8, 16, 32, 64,
                             8, 16, 32, 64, 128};
  localparam int NS = 6;
  localparam int SN [NS] = '{16, 32, 64, 128, 256, 512};

  int checks = 0, failures = 0, finished = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NC + NS; c++) begin : g_cfg
    localparam int N = (c < NC) ? CN[c] : SN[c - NC];
    localparam int K = (c < NC) ? CK[c] : SN[c - NC];
    logic [N-1:0] x, y0, y1;
    logic f0, f1;
    if (c < NC) begin : g_acc
      zero_seq_detector_acc #(.N(N), .K(K), .T(4)) u0 (.x(x), .y(y0), .found(f0));
      one_seq_detector_acc  #(.N(N), .K(K), .T(4)) u1 (.x(x), .y(y1), .found(f1));
    end else begin : g_straight
      logic s0, s1;
      zero_seq_module #(.T(N)) u0 (.x(x), .seen_in(1'b0), .y(y0), .seen_out(s0));
      one_seq_module  #(.T(N)) u1 (.x(x), .ones_in(1'b1), .y(y1), .ones_out(s1));
      assign f0 = s0;
      assign f1 = ~s1;
    end

    function automatic logic [N-1:0] first1(logic [N-1:0] v);
      for (int k = N - 1; k >= 0; k--) if (v[k]) return N'(1) << k;
      return '0;
    endfunction

    initial begin
      #1;
      for (int n = 0; n < 300; n++) begin
        logic [N-1:0] v;
        int p = $urandom_range(N - 1);
        for (int w = 0; w < N / 16; w++) v[w*16 +: 16] = 16'($urandom);
        v = (n % 2) ? (v >> p) : ~(~v >> p);
        if (n == 0) v = '0;
        if (n == 1) v = '1;
        x = v;
        #1;
        checks++;
        if (y0 !== first1(v) || f0 !== (v != 0) || y1 !== first1(~v) || f1 !== (v != '1)) begin
          failures++;
          $display("FAIL N=%0d K=%0d x=%h", N, K, v);
        end
      end
      finished++;
    end
  end

  initial begin
    wait (finished == NC + NS);
    $display("configurations run: %0d", finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
