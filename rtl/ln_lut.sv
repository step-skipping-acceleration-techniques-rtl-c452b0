// Logarithm constant table: ln(1 + 2^-i) and -ln(1 - 2^-i) for i = 1..N.
//
// These are the values ln c(i) that the logarithm unit subtracts from its result
// register at step i. Each entry is an unsigned fixed-point number with N fraction
// bits and two integer bits (both always 0, the values are below 0.7), so it adds
// straight onto the N+2 bit result. The table is computed at elaboration by the
// constant function ln_entry() from the series
//     ln(1 + u)  = u - u^2/2 + u^3/3 - ...
//    -ln(1 - u)  = u + u^2/2 + u^3/3 + ...     with u = 2^-i,
// evaluated with G = 16 guard bits (term k is 2^(N+G-i*k) / k, truncated) and
// rounded to nearest. The result is a read-only table, indexed combinationally.
//
// idx   : step number i (1..N); any other value reads 0
// minus : 0 reads ln(1 + 2^-i), 1 reads -ln(1 - 2^-i)
// val   : entry, N fraction bits
//
// That a table of ln(1 +- 2^-i) is read at each step follows the published
// algorithm; the number format and the way the table is computed are this
// design's choice.
module ln_lut #(
  parameter int unsigned N  = 512,
  localparam int unsigned IW = $clog2(N + 1),
  localparam int unsigned VW = N + 2
) (
  input  logic [IW-1:0] idx,
  input  logic          minus,
  output logic [VW-1:0] val
);

  localparam int unsigned G  = 16;        // guard bits
  localparam int unsigned FW = N + G + 1; // working width: 1 integer bit

  function automatic logic [VW-1:0] ln_entry(int unsigned i, bit neg);
    logic [FW-1:0] acc, term, one;
    one = FW'(1);
    acc = '0;
    for (int unsigned k = 1; i * k <= N + G; k++) begin
      term = (one << (N + G - i * k)) / FW'(k);
      if (neg || (k % 2 == 1)) acc = acc + term;
      else                     acc = acc - term;
    end
    acc = acc + (one << (G - 1));         // round to nearest
    return VW'(acc >> G);
  endfunction

  logic [VW-1:0] tab_p [N+1];
  logic [VW-1:0] tab_m [N+1];

  assign tab_p[0] = '0;
  assign tab_m[0] = '0;
  for (genvar i = 1; i <= N; i++) begin : g_entry
    localparam logic [VW-1:0] LP = ln_entry(i, 1'b0);
    localparam logic [VW-1:0] LM = ln_entry(i, 1'b1);
    assign tab_p[i] = LP;
    assign tab_m[i] = LM;
  end

  always_comb begin
    if (idx >= IW'(1) && idx <= IW'(N)) val = minus ? tab_m[idx] : tab_p[idx];
    else                                val = '0;
  end

endmodule
