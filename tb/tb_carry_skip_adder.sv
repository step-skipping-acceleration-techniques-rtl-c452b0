// Test of carry_skip_adder at its default W = 32, S = 8 and at W = 37 (short last
// group). Random operands are mixed with operands whose groups all propagate
// (y = ~x with a few bits changed), so that carries pass the group multiplexers.
module tb_carry_skip_adder;
  localparam int W = 32, W2 = 37;
  logic [W-1:0]  x, y, z;
  logic [W2-1:0] x2, y2, z2;
  logic c_in, c_out, c_out2;
  int checks = 0, failures = 0;

  carry_skip_adder dut (.x(x), .y(y), .c_in(c_in), .z(z), .c_out(c_out));
  carry_skip_adder #(.W(W2), .S(8)) dut2 (.x(x2), .y(y2), .c_in(c_in), .z(z2), .c_out(c_out2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [W:0] s;
      logic [W2:0] s2;
      x  = $urandom;
      x2 = {$urandom, $urandom};
      case (n % 3)
        0: begin y = $urandom; y2 = {$urandom, $urandom}; end
        1: begin y = ~x; y2 = ~x2; end
        default: begin
          y  = ~x  ^ (W'(1)  << $urandom_range(W - 1));
          y2 = ~x2 ^ (W2'(1) << $urandom_range(W2 - 1));
        end
      endcase
      c_in = $urandom_range(1);
      #1;
      s  = {1'b0, x} + {1'b0, y} + c_in;
      s2 = {1'b0, x2} + {1'b0, y2} + c_in;
      checks++;
      if ({c_out, z} !== s) begin
        failures++;
        $display("FAIL %h + %h + %b = %b_%h exp %h", x, y, c_in, c_out, z, s);
      end
      checks++;
      if ({c_out2, z2} !== s2) begin
        failures++;
        $display("FAIL(37) %h + %h + %b = %b_%h exp %h", x2, y2, c_in, c_out2, z2, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
