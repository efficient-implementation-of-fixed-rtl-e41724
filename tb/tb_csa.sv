// tb_csa: self-checking test of the carry-save adder at W = 32 and W = 4.
// Checks s == x^y^z bitwise and x + y + z == s + 2*c for random and edge vectors.
module tb_csa;
  logic [31:0] x, y, z, s, c;
  logic [3:0]  x4, y4, z4, s4, c4;
  int checks = 0, failures = 0;

  csa #(.W(32)) dut   (.x(x), .y(y), .z(z), .s(s), .c(c));
  csa #(.W(4))  dut4  (.x(x4), .y(y4), .z(z4), .s(s4), .c(c4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      if (n == 0) begin x = '1; y = '1; z = '1; end
      else begin x = $urandom; y = $urandom; z = $urandom; end
      x4 = 4'(n); y4 = 4'(n >> 4); z4 = 4'(n >> 8);
      #1;
      checks++;
      if ({2'b0, x} + {2'b0, y} + {2'b0, z} != {2'b0, s} + {1'b0, c, 1'b0} || s != (x ^ y ^ z)) begin
        failures++;
        $display("FAIL32 %h %h %h -> s=%h c=%h", x, y, z, s, c);
      end
      checks++;
      if (6'(x4) + 6'(y4) + 6'(z4) != 6'(s4) + 6'({c4, 1'b0})) begin
        failures++;
        $display("FAIL4 %h %h %h -> s=%h c=%h", x4, y4, z4, s4, c4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
