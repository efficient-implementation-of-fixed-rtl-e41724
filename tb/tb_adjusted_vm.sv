// tb_adjusted_vm: self-checking test of the Adjusted Vedic multiplier.
// The default 32x32 instance is checked against a*b with random and extreme
// operands; 4x4 and 8x8 instances exhaustively; 16x16 with random operands.
module tb_adjusted_vm;
  logic [31:0] a32, b32; logic [63:0] p32;
  logic [15:0] a16, b16; logic [31:0] p16;
  logic [7:0]  a8,  b8;  logic [15:0] p8;
  logic [3:0]  a4,  b4;  logic [7:0]  p4;
  int checks = 0, failures = 0;

  adjusted_vm           d32 (.a(a32), .b(b32), .p(p32));
  adjusted_vm #(.N(16)) d16 (.a(a16), .b(b16), .p(p16));
  adjusted_vm #(.N(8))  d8  (.a(a8),  .b(b8),  .p(p8));
  adjusted_vm #(.N(4))  d4  (.a(a4),  .b(b4),  .p(p4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 4x4 and 8x8: all operand pairs
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p8 != 16'(i * j)) begin failures++; $display("FAIL 8x8 %0d*%0d=%0d", i, j, p8); end
        if (i < 16 && j < 16) begin
          checks++;
          if (p4 != 8'(i * j)) begin failures++; $display("FAIL 4x4 %0d*%0d=%0d", i, j, p4); end
        end
      end
    end
    // 16x16 and 32x32: random plus extremes
    for (int n = 0; n < 20000; n++) begin
      a32 = $urandom; b32 = $urandom;
      case (n)
        0: begin a32 = '1; b32 = '1; end
        1: begin a32 = '1; b32 = 1; end
        2: begin a32 = 32'h8000_0000; b32 = 32'hFFFF_FFFF; end
        3: begin a32 = 32'h0000_FFFF; b32 = 32'hFFFF_0000; end
        default: ;
      endcase
      a16 = a32[31:16] ^ b32[15:0]; b16 = b32[31:16];
      if (n == 0) begin a16 = '1; b16 = '1; end
      #1;
      checks++;
      if (p32 != 64'(a32) * 64'(b32)) begin
        failures++; $display("FAIL 32x32 %h*%h=%h", a32, b32, p32);
      end
      checks++;
      if (p16 != 32'(a16) * 32'(b16)) begin
        failures++; $display("FAIL 16x16 %h*%h=%h", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
