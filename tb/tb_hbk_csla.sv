// tb_hbk_csla: self-checking test of the hybrid Brent-Kung / carry-select adder.
// Widths 64 (default), 32, 8, 3 and 1 are checked against the + operator with
// random operands, random carry in, and carry-chain edge cases (all ones + 1).
module tb_hbk_csla;
  logic [63:0] a64, b64, s64;  logic c64, ci64;
  logic [31:0] a32, b32, s32;  logic c32, ci32;
  logic [7:0]  a8,  b8,  s8;   logic c8,  ci8;
  logic [2:0]  a3,  b3,  s3;   logic c3,  ci3;
  logic [0:0]  a1,  b1,  s1;   logic c1,  ci1;
  int checks = 0, failures = 0;

  hbk_csla          d64 (.a(a64), .b(b64), .cin(ci64), .s(s64), .cout(c64));
  hbk_csla #(.W(32)) d32 (.a(a32), .b(b32), .cin(ci32), .s(s32), .cout(c32));
  hbk_csla #(.W(8))  d8  (.a(a8),  .b(b8),  .cin(ci8),  .s(s8),  .cout(c8));
  hbk_csla #(.W(3))  d3  (.a(a3),  .b(b3),  .cin(ci3),  .s(s3),  .cout(c3));
  hbk_csla #(.W(1))  d1  (.a(a1),  .b(b1),  .cin(ci1),  .s(s1),  .cout(c1));

  task automatic chk(input string nm, input logic [64:0] got, input logic [64:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", nm, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; ci64 = 1'($urandom);
      if (n == 0) begin a64 = '1; b64 = '0; ci64 = 1; end
      if (n == 1) begin a64 = '1; b64 = '1; ci64 = 1; end
      if (n == 2) begin a64 = 64'h0000_0000_FFFF_FFFF; b64 = 1; ci64 = 0; end
      // sparse bit patterns to exercise long propagate chains
      if (n % 7 == 3) b64 = ~a64;
      a32 = a64[31:0]; b32 = b64[63:32]; ci32 = ci64;
      if (n % 5 == 4) b32 = ~a32;
      a8 = 8'(n); b8 = 8'(n >> 8); ci8 = 1'(n >> 16);
      a3 = 3'(n); b3 = 3'(n >> 3); ci3 = 1'(n >> 6);
      a1 = 1'(n); b1 = 1'(n >> 1); ci1 = 1'(n >> 2);
      #1;
      chk("w64", {c64, s64}, 65'(a64) + 65'(b64) + 65'(ci64));
      chk("w32", 65'({c32, s32}), 65'(a32) + 65'(b32) + 65'(ci32));
      chk("w8",  65'({c8, s8}),   65'(a8) + 65'(b8) + 65'(ci8));
      chk("w3",  65'({c3, s3}),   65'(a3) + 65'(b3) + 65'(ci3));
      chk("w1",  65'({c1, s1}),   65'(a1) + 65'(b1) + 65'(ci1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
