// tb_inc_by1: exhaustive test of the increment-by-1 converter at W = 2 (the
// width used in the 4x4 multiplier) and W = 5.
module tb_inc_by1;
  logic [1:0] a2, y2; logic i2, c2;
  logic [4:0] a5, y5; logic i5, c5;
  int checks = 0, failures = 0;

  inc_by1          d2 (.a(a2), .inc(i2), .y(y2), .cout(c2));
  inc_by1 #(.W(5)) d5 (.a(a5), .inc(i5), .y(y5), .cout(c5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      a2 = 2'(n); i2 = 1'(n >> 2);
      a5 = 5'(n); i5 = 1'(n >> 5);
      #1;
      checks++;
      if ({c2, y2} != 3'(a2) + 3'(i2)) begin failures++; $display("FAIL w2 %0d+%0d", a2, i2); end
      checks++;
      if ({c5, y5} != 6'(a5) + 6'(i5)) begin failures++; $display("FAIL w5 %0d+%0d", a5, i5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
