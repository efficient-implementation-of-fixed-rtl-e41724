// tb_mm_mult_array: self-checking test of the operand gating and the four 16x16
// multipliers: each enabled multiplier must give its half-operand product and
// each disabled one zero, for random operands and random enable patterns.
module tb_mm_mult_array;
  import vedic_pkg::*;
  logic [31:0] a, b;
  logic [3:0] vm_en;
  mm_pp_t pp;
  int checks = 0, failures = 0;

  mm_mult_array dut (.a(a), .b(b), .vm_en(vm_en), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] exp [4];
      a = $urandom; b = $urandom; vm_en = 4'(n);
      if (n < 16) begin a = '1; b = '1; end
      #1;
      exp[0] = 32'(a[15:0])  * 32'(b[15:0]);
      exp[1] = 32'(a[31:16]) * 32'(b[15:0]);
      exp[2] = 32'(a[15:0])  * 32'(b[31:16]);
      exp[3] = 32'(a[31:16]) * 32'(b[31:16]);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (pp[k] !== (vm_en[k] ? exp[k] : 32'd0)) begin
          failures++;
          $display("FAIL k=%0d en=%b a=%h b=%h pp=%h", k, vm_en, a, b, pp[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
