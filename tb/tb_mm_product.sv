// tb_mm_product: self-checking test of the partial-product reduction.
// Partial products are made from random 16-bit halves as the multiplier array
// would make them (middle ones zero outside MM_MAC64, pp3 zero in MM_MAC32), and
// the product word is compared with A*B, AL*BL + AH*BH or AL*BL.
module tb_mm_product;
  import vedic_pkg::*;
  mm_pp_t pp;
  mm_mode_e mode;
  logic [63:0] prod;
  int checks = 0, failures = 0;
  int cnt [3] = '{0, 0, 0};

  mm_product dut (.pp(pp), .mode(mode), .prod(prod));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 6000; n++) begin
      logic [15:0] al, ah, bl, bh;
      logic [63:0] exp;
      al = 16'($urandom); ah = 16'($urandom); bl = 16'($urandom); bh = 16'($urandom);
      if (n % 50 == 0) begin al = '1; ah = '1; bl = '1; bh = '1; end
      mode = mm_mode_e'(n % 3);
      pp[0] = 32'(al) * 32'(bl);
      pp[1] = (mode == MM_MAC64) ? 32'(ah) * 32'(bl) : 32'd0;
      pp[2] = (mode == MM_MAC64) ? 32'(al) * 32'(bh) : 32'd0;
      pp[3] = (mode != MM_MAC32) ? 32'(ah) * 32'(bh) : 32'd0;
      #1;
      unique case (mode)
        MM_MAC64:  exp = 64'({ah, al}) * 64'({bh, bl});
        MM_DUAL16: exp = 64'(pp[0]) + 64'(pp[3]);
        default:   exp = 64'(pp[0]);
      endcase
      cnt[n % 3]++;
      checks++;
      if (prod !== exp) begin
        failures++;
        $display("FAIL mode=%0d prod=%h exp=%h", mode, prod, exp);
      end
    end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (cnt[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
