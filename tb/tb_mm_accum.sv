// tb_mm_accum: self-checking test of the 64-bit accumulator: accumulation with
// wrap at 2^64, hold with en = 0, the 32-bit wrap and upper clear of MM_MAC32,
// and asynchronous reset. Checked after every clock edge.
module tb_mm_accum;
  import vedic_pkg::*;
  logic clk = 0, rst_n = 0, en;
  mm_mode_e mode;
  logic [63:0] prod, acc, model;
  int checks = 0, failures = 0;

  mm_accum dut (.clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .prod(prod), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; mode = MM_MAC64; prod = 0; model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      en = ($urandom % 4) != 0;
      mode = mm_mode_e'($urandom % 3);
      prod = {$urandom, $urandom};
      if (mode == MM_MAC32) prod[63:32] = 0;
      @(posedge clk);
      if (en) begin
        if (mode == MM_MAC32) model = {32'd0, 32'(model[31:0] + prod[31:0])};
        else                  model = model + prod;
      end
      #1;
      checks++;
      if (acc !== model) begin failures++; $display("FAIL acc=%h exp=%h", acc, model); end
    end
    #2 rst_n = 0; #1;
    checks++;
    if (acc != 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
