// tb_imac: self-checking test of the I-MAC.
// The default 64-bit I-MAC (N = 32) first runs the five-operand example
// 20*35 + 325*77 + 2345*1111 + 10000*20000 + 98*2340 = 202860340 (the sum of those
// five products), then random
// operands with start toggling, checked every cycle against a model. The 8-,
// 16- and 32-bit I-MACs (N = 4, 8, 16) run random operands alongside, checked
// the same way, including the wrap at their width. Each result must
// appear right after the edge that samples the operands (one MAC per cycle).
module tb_imac;
  logic clk = 0, rst_n = 0;
  logic start, start8;
  logic [31:0] a, b;  logic [63:0] sum;
  logic [3:0]  a8, b8; logic [7:0] sum8;
  logic [63:0] model;
  logic [7:0]  model8;
  logic [7:0]  a16, b16; logic [15:0] sum16, model16;
  logic [15:0] a32, b32; logic [31:0] sum32, model32;
  int checks = 0, failures = 0;

  imac          dut  (.clk(clk), .rst_n(rst_n), .start(start),  .a(a),  .b(b),  .sum(sum));
  imac #(.N(4)) dut8 (.clk(clk), .rst_n(rst_n), .start(start8), .a(a8), .b(b8), .sum(sum8));
  imac #(.N(8))  dut16 (.clk(clk), .rst_n(rst_n), .start(start8), .a(a16), .b(b16), .sum(sum16));
  imac #(.N(16)) dut32 (.clk(clk), .rst_n(rst_n), .start(start8), .a(a32), .b(b32), .sum(sum32));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk);
    if (start)  model  = model + 64'(a) * 64'(b);
    if (start8) begin
      model8  = 8'(model8 + 8'(a8) * 8'(b8));
      model16 = 16'(model16 + 16'(a16) * 16'(b16));
      model32 = 32'(model32 + 32'(a32) * 32'(b32));
    end
    #1;
    checks++;
    if (sum !== model) begin failures++; $display("FAIL 64-bit sum=%0d exp=%0d", sum, model); end
    checks++;
    if (sum8 !== model8) begin failures++; $display("FAIL 8-bit sum=%0d exp=%0d", sum8, model8); end
    checks++;
    if (sum16 !== model16) begin failures++; $display("FAIL 16-bit sum=%0d exp=%0d", sum16, model16); end
    checks++;
    if (sum32 !== model32) begin failures++; $display("FAIL 32-bit sum=%0d exp=%0d", sum32, model32); end
  endtask

  int unsigned ex_a [5] = '{20, 325, 2345, 10000, 98};
  int unsigned ex_b [5] = '{35, 77, 1111, 20000, 2340};

  initial begin
    start = 0; start8 = 0; a = 0; b = 0; a8 = 0; b8 = 0; model = 0; model8 = 0;
    a16 = 0; b16 = 0; a32 = 0; b32 = 0; model16 = 0; model32 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      a = ex_a[i]; b = ex_b[i]; start = 1;
      step();
    end
    checks++;
    if (sum != 64'd202860340) begin failures++; $display("FAIL example sum=%0d", sum); end
    // random operands, start toggling; the 64-bit sum wraps eventually
    for (int n = 0; n < 5000; n++) begin
      a = $urandom; b = $urandom; start = ($urandom % 4) != 0;
      if (n % 97 == 0) begin a = '1; b = '1; end
      a8 = 4'($urandom); b8 = 4'($urandom); start8 = ($urandom % 3) != 0;
      a16 = 8'($urandom); b16 = 8'($urandom); a32 = 16'($urandom); b32 = 16'($urandom);
      if (n % 89 == 0) begin a16 = '1; b16 = '1; a32 = '1; b32 = '1; end
      step();
    end
    // asynchronous reset clears both
    #2 rst_n = 0; #1;
    checks++;
    if (sum != 0 || sum8 != 0 || sum16 != 0 || sum32 != 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
