// tb_mm_mac: self-checking test of the unpipelined multimode MAC.
// First the mode-00 example 100*33 + 250*25 + 1111*98 + 233*21 + 100*5000 =
// 623321, then random operands with sel and start changed at random every
// cycle, compared after every clock edge with a model (one operation per cycle,
// result right after the sampling edge). Each mode must occur.
module tb_mm_mac;
  logic clk = 0, rst_n = 0, start;
  logic [1:0] sel;
  logic [31:0] a, b;
  logic [63:0] sum, model;
  int checks = 0, failures = 0;
  int mode_cnt [4] = '{0, 0, 0, 0};

  mm_mac dut (.clk(clk), .rst_n(rst_n), .start(start), .sel(sel), .a(a), .b(b), .sum(sum));

  always #5 clk = ~clk;

  function automatic logic [63:0] ref_next(logic [63:0] acc, logic [1:0] s,
                                           logic [31:0] x, logic [31:0] y);
    unique case (s)
      2'b00:        return acc + 64'(x) * 64'(y);
      2'b01, 2'b10: return acc + 64'(x[15:0]) * 64'(y[15:0]) + 64'(x[31:16]) * 64'(y[31:16]);
      default:      return {32'd0, 32'(acc[31:0] + x[15:0] * y[15:0])};
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk);
    if (start) begin
      model = ref_next(model, sel, a, b);
      mode_cnt[sel]++;
    end
    #1;
    checks++;
    if (sum !== model) begin
      failures++;
      $display("FAIL sel=%b a=%h b=%h sum=%h exp=%h", sel, a, b, sum, model);
    end
  endtask

  int unsigned ex_a [5] = '{100, 250, 1111, 233, 100};
  int unsigned ex_b [5] = '{33, 25, 98, 21, 5000};

  initial begin
    start = 0; sel = 0; a = 0; b = 0; model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      sel = 2'b00; a = ex_a[i]; b = ex_b[i]; start = 1;
      step();
    end
    checks++;
    if (sum != 64'd623321) begin failures++; $display("FAIL example sum=%0d", sum); end
    for (int n = 0; n < 6000; n++) begin
      a = $urandom; b = $urandom;
      if (n % 61 == 0) begin a = '1; b = '1; end
      sel = 2'($urandom); start = ($urandom % 5) != 0;
      step();
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_cnt[m] == 0) begin failures++; $display("FAIL mode %0d never used", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
