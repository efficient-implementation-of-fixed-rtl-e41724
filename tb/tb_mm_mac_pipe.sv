// tb_mm_mac_pipe: self-checking test of the two-stage pipelined multimode MAC.
// Same stimulus as the unpipelined test, but an operation sampled at edge k
// must be in sum after edge k+1 and not after edge k: the model is updated one
// edge later. sel changes freely between back-to-back operations, so the mode
// must travel with its partial products. Each mode must occur.
module tb_mm_mac_pipe;
  logic clk = 0, rst_n = 0, start;
  logic [1:0] sel;
  logic [31:0] a, b;
  logic [63:0] sum, model;
  logic        p_v;      // model of the pipeline register
  logic [1:0]  p_sel;
  logic [31:0] p_a, p_b;
  int checks = 0, failures = 0;
  int mode_cnt [4] = '{0, 0, 0, 0};
  int overlap_cnt = 0;

  mm_mac_pipe dut (.clk(clk), .rst_n(rst_n), .start(start), .sel(sel), .a(a), .b(b), .sum(sum));

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
    if (p_v) model = ref_next(model, p_sel, p_a, p_b);
    if (p_v && start && p_sel != sel) overlap_cnt++;
    p_v = start; p_sel = sel; p_a = a; p_b = b;
    if (start) mode_cnt[sel]++;
    #1;
    checks++;
    if (sum !== model) begin
      failures++;
      $display("FAIL sum=%h exp=%h", sum, model);
    end
  endtask

  int unsigned ex_a [5] = '{100, 250, 1111, 233, 100};
  int unsigned ex_b [5] = '{33, 25, 98, 21, 5000};

  initial begin
    start = 0; sel = 0; a = 0; b = 0; model = 0; p_v = 0; p_sel = 0; p_a = 0; p_b = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      sel = 2'b00; a = ex_a[i]; b = ex_b[i]; start = 1;
      step();
    end
    start = 0;
    // after the fifth sampling edge the sum lacks the last product ...
    checks++;
    if (sum != 64'd123321) begin failures++; $display("FAIL latency sum=%0d", sum); end
    step();
    // ... and has it one edge later
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
    checks++;
    if (overlap_cnt == 0) begin failures++; $display("FAIL no mode change in flight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
