// tb_vedic_mac_top: end-to-end test of the whole design at its default sizes.
//
// Drives the 64-bit I-MAC, the unpipelined multimode MAC and the pipelined one
// through their own ports and checks all three sums after every clock edge
// against models. It starts with the two worked examples (I-MAC: five products
// summing to 202860340; multimode, mode 00: five products summing to 623321),
// then runs random traffic. It counts how often each mechanism occurs and fails
// if one never does: each of the selection codes 00/01/10/11 on both multimode
// MACs, a mode change between consecutive operations, an idle cycle (start = 0)
// holding the sum, wrap-around of the 64-bit sum, wrap-around of the 32-bit sum
// in mode 11, the upper half cleared on entering mode 11, a mode change while the
// previous operation is still in the pipeline, and 32x32 operands whose middle
// columns carry 2 into the top product bits.
module tb_vedic_mac_top;
  logic clk = 0, rst_n = 0;
  logic        imac_start, mm_start, mmp_start;
  logic [31:0] imac_a, imac_b, mm_a, mm_b, mmp_a, mmp_b;
  logic [1:0]  mm_sel, mmp_sel;
  logic [63:0] imac_sum, mm_sum, mmp_sum;
  logic [63:0] m_imac, m_mm, m_mmp;
  logic        p_v;
  logic [1:0]  p_sel;
  logic [31:0] p_a, p_b;
  logic [1:0]  last_sel;
  int checks = 0, failures = 0;

  typedef enum int {
    EV_SEL00, EV_SEL01, EV_SEL10, EV_SEL11, EV_MODE_SWITCH, EV_HOLD, EV_WRAP64,
    EV_WRAP32, EV_UPPER_CLEAR, EV_PIPE_SWITCH, EV_DOUBLE_CARRY, EV_NUM
  } ev_e;
  int ev [EV_NUM];
  string ev_name [EV_NUM] = '{"sel00", "sel01", "sel10", "sel11", "mode switch", "hold",
                              "64-bit wrap", "32-bit wrap", "upper clear", "pipeline mode switch",
                              "double middle carry"};

  vedic_mac_top dut (
    .clk(clk), .rst_n(rst_n),
    .imac_start(imac_start), .imac_a(imac_a), .imac_b(imac_b), .imac_sum(imac_sum),
    .mm_start(mm_start), .mm_sel(mm_sel), .mm_a(mm_a), .mm_b(mm_b), .mm_sum(mm_sum),
    .mmp_start(mmp_start), .mmp_sel(mmp_sel), .mmp_a(mmp_a), .mmp_b(mmp_b), .mmp_sum(mmp_sum)
  );

  always #5 clk = ~clk;

  function automatic logic [63:0] ref_next(logic [63:0] acc, logic [1:0] s,
                                           logic [31:0] x, logic [31:0] y);
    unique case (s)
      2'b00:        return acc + 64'(x) * 64'(y);
      2'b01, 2'b10: return acc + 64'(x[15:0]) * 64'(y[15:0]) + 64'(x[31:16]) * 64'(y[31:16]);
      default:      return {32'd0, 32'(acc[31:0] + x[15:0] * y[15:0])};
    endcase
  endfunction

  // middle columns of a 32x32 product carrying 2 into bit 48
  function automatic bit double_carry(logic [31:0] x, logic [31:0] y);
    logic [33:0] mid;
    mid = 34'((64'(x[15:0]) * 64'(y[15:0])) >> 16) + 34'(x[31:16] * y[15:0])
        + 34'(x[15:0] * y[31:16]) + {2'b0, 16'(x[31:16] * y[31:16]), 16'd0};
    return mid[33:32] == 2'b10;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    logic [63:0] nxt;
    @(posedge clk);
    // I-MAC
    if (imac_start) begin
      nxt = m_imac + 64'(imac_a) * 64'(imac_b);
      if (nxt < m_imac) ev[EV_WRAP64]++;
      if (double_carry(imac_a, imac_b)) ev[EV_DOUBLE_CARRY]++;
      m_imac = nxt;
    end else ev[EV_HOLD]++;
    // unpipelined multimode MAC
    if (mm_start) begin
      nxt = ref_next(m_mm, mm_sel, mm_a, mm_b);
      ev[EV_SEL00 + int'(mm_sel)]++;
      if (mm_sel != last_sel) ev[EV_MODE_SWITCH]++;
      if (mm_sel == 2'b11 && m_mm[63:32] != 0) ev[EV_UPPER_CLEAR]++;
      if (mm_sel == 2'b11 && nxt[31:0] < m_mm[31:0]) ev[EV_WRAP32]++;
      if (mm_sel != 2'b11 && nxt < m_mm) ev[EV_WRAP64]++;
      if (mm_sel == 2'b00 && double_carry(mm_a, mm_b)) ev[EV_DOUBLE_CARRY]++;
      last_sel = mm_sel;
      m_mm = nxt;
    end else ev[EV_HOLD]++;
    // pipelined multimode MAC: the model register mirrors the pipeline stage
    if (p_v) m_mmp = ref_next(m_mmp, p_sel, p_a, p_b);
    if (p_v && mmp_start && p_sel != mmp_sel) ev[EV_PIPE_SWITCH]++;
    if (mmp_start) ev[EV_SEL00 + int'(mmp_sel)]++;
    p_v = mmp_start; p_sel = mmp_sel; p_a = mmp_a; p_b = mmp_b;
    #1;
    checks++;
    if (imac_sum !== m_imac) begin failures++; $display("FAIL imac %h exp %h", imac_sum, m_imac); end
    checks++;
    if (mm_sum !== m_mm) begin failures++; $display("FAIL mm %h exp %h", mm_sum, m_mm); end
    checks++;
    if (mmp_sum !== m_mmp) begin failures++; $display("FAIL mmp %h exp %h", mmp_sum, m_mmp); end
  endtask

  int unsigned i_a [5] = '{20, 325, 2345, 10000, 98};
  int unsigned i_b [5] = '{35, 77, 1111, 20000, 2340};
  int unsigned m_a [5] = '{100, 250, 1111, 233, 100};
  int unsigned m_b [5] = '{33, 25, 98, 21, 5000};

  initial begin
    foreach (ev[i]) ev[i] = 0;
    imac_start = 0; mm_start = 0; mmp_start = 0;
    imac_a = 0; imac_b = 0; mm_a = 0; mm_b = 0; mmp_a = 0; mmp_b = 0;
    mm_sel = 0; mmp_sel = 0; last_sel = 0;
    m_imac = 0; m_mm = 0; m_mmp = 0; p_v = 0; p_sel = 0; p_a = 0; p_b = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // the two worked examples
    for (int i = 0; i < 5; i++) begin
      imac_start = 1; imac_a = i_a[i]; imac_b = i_b[i];
      mm_start = 1; mm_sel = 2'b00; mm_a = m_a[i]; mm_b = m_b[i];
      mmp_start = 1; mmp_sel = 2'b00; mmp_a = m_a[i]; mmp_b = m_b[i];
      step();
    end
    imac_start = 0; mm_start = 0; mmp_start = 0;
    step();
    checks++;
    if (imac_sum != 64'd202860340) begin failures++; $display("FAIL I-MAC example %0d", imac_sum); end
    checks++;
    if (mm_sum != 64'd623321 || mmp_sum != 64'd623321) begin
      failures++; $display("FAIL multimode example %0d %0d", mm_sum, mmp_sum);
    end
    // random traffic, in bursts that stay in one mode and bursts that switch
    for (int n = 0; n < 12000; n++) begin
      imac_a = $urandom; imac_b = $urandom; imac_start = ($urandom % 6) != 0;
      mm_a = $urandom; mm_b = $urandom; mm_start = ($urandom % 6) != 0;
      mmp_a = $urandom; mmp_b = $urandom; mmp_start = ($urandom % 6) != 0;
      if ((n / 200) % 2 == 0) begin
        mm_sel = 2'($urandom); mmp_sel = 2'($urandom);
      end else if (n % 200 == 0) begin
        mm_sel = 2'($urandom); mmp_sel = 2'($urandom);
      end
      if (n % 37 == 0) begin imac_a = '1; imac_b = '1; mm_a = '1; mm_b = '1; end
      step();
    end
    foreach (ev[i]) begin
      $display("event %-22s %0d", ev_name[i], ev[i]);
      checks++;
      if (ev[i] == 0) begin failures++; $display("FAIL event %s never happened", ev_name[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
