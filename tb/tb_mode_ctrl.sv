// tb_mode_ctrl: exhaustive test of the control-logic circuit: E1, E2, the
// decoded mode and the four multiplier enables for every sel and start.
module tb_mode_ctrl;
  import vedic_pkg::*;
  logic start;
  logic [1:0] sel;
  mm_ctrl_t ctrl;
  int checks = 0, failures = 0;

  mode_ctrl dut (.start(start), .sel(sel), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      logic e1, e2;
      mm_mode_e m;
      logic [3:0] en;
      sel = 2'(n); start = 1'(n >> 2);
      #1;
      e1 = (sel == 2'b00);
      e2 = (sel != 2'b11);
      m  = (sel == 2'b00) ? MM_MAC64 : (sel == 2'b11) ? MM_MAC32 : MM_DUAL16;
      en = start ? {e2, e1, e1, 1'b1} : 4'b0000;
      checks++;
      if (ctrl.e1 !== e1 || ctrl.e2 !== e2) begin failures++; $display("FAIL E sel=%b", sel); end
      checks++;
      if (ctrl.mode !== m) begin failures++; $display("FAIL mode sel=%b", sel); end
      checks++;
      if (ctrl.vm_en !== en) begin failures++; $display("FAIL en sel=%b start=%b", sel, start); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
