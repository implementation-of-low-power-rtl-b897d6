// tb_enable_logic: random control words, all 16 Switching codes and both
// modes. Expected: with code 0000 every enable is 1; otherwise in a hold
// period every enable is 0 and in a toggle period the enables equal the
// control register.
module tb_enable_logic;
  import presto_pkg::*;
  int checks = 0, failures = 0;
  code_t switching; logic [31:0] ctrl; mode_e mode; logic lp_off; logic [31:0] en;

  enable_logic dut (.switching, .ctrl, .mode, .lp_off, .en);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2000; c++) begin
      logic [31:0] exp_en;
      logic exp_off;
      switching = code_t'($urandom_range(0, 15));
      if (c % 7 == 0) switching = 4'b0000;
      ctrl = $urandom;
      mode = mode_e'($urandom_range(0, 1));
      #1;
      exp_off = (switching == 4'd0);
      if (exp_off)                 exp_en = 32'hFFFF_FFFF;
      else if (mode == MODE_HOLD)  exp_en = 32'h0;
      else                         exp_en = ctrl;
      checks++;
      if (lp_off !== exp_off || en !== exp_en) begin
        failures++;
        if (failures < 10) $display("sw %b mode %0d ctrl %h: en %h exp %h", switching, mode, ctrl, en, exp_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
