// tb_pattern_counter: with SCAN_LEN = 5 and advance dropped at random,
// pattern_end must be high on exactly every fifth advancing cycle, the
// shift count must follow, and the pattern number must count completed
// patterns.
module tb_pattern_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic advance; logic [2:0] shift_cnt; logic [15:0] pattern_num; logic pattern_end;

  pattern_counter #(.SCAN_LEN(5)) dut (.clk, .rst_n, .advance, .shift_cnt, .pattern_num, .pattern_end);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int adv_count = 0, ends = 0;
    advance = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      advance = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (shift_cnt !== 3'(adv_count % 5) || pattern_num !== 16'(adv_count / 5) ||
          pattern_end !== (advance && (adv_count % 5 == 4))) begin
        failures++;
        if (failures < 10) $display("cycle %0d: cnt %0d num %0d end %b (advances %0d)", c, shift_cnt, pattern_num, pattern_end, adv_count);
      end
      if (pattern_end) ends++;
      @(posedge clk);
      if (advance) adv_count++;
      #1;
    end
    checks++;
    if (ends != adv_count / 5) begin failures++; $display("%0d pattern ends for %0d advances", ends, adv_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
