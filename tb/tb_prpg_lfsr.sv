// tb_prpg_lfsr: checks the LFSR against a reference that steps the
// feedback polynomial written as a list of exponents. An 8-bit instance
// (x^8+x^6+x^5+x^4+1) must run through all 255 non-zero states before it
// repeats; the default 32-bit instance is compared step by step for 5000
// cycles, across a seed load, a stall (advance low) and a zero seed.
module tb_prpg_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        adv8, ld8;  logic [7:0]  seed8,  q8;
  logic        adv32, ld32; logic [31:0] seed32, q32;

  prpg_lfsr #(.N(8), .TAPS(8'hB8), .SEED_INIT(8'h01)) dut8 (
    .clk, .rst_n, .advance(adv8), .load(ld8), .seed(seed8), .q(q8));
  prpg_lfsr dut32 (
    .clk, .rst_n, .advance(adv32), .load(ld32), .seed(seed32), .q(q32));

  function automatic logic [31:0] ref_step(logic [31:0] s, int n, int taps[$]);
    logic fb = 0;
    foreach (taps[i]) fb ^= s[taps[i]-1];
    s = (s << 1) | 32'(fb);
    if (n < 32) s &= (32'h1 << n) - 1;
    return s;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] m8, m32;
    int taps8[$]  = '{8, 6, 5, 4};
    int taps32[$] = '{32, 22, 2, 1};
    int period;
    adv8 = 0; ld8 = 0; seed8 = 0; adv32 = 0; ld32 = 0; seed32 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (q8 !== 8'h01 || q32 !== 32'h1) begin failures++; $display("reset value wrong"); end
    // 8-bit: maximal period
    m8 = 1; period = 0;
    adv8 = 1;
    do begin
      @(posedge clk); #1;
      m8 = ref_step(m8, 8, taps8);
      period++;
      checks++;
      if (q8 !== m8[7:0]) begin failures++; $display("8-bit mismatch at %0d: %h vs %h", period, q8, m8); end
    end while (q8 != 8'h01 && period < 300);
    checks++;
    if (period != 255) begin failures++; $display("8-bit period %0d, expected 255", period); end
    adv8 = 0;
    // 32-bit: step compare with random stalls and loads
    m32 = 1;
    for (int c = 0; c < 5000; c++) begin
      adv32 = ($urandom_range(0, 9) != 0);
      ld32  = (c == 1000) || (c == 3000);
      seed32 = (c == 3000) ? 32'h0 : $urandom;
      @(posedge clk); #1;
      if (ld32)       m32 = (seed32 == 0) ? 32'h1 : seed32;
      else if (adv32) m32 = ref_step(m32, 32, taps32);
      checks++;
      if (q32 !== m32) begin failures++; if (failures < 10) $display("32-bit mismatch at %0d: %h vs %h", c, q32, m32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
