// tb_weighted_logic: applies all 16 codes with all 1024 values of the ten
// pseudorandom inputs. Each output is compared with a reference that
// counts the enabled gate whose inputs are all 1, and for each code the
// number of input values giving 1 must equal 1024 * (1 - prod(1 - p_k))
// over the enabled weights p = 1/2, 1/4, 1/8, 1/16 (e.g. 256 for 0100).
module tb_weighted_logic;
  import presto_pkg::*;
  int checks = 0, failures = 0;
  code_t code; logic [WL_BITS-1:0] rnd; logic w;

  weighted_logic dut (.code, .rnd, .w);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // first bit of each gate's group in rnd, and the group size
    int first[4] = '{6, 3, 1, 0};   // index by code bit: 0->1/16 ... 3->1/2
    int size[4]  = '{4, 3, 2, 1};
    for (int c = 0; c < 16; c++) begin
      automatic int ones = 0;
      automatic real p_zero = 1.0;
      for (int b = 0; b < 4; b++) if (c[b]) p_zero *= (1.0 - 1.0 / real'(1 << size[b]));
      for (int r = 0; r < 1024; r++) begin
        automatic logic exp_w = 0;
        code = c[3:0]; rnd = r[9:0];
        #1;
        for (int b = 0; b < 4; b++) begin
          automatic logic all1 = 1;
          for (int k = 0; k < size[b]; k++) all1 &= r[first[b] + k];
          if (c[b] && all1) exp_w = 1;
        end
        checks++;
        if (w !== exp_w) begin failures++; if (failures < 10) $display("code %b rnd %b: w=%b exp %b", c[3:0], r[9:0], w, exp_w); end
        ones += int'(w);
      end
      checks++;
      if (real'(ones) - 1024.0 * (1.0 - p_zero) > 0.01 || 1024.0 * (1.0 - p_zero) - real'(ones) > 0.01) begin
        failures++; $display("code %b: %0d of 1024 ones, expected %0f", c[3:0], ones, 1024.0 * (1.0 - p_zero));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
