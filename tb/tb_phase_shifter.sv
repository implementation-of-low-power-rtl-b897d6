// tb_phase_shifter: random inputs. Every output must be the parity of its
// three taps j, j+7, j+19 (mod 32); each output must change when exactly
// one of its taps flips, and must not change when only other inputs flip.
module tb_phase_shifter;
  int checks = 0, failures = 0;
  logic [31:0] d; logic [14:0] scan_in;

  phase_shifter dut (.d, .scan_in);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 500; c++) begin
      d = $urandom;
      #1;
      for (int j = 0; j < 15; j++) begin
        automatic int t[3] = '{j % 32, (j + 7) % 32, (j + 19) % 32};
        automatic logic [14:0] base = scan_in;
        checks++;
        if (scan_in[j] !== (d[t[0]] ^ d[t[1]] ^ d[t[2]])) begin
          failures++; if (failures < 10) $display("d %h out %0d = %b", d, j, scan_in[j]);
        end
        // flip one bit of d and see which outputs react
        for (int b = 0; b < 32; b++) begin
          automatic logic is_tap = (b == t[0]) || (b == t[1]) || (b == t[2]);
          d[b] = ~d[b]; #1;
          checks++;
          if ((scan_in[j] != base[j]) !== is_tap) begin
            failures++; if (failures < 10) $display("out %0d reacts to bit %0d: %b", j, b, scan_in[j] != base[j]);
          end
          d[b] = ~d[b]; #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
