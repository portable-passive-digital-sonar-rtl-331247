// tb_delay_rom: compares every entry of the steering-delay table with values
// worked out by hand from tau = d*cos(theta)/c at 500 kS/s, d = 0.378 m,
// c = 333 m/s, theta_k = 12*k degrees, 3 channels.
module tb_delay_rom;
  logic [3:0]  angle;
  logic [11:0] delay [3];
  int checks = 0, failures = 0;

  // expected[k] = {ch0, ch1, ch2}
  localparam int EXP [16][3] = '{
    '{0, 568, 1135}, '{0, 555, 1110}, '{0, 518, 1037}, '{0, 459, 918},
    '{0, 380, 760},  '{0, 284, 568},  '{0, 175, 351},  '{0, 59, 119},
    '{119, 59, 0},   '{351, 175, 0},  '{568, 284, 0},  '{760, 380, 0},
    '{918, 459, 0},  '{1037, 518, 0}, '{1110, 555, 0}, '{1135, 568, 0}};

  delay_rom dut (.angle, .delay);

  initial begin
    for (int k = 0; k < 16; k++) begin
      angle = 4'(k);
      #1;
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (int'(delay[m]) != EXP[k][m]) begin
          failures++;
          $display("FAIL: angle %0d channel %0d: %0d, expected %0d", k, m, delay[m], EXP[k][m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
