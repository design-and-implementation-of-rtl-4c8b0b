// tb_sine_cos_rom: reads all 129 angles and checks sine and cosine against
// round(4095 * sin) and round(4095 * cos) computed here. It also checks
// the micro-step ratio 8 current table (angles 0, 16, ..., 128), whose
// percentages are 0, 19.51, 38.27, 55.56, 70.71, 83.15, 92.39, 98.08, 100,
// to within 0.02 % of full scale, and that angles above 128 clamp to 90 deg.
module tb_sine_cos_rom;
  import microstep_ref_pkg::*;

  logic [7:0]  angle;
  logic [11:0] s, c;
  int          checks = 0, failures = 0;
  real         pct [9] = '{0.0, 19.51, 38.27, 55.56, 70.71, 83.15, 92.39, 98.08, 100.0};

  sine_cos_rom dut (.angle(angle), .sin_theta(s), .cos_theta(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("ERROR %s angle=%0d got %0d exp %0d", what, angle, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i <= 128; i++) begin
      angle = 8'(i); #1;
      expect_eq("sin", int'(s), ref_sin(i));
      expect_eq("cos", int'(c), ref_cos(i));
    end
    for (int k = 0; k <= 8; k++) begin
      real ps, pc;
      angle = 8'(16 * k); #1;
      ps = 100.0 * real'(s) / 4095.0;
      pc = 100.0 * real'(c) / 4095.0;
      checks += 2;
      if (ps - pct[k] > 0.02 || pct[k] - ps > 0.02) begin
        failures++; $display("ERROR table step %0d phase A %f exp %f", k, ps, pct[k]);
      end
      if (pc - pct[8-k] > 0.02 || pct[8-k] - pc > 0.02) begin
        failures++; $display("ERROR table step %0d phase B %f exp %f", k, pc, pct[8-k]);
      end
    end
    angle = 8'd200; #1;
    expect_eq("clamp sin", int'(s), 4095);
    expect_eq("clamp cos", int'(c), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
