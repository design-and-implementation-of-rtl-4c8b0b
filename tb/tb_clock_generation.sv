// tb_clock_generation: for a set of step rates, measures the SYS_CLK
// period and high time in master-clock cycles and the spacing of sys_tick
// pulses, and checks that each tick falls in the cycle before a SYS_CLK
// rising edge. Expected period: STEP_RATE rounded down to even, at least 2.
module tb_clock_generation;

  logic        clk = 0, por = 1;
  logic [11:0] step_rate;
  logic        sys_clk, sys_tick;
  int          checks = 0, failures = 0;
  int          rates [8] = '{2, 3, 4, 10, 25, 100, 0, 1};

  clock_generation dut (.clk(clk), .por(por), .step_rate(step_rate),
                        .sys_clk(sys_clk), .sys_tick(sys_tick));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int rate, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("ERROR rate=%0d %s got %0d exp %0d", rate, what, got, exp);
    end
  endtask

  initial begin
    step_rate = 12'd2;
    repeat (3) @(posedge clk);
    #1 por = 0;
    foreach (rates[r]) begin
      int exp_period, cyc, last_rise, last_tick, n_rise, high;
      logic prev_clk, prev_tick;
      step_rate = 12'(rates[r]);
      exp_period = (rates[r] < 2) ? 2 : (rates[r] / 2) * 2;
      // let the divider settle on the new rate
      repeat (3 * exp_period + 4) @(posedge clk);
      #1;
      cyc = 0; n_rise = 0; last_rise = -1; last_tick = -1; high = 0;
      prev_clk = sys_clk; prev_tick = sys_tick;
      while (n_rise < 6) begin
        @(posedge clk); #1; cyc++;
        if (sys_clk && !prev_clk) begin
          expect_eq("tick before rise", rates[r], int'(prev_tick), 1);
          if (last_rise >= 0) begin
            expect_eq("period", rates[r], cyc - last_rise, exp_period);
            expect_eq("high time", rates[r], high, exp_period / 2);
          end
          last_rise = cyc; high = 0; n_rise++;
        end
        if (sys_clk) high++;
        if (prev_tick) begin
          if (last_tick >= 0) expect_eq("tick spacing", rates[r], cyc - last_tick, exp_period);
          last_tick = cyc;
        end
        prev_clk = sys_clk; prev_tick = sys_tick;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
