// tb_stepper_drive: end-to-end test of the whole controller at its default
// sizes. A bus model plays the host processor and writes the settings
// through the I/O ports; the test then watches the motor outputs.
//
// Every clock it checks:
//   * each change of the step number is the next micro step of the
//     selected ratio (angle walking 0 -> 128 -> 0 in steps of 128/MSR,
//     quadrant advancing at each end of the table),
//   * consecutive steps are STEP_RATE clocks apart,
//   * SINE, COSINE and A+/B-/C+/D- equal, one clock later, the values
//     expected for that step number and quadrant (amplitude Tmax-Toffset,
//     12-bit sine table, winding table of the selected direction),
//   * with ENABLE low, every output is 0 and the position holds.
// The runs follow the published cases (MSR 4 CCW at step rate 2, MSR 8 in
// both directions, MSR 128 CCW) and add the other ratios, an offset torque,
// enable off/on, a change of speed and ignored bus cycles (IODIS high, MION
// high, address outside 100H..107H). It counts how often each of these
// happened and counts a failure for any that never did.
module tb_stepper_drive;
  import microstep_ref_pkg::*;

  logic        clock = 0, por = 1;
  logic [9:0]  ia = '0;
  logic [15:0] id = '0;
  logic        mion = 1, iodis = 0, wrn = 1;
  logic [9:0]  sine, cosine;
  logic        a_pos, b_neg, c_pos, d_neg, sys_clk;
  logic [7:0]  step_no;
  logic [1:0]  quadrant;
  logic [15:0] misc_port [4];

  int checks = 0, failures = 0;

  // settings as last written by the host
  int cfg_rate = 0, cfg_msr = 0, cfg_max = 0, cfg_off = 0;
  logic cfg_dir = 0, cfg_en = 0;

  // mechanism counters
  int n_steps_ccw = 0, n_steps_cw = 0, n_quad_wrap = 0, n_disabled = 0;
  int n_offset = 0, n_speed_change = 0, n_ignored = 0, n_misc = 0;
  int n_msr [8];

  stepper_drive dut (
    .clock(clock), .por(por), .ia(ia), .id(id), .mion(mion), .iodis(iodis), .wrn(wrn),
    .sine(sine), .cosine(cosine), .a_pos(a_pos), .b_neg(b_neg), .c_pos(c_pos),
    .d_neg(d_neg), .sys_clk(sys_clk), .step_no(step_no), .quadrant(quadrant),
    .misc_port(misc_port));

  always #5 clock = ~clock;

  initial begin
    repeat (300000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("ERROR t=%0t msr=%0d dir=%0d %s got %0d exp %0d", $time, cfg_msr, cfg_dir, what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- host
  task automatic bus_write(input logic [9:0] a, input logic [15:0] d,
                           input logic m = 1'b0, input logic dis = 1'b0);
    @(negedge clock);
    ia = a; id = d; mion = m; iodis = dis; wrn = 0;
    @(negedge clock);
    wrn = 1; mion = 1; iodis = 0;
  endtask

  task automatic write_porta(input int rate, input logic dir, input logic en);
    bus_write(10'h100, {2'b00, en, dir, 12'(rate)});
    if (cfg_rate != 0 && rate != cfg_rate) n_speed_change++;
    cfg_rate = rate; cfg_dir = dir; cfg_en = en;
  endtask

  task automatic configure(input int m, input int mx, input int off);
    bus_write(10'h101, 16'(m));
    bus_write(10'h102, 16'(mx));
    bus_write(10'h103, 16'(off));
    cfg_msr = m; cfg_max = mx; cfg_off = off;
  endtask

  task automatic power_on_reset();
    @(negedge clock);
    por = 1;
    cfg_rate = 0; cfg_msr = 0; cfg_max = 0; cfg_off = 0; cfg_dir = 0; cfg_en = 0;
    repeat (2) @(negedge clock);
    por = 0;
  endtask

  // ------------------------------------------------------------- monitor
  logic [7:0] prev_step;
  logic [1:0] prev_quad;
  logic       prev_en;
  int         last_step_cycle = -1, cycle = 0, prev_rate = 0;

  function automatic int period_of(input int rate);
    return (rate < 2) ? 2 : (rate / 2) * 2;
  endfunction

  always @(posedge clock) begin
    #1;
    cycle++;
    if (!por) begin
      // outputs reflect last cycle's step number and quadrant
      if (prev_en && cfg_en) begin
        int amp;
        amp = (cfg_max > cfg_off) ? cfg_max - cfg_off : 0;
        expect_eq("sine",   int'(sine),   ref_mul(amp, ref_sin(int'(prev_step))));
        expect_eq("cosine", int'(cosine), ref_mul(amp, ref_cos(int'(prev_step))));
        expect_eq("drive",  int'({a_pos, b_neg, c_pos, d_neg}),
                  int'(ref_pattern(cfg_dir, int'(prev_quad))));
        if (cfg_off > 0) n_offset++;
      end else if (!prev_en && !cfg_en) begin
        expect_eq("disabled outputs", int'({sine, cosine, a_pos, b_neg, c_pos, d_neg}), 0);
        expect_eq("position held", int'(step_no), int'(prev_step));
        n_disabled++;
      end
      // step sequence and spacing
      if (step_no != prev_step || quadrant != prev_quad) begin
        int inc, exp_step, exp_quad;
        inc = 128 / cfg_msr;
        exp_quad = int'(prev_quad);
        if (prev_quad[0] == 1'b0) begin
          exp_step = int'(prev_step) + inc;
          if (exp_step >= 128) begin exp_step = 128; exp_quad = (exp_quad + 1) % 4; end
        end else begin
          exp_step = int'(prev_step) - inc;
          if (exp_step <= 0) begin exp_step = 0; exp_quad = (exp_quad + 1) % 4; end
        end
        expect_eq("next step", int'(step_no), exp_step);
        expect_eq("next quadrant", int'(quadrant), exp_quad);
        if (last_step_cycle >= 0 && prev_rate == cfg_rate)
          expect_eq("step spacing", cycle - last_step_cycle, period_of(cfg_rate));
        last_step_cycle = cycle;
        prev_rate = cfg_rate;
        if (cfg_dir) n_steps_cw++; else n_steps_ccw++;
        if (prev_quad == 2'd3 && quadrant == 2'd0) n_quad_wrap++;
        for (int b = 0; b < 8; b++) if (cfg_msr == (1 << b)) n_msr[b]++;
      end
      if (!cfg_en) last_step_cycle = -1;
    end else begin
      last_step_cycle = -1;
    end
    prev_step = step_no;
    prev_quad = quadrant;
    prev_en   = cfg_en;
  end

  // --------------------------------------------------------------- runs
  // Run until n more micro steps have been taken.
  task automatic run_steps(input int n);
    int target;
    target = n_steps_ccw + n_steps_cw + n;
    while (n_steps_ccw + n_steps_cw < target) @(posedge clock);
    @(negedge clock);
  endtask

  task automatic scenario(input int m, input logic dir, input int rate,
                          input int mx, input int off, input int n);
    power_on_reset();
    configure(m, mx, off);
    write_porta(rate, dir, 1'b1);
    run_steps(n);
  endtask

  initial begin
    foreach (n_msr[b]) n_msr[b] = 0;
    prev_step = '0; prev_quad = '0; prev_en = 1'b0;

    // MSR 4, counter-clockwise, step rate 2: starts at SINE 0, COSINE 1023
    power_on_reset();
    configure(4, 1023, 0);
    write_porta(2, 1'b0, 1'b1);
    @(posedge clock); #2;
    expect_eq("start sine", int'(sine), 0);
    expect_eq("start cosine", int'(cosine), 1023);
    expect_eq("start A+ D-", int'({a_pos, b_neg, c_pos, d_neg}), 4'b1001);
    run_steps(3 * 16);

    // MSR 8 in both directions
    scenario(8, 1'b0, 6, 1023, 0, 2 * 32);
    scenario(8, 1'b1, 6, 1023, 0, 2 * 32);

    // MSR 128 counter-clockwise, one and a quarter electrical cycles
    scenario(128, 1'b0, 4, 1023, 0, 640);

    // remaining ratios, offset torque and clockwise running
    scenario(2,  1'b1, 10, 1023, 200, 24);
    scenario(16, 1'b0, 8,  900,  100, 80);
    scenario(32, 1'b1, 2,  1023, 300, 150);
    scenario(64, 1'b1, 3,  800,  50,  300);
    scenario(1,  1'b0, 4,  1023, 0,   12);

    // enable off and back on, then a change of speed, MSR 16 clockwise
    scenario(16, 1'b1, 4, 1023, 0, 20);
    write_porta(4, 1'b1, 1'b0);
    repeat (40) @(negedge clock);
    write_porta(4, 1'b1, 1'b1);
    run_steps(20);
    write_porta(12, 1'b1, 1'b1);
    run_steps(30);

    // bus cycles that must be ignored: IODIS high, MION high, wrong address
    begin
      int n_before;
      bus_write(10'h100, 16'h0000, 1'b0, 1'b1);   // would disable: IODIS high
      bus_write(10'h100, 16'h0000, 1'b1, 1'b0);   // would disable: MION high
      bus_write(10'h200, 16'h0000);               // outside the window
      bus_write(10'h108, 16'h0000);               // just above the window
      n_before = n_steps_cw;
      run_steps(10);
      checks++;
      if (n_steps_cw >= n_before + 10) n_ignored++;
      else begin failures++; $display("ERROR ignored bus cycle changed the settings"); end
    end

    // spare ports
    bus_write(10'h104, 16'hA5C3);
    bus_write(10'h107, 16'h1234);
    expect_eq("PORTE", int'(misc_port[0]), 16'hA5C3);
    expect_eq("PORTH", int'(misc_port[3]), 16'h1234);
    n_misc++;

    // every mechanism must have happened
    begin
      string names [9] = '{"CCW steps", "CW steps", "quadrant wrap", "disabled",
                           "offset torque", "speed change", "ignored bus cycles",
                           "spare ports", "all MSR values"};
      int counts [9];
      int min_msr;
      min_msr = n_msr[1];
      for (int b = 1; b < 8; b++) if (n_msr[b] < min_msr) min_msr = n_msr[b];
      counts = '{n_steps_ccw, n_steps_cw, n_quad_wrap, n_disabled, n_offset,
                 n_speed_change, n_ignored, n_misc, min_msr};
      for (int i = 0; i < 9; i++) begin
        $display("mechanism %-20s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("ERROR mechanism never exercised: %s", names[i]);
        end
      end
      for (int b = 0; b < 8; b++) $display("  steps at MSR %0d: %0d", 1 << b, n_msr[b]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
