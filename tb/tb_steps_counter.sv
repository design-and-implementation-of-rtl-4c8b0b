// tb_steps_counter: runs the steps counter for every micro-stepping ratio
// 1..128 in both directions over three electrical cycles and compares the
// angle index, quadrant and drive enables with a model that counts micro
// steps p = 0 .. 4*MSR-1 around the cycle: quadrant q = p / MSR, k = p mod
// MSR, angle = k*128/MSR in quadrants I and III and 128 - k*128/MSR in II
// and IV. Ticks come at random intervals and ENABLE drops at random, when
// the position must hold and all enables must be low. Also checks that a
// ratio that is not a power of two steps like the power of two below it and
// that MSR = 0 does not move.
module tb_steps_counter;
  import microstep_pkg::*;
  import microstep_ref_pkg::*;

  logic       clk = 0, por = 1, sys_tick = 0, enable = 0, dir = 0;
  logic [7:0] msr = 8'd8;
  logic [7:0] step_no;
  quadrant_e  quadrant;
  drive_en_t  drive_en;
  int         checks = 0, failures = 0;

  steps_counter dut (.clk(clk), .por(por), .sys_tick(sys_tick), .enable(enable),
                     .dir(dir), .msr(msr), .step_no(step_no), .quadrant(quadrant),
                     .drive_en(drive_en));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("ERROR msr=%0d dir=%0d %s got %0d exp %0d", msr, dir, what, got, exp);
    end
  endtask

  task automatic check_state(input int p, input int steps_per_quad, input logic en);
    int q, k, inc, ang;
    q   = p / steps_per_quad;
    k   = p % steps_per_quad;
    inc = 128 / steps_per_quad;
    ang = (q % 2 == 0) ? k * inc : 128 - k * inc;
    expect_eq("angle", int'(step_no), ang);
    expect_eq("quadrant", int'(quadrant), q);
    expect_eq("drive", int'(drive_en), en ? int'(ref_pattern(dir, q)) : 0);
  endtask

  task automatic restart(input logic [7:0] m, input logic d);
    @(negedge clk);
    por = 1; msr = m; dir = d; enable = 0; sys_tick = 0;
    @(negedge clk);
    por = 0;
  endtask

  // Run n ticks, comparing after each; steps_per_quad is the effective MSR.
  task automatic run(input int n, input int steps_per_quad);
    int p;
    p = 0;
    @(negedge clk); enable = 1; #1;
    check_state(p, steps_per_quad, 1'b1);
    for (int i = 0; i < n; i++) begin
      logic en;
      en = ($urandom_range(9) != 0);
      @(negedge clk);
      enable = en; sys_tick = 1;
      @(negedge clk);
      sys_tick = 0;
      if (en) p = (p + 1) % (4 * steps_per_quad);
      check_state(p, steps_per_quad, en);
      repeat ($urandom_range(2)) @(negedge clk);
      #1 check_state(p, steps_per_quad, en);   // no tick, no move
    end
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      for (int b = 0; b < 8; b++) begin
        int m;
        m = 1 << b;
        restart(8'(m), 1'(d));
        run(12 * m + 5, m);
      end
    end
    restart(8'd5, 1'b0);  run(60, 4);      // highest set bit counts
    restart(8'd200, 1'b1); run(1100, 128);
    restart(8'd0, 1'b0);  run(20, 1 << 20); // MSR = 0: never moves
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
