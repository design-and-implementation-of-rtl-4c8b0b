// tb_microstep_core: drives the micro-step core with sys_tick pulses and
// checks the registered SINE, COSINE and drive-enable outputs one clock
// after every step against an independent model:
//   angle  from the micro-step count as in the steps counter test,
//   SINE   = round((Tmax - Toffset) * round(4095 sin(angle)) / 4096),
//   COSINE = the same with cos, drive enables from the winding table.
// Runs several ratios, both directions and several Tmax/Toffset pairs,
// including Toffset > Tmax (amplitude 0). With MSR = 8, Tmax = 1023 and
// Toffset = 0 it checks the first quadrant against the published current
// percentages to within 0.1 %, and it checks that ENABLE low zeroes all
// outputs.
module tb_microstep_core;
  import microstep_pkg::*;
  import microstep_ref_pkg::*;

  logic       clk = 0, por = 1, sys_tick = 0, enable = 0, dir = 0;
  logic [7:0] msr = 8'd8;
  logic [9:0] tmax = 10'd1023, toffset = 10'd0;
  logic [9:0] sine, cosine;
  drive_en_t  drive_en;
  logic [7:0] step_no;
  quadrant_e  quadrant;
  int         checks = 0, failures = 0;
  real        pct [9] = '{0.0, 19.51, 38.27, 55.56, 70.71, 83.15, 92.39, 98.08, 100.0};

  microstep_core dut (
    .clk(clk), .por(por), .sys_tick(sys_tick), .enable(enable), .dir(dir), .msr(msr),
    .tmax(tmax), .toffset(toffset), .sine(sine), .cosine(cosine), .drive_en(drive_en),
    .step_no(step_no), .quadrant(quadrant));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic check_outputs(input int p, input int m, input logic en);
    int q, k, ang, amp;
    q   = p / m;
    k   = p % m;
    ang = (q % 2 == 0) ? k * (128 / m) : 128 - k * (128 / m);
    amp = (int'(tmax) > int'(toffset)) ? int'(tmax) - int'(toffset) : 0;
    expect_eq("sine",   int'(sine),     en ? ref_mul(amp, ref_sin(ang)) : 0);
    expect_eq("cosine", int'(cosine),   en ? ref_mul(amp, ref_cos(ang)) : 0);
    expect_eq("drive",  int'(drive_en), en ? int'(ref_pattern(dir, q)) : 0);
  endtask

  task automatic segment(input int m, input logic d, input int mx, input int off, input int n);
    int p;
    @(negedge clk);
    por = 1; msr = 8'(m); dir = d; tmax = 10'(mx); toffset = 10'(off); enable = 0;
    @(negedge clk);
    por = 0;
    expect_eq("idle sine", int'(sine), 0);
    enable = 1;
    @(negedge clk);
    p = 0;
    check_outputs(p, m, 1'b1);
    for (int i = 0; i < n; i++) begin
      logic en;
      en = ($urandom_range(15) != 0);
      enable = en; sys_tick = 1;
      @(negedge clk);
      sys_tick = 0;
      if (en) p = (p + 1) % (4 * m);
      @(negedge clk);
      check_outputs(p, m, en);
      // first quadrant of MSR = 8 at full amplitude against the table
      if (en && m == 8 && mx == 1023 && off == 0 && p <= 8 && !d) begin
        real ps;
        ps = 100.0 * real'(sine) / 1023.0;
        checks++;
        if (ps - pct[p] > 0.1 || pct[p] - ps > 0.1) begin
          failures++;
          $display("ERROR table step %0d: %f %% exp %f %%", p, ps, pct[p]);
        end
      end
    end
  endtask

  initial begin
    segment(8, 0, 1023, 0, 70);
    segment(8, 1, 1023, 0, 70);
    segment(4, 0, 1023, 0, 40);
    segment(128, 0, 1023, 100, 1100);
    segment(128, 1, 700, 150, 600);
    segment(2, 1, 512, 0, 20);
    segment(16, 0, 300, 500, 80);     // offset above max: amplitude 0
    for (int r = 0; r < 10; r++)
      segment(1 << $urandom_range(7), 1'($urandom), int'($urandom_range(1023)),
              int'($urandom_range(400)), 150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
