// microstep_core: micro-stepping current command generator.
//
// Turns the controller settings into the two winding current words and the
// four winding steering signals. The steps counter walks an angle index
// over the electrical cycle, one micro step per sys_tick. The sine/cosine
// table converts the index into sin(theta) and cos(theta). The subtractor
// forms the amplitude Tmax - Toffset, and two shift-and-add multipliers
// scale the sine and cosine by it, giving the 10-bit SINE and COSINE words
// for the external DACs. A+ and B- steer the sine current into winding A-B
// with one or the other polarity, C+ and D- do the same for the cosine in
// winding C-D.
//
// Timing: the outputs are registered. They follow a step one master-clock
// cycle after the steps counter moves, and the drive enables are delayed
// with them so that all six outputs change together. While ENABLE is low,
// or during POR, all outputs are 0.
//
// Interface: master clock and POR, sys_tick from the clock generator, and
// the settings from the processor interface (ENABLE, DIR, MSR, TMAX,
// TOFFSET). step_no and quadrant are brought out for observation.
//
// From the description: the four sub-blocks and how they connect, the
// widths, and that the outputs are active only when POR is low and ENABLE
// is high. This design's own choice: the output register stage.
module microstep_core
  import microstep_pkg::*;
(
  input  logic                 clk,
  input  logic                 por,
  input  logic                 sys_tick,
  input  logic                 enable,
  input  logic                 dir,
  input  logic [MSR_W-1:0]     msr,
  input  logic [TORQUE_W-1:0]  tmax,
  input  logic [TORQUE_W-1:0]  toffset,
  output logic [OUT_W-1:0]     sine,
  output logic [OUT_W-1:0]     cosine,
  output drive_en_t            drive_en,
  output logic [ANGLE_W-1:0]   step_no,
  output quadrant_e            quadrant
);

  drive_en_t            drive_en_next;
  logic [ROM_W-1:0]     sin_theta;
  logic [ROM_W-1:0]     cos_theta;
  logic [TORQUE_W-1:0]  amplitude;
  logic [OUT_W-1:0]     sine_next;
  logic [OUT_W-1:0]     cosine_next;

  steps_counter u_steps (
    .clk      (clk),
    .por      (por),
    .sys_tick (sys_tick),
    .enable   (enable),
    .dir      (dir),
    .msr      (msr),
    .step_no  (step_no),
    .quadrant (quadrant),
    .drive_en (drive_en_next)
  );

  sine_cos_rom u_rom (
    .angle     (step_no),
    .sin_theta (sin_theta),
    .cos_theta (cos_theta)
  );

  torque_subtractor u_sub (
    .tmax      (tmax),
    .toffset   (toffset),
    .amplitude (amplitude)
  );

  shift_add_multiplier u_mul_sine (
    .a (amplitude),
    .f (sin_theta),
    .y (sine_next)
  );

  shift_add_multiplier u_mul_cosine (
    .a (amplitude),
    .f (cos_theta),
    .y (cosine_next)
  );

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      sine     <= '0;
      cosine   <= '0;
      drive_en <= '0;
    end else if (enable) begin
      sine     <= sine_next;
      cosine   <= cosine_next;
      drive_en <= drive_en_next;
    end else begin
      sine     <= '0;
      cosine   <= '0;
      drive_en <= '0;
    end
  end

endmodule
