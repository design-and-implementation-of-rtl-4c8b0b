// stepper_drive: FPGA controller for a micro-stepped two-phase stepper
// motor, as used to turn a solar array.
//
// A host processor writes the settings over a 10-bit address / 16-bit data
// I/O bus into the processor interface (ports 100H..107H): step rate,
// direction, enable, micro-stepping ratio, maximum and offset torque. The
// clock generator divides the master clock by the step rate and paces the
// micro steps. The micro-step core produces the two 10-bit winding current
// words (sine for winding A-B, cosine for winding C-D) for external DACs,
// and the A+, B-, C+, D- signals that steer the current polarity in the
// external power drivers.
//
// Everything runs on the master clock CLOCK; POR is an asynchronous,
// active-high power-on reset that leaves the motor disabled until the host
// sets the enable bit. A register write takes effect on the clock edge that
// ends the write cycle. One micro step is taken every STEP_RATE clocks, and
// the outputs change one clock after the step.
//
// From the description: the partition into processor interface, clock
// generation and top module, and every port of the block diagram. This
// design's own choices: SYS_CLK is used as a clock enable (and brought out
// for observation), and the spare ports PORTE..PORTH and the internal
// step number and quadrant are brought out as outputs.
module stepper_drive
  import microstep_pkg::*;
(
  input  logic                clock,     // master clock
  input  logic                por,       // power-on reset, active high
  input  logic [ADDR_W-1:0]   ia,        // IA9-IA0
  input  logic [DATA_W-1:0]   id,        // ID15-ID0
  input  logic                mion,      // low for an I/O cycle
  input  logic                iodis,     // high disables the I/O ports
  input  logic                wrn,       // write strobe, active low
  output logic [OUT_W-1:0]    sine,      // winding A-B current word
  output logic [OUT_W-1:0]    cosine,    // winding C-D current word
  output logic                a_pos,     // A+
  output logic                b_neg,     // B-
  output logic                c_pos,     // C+
  output logic                d_neg,     // D-
  output logic                sys_clk,   // step-rate clock
  output logic [ANGLE_W-1:0]  step_no,   // angle index 0..128
  output logic [1:0]          quadrant,  // 0..3 = quadrant I..IV
  output logic [DATA_W-1:0]   misc_port [4]  // PORTE..PORTH
);

  logic [STEP_RATE_W-1:0] step_rate;
  logic                   direction;
  logic                   enable;
  logic [MSR_W-1:0]       msr;
  logic [TORQUE_W-1:0]    tmax;
  logic [TORQUE_W-1:0]    toffset;
  logic                   sys_tick;
  drive_en_t              drive_en;
  quadrant_e              quadrant_q;

  processor_interface u_pif (
    .clk       (clock),
    .por       (por),
    .ia        (ia),
    .id        (id),
    .mion      (mion),
    .iodis     (iodis),
    .wrn       (wrn),
    .step_rate (step_rate),
    .direction (direction),
    .enable    (enable),
    .msr       (msr),
    .tmax      (tmax),
    .toffset   (toffset),
    .misc_port (misc_port)
  );

  clock_generation u_clkgen (
    .clk       (clock),
    .por       (por),
    .step_rate (step_rate),
    .sys_clk   (sys_clk),
    .sys_tick  (sys_tick)
  );

  microstep_core u_core (
    .clk      (clock),
    .por      (por),
    .sys_tick (sys_tick),
    .enable   (enable),
    .dir      (direction),
    .msr      (msr),
    .tmax     (tmax),
    .toffset  (toffset),
    .sine     (sine),
    .cosine   (cosine),
    .drive_en (drive_en),
    .step_no  (step_no),
    .quadrant (quadrant_q)
  );

  assign a_pos = drive_en.a_pos;
  assign b_neg = drive_en.b_neg;
  assign c_pos = drive_en.c_pos;
  assign d_neg = drive_en.d_neg;
  assign quadrant = quadrant_q;

endmodule
