// steps_counter: micro-step position counter and winding sequencer.
//
// The electrical cycle is split into four quadrants of MSR micro steps
// each. Within a quadrant the step number is the angle index into a
// 0..90 degree sine table of MAX_MSR (128) steps, so one micro step moves
// the index by 128/MSR. In quadrants I and III the index climbs from 0
// towards 128, in quadrants II and IV it falls from 128 towards 0: the
// sine and cosine magnitudes then follow |sin| and |cos| of the electrical
// angle, and the winding polarity is set by the drive enables. When the
// index reaches an end of the table the next quadrant begins.
//
// The drive enables A+, B-, C+, D- follow the winding sequence table for
// the selected direction (DIR = 0 counter-clockwise, 1 clockwise). For
// counter-clockwise rotation the quadrants select (A+,D-), (A+,C+),
// (B-,C+), (B-,D-); for clockwise (A+,C+), (A+,D-), (B-,D-), (B-,C+).
//
// Timing: position and enables change on the clock edge where sys_tick
// and ENABLE are both high, one micro step per SYS_CLK period. While
// ENABLE is low the position holds and all enables are low. POR (async,
// active high) returns to quadrant I, index 0.
//
// From the description: MSR values 2..128, the 129-entry angle range, the
// direction bit and the winding table. This design's own choices: the
// up/down index walk that reuses the 0..90 degree table in every quadrant,
// the step size 128/MSR, and how other MSR values are treated (the highest
// set bit counts; MSR = 0 stops the motor, MSR = 1 gives full steps).
module steps_counter
  import microstep_pkg::*;
(
  input  logic               clk,
  input  logic               por,
  input  logic               sys_tick,   // one micro step per pulse
  input  logic               enable,
  input  logic               dir,        // 0 = CCW, 1 = CW
  input  logic [MSR_W-1:0]   msr,        // micro steps per quadrant
  output logic [ANGLE_W-1:0] step_no,    // angle index 0..MAX_MSR
  output quadrant_e          quadrant,
  output drive_en_t          drive_en
);

  localparam logic [ANGLE_W-1:0] TOP = ANGLE_W'(MAX_MSR);

  logic [ANGLE_W-1:0] inc;
  logic               rising;

  // Step size 128 / MSR, from the highest set bit of MSR.
  always_comb begin
    inc = '0;
    for (int b = 0; b < MSR_W; b++) begin
      if (msr[b]) inc = TOP >> b;
    end
  end

  assign rising = (quadrant == QUAD_I) || (quadrant == QUAD_III);

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      step_no  <= '0;
      quadrant <= QUAD_I;
    end else if (sys_tick && enable && inc != '0) begin
      if (rising) begin
        if ({1'b0, step_no} + {1'b0, inc} >= {1'b0, TOP}) begin
          step_no  <= TOP;
          quadrant <= quadrant_e'(quadrant + 2'd1);
        end else begin
          step_no  <= step_no + inc;
        end
      end else begin
        if (step_no <= inc) begin
          step_no  <= '0;
          quadrant <= quadrant_e'(quadrant + 2'd1);
        end else begin
          step_no  <= step_no - inc;
        end
      end
    end
  end

  assign drive_en = enable ? drive_pattern(dir, quadrant) : '0;

  // The index stays inside the table, and the two ends of a winding are
  // never driven at once; when enabled, exactly one end of each is.
  a_index_in_table: assert property (@(posedge clk) disable iff (por) step_no <= TOP);
  a_no_shoot_through: assert property (@(posedge clk) disable iff (por)
    !(drive_en.a_pos && drive_en.b_neg) && !(drive_en.c_pos && drive_en.d_neg));
  a_one_end_each: assert property (@(posedge clk) disable iff (por)
    enable |-> (drive_en.a_pos ^ drive_en.b_neg) && (drive_en.c_pos ^ drive_en.d_neg));

endmodule
