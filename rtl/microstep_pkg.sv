// microstep_pkg: constants and types shared by the micro-stepping stepper
// motor controller.
//
// The widths are those of the block diagrams: a 10-bit address bus and a
// 16-bit data bus from the host, a 12-bit step rate, an 8-bit micro-stepping
// ratio (MSR), 10-bit torque words, a 12-bit sine/cosine table and 10-bit
// DAC words. The sine table covers 0..90 degrees in MAX_MSR = 128 steps, so
// it has 129 entries. The drive-enable struct groups the four winding
// steering signals A+, B-, C+ and D-.
package microstep_pkg;

  localparam int unsigned ADDR_W      = 10;   // IA9-IA0
  localparam int unsigned DATA_W      = 16;   // ID15-ID0
  localparam int unsigned NUM_PORTS   = 8;    // PORTA..PORTH
  localparam int unsigned STEP_RATE_W = 12;   // clock divider setting
  localparam int unsigned MSR_W       = 8;    // micro-stepping ratio
  localparam int unsigned TORQUE_W    = 10;   // Tmax, Toffset, amplitude
  localparam int unsigned ROM_W       = 12;   // sin/cos table word
  localparam int unsigned OUT_W       = 10;   // DAC word
  localparam int unsigned MAX_MSR     = 128;  // finest ratio supported
  localparam int unsigned ANGLE_W     = 8;    // angle index 0..MAX_MSR

  // Port addresses 100H..107H.
  localparam logic [ADDR_W-1:0] BASE_ADDR = 10'h100;

  // Bit fields of PORTA (address 100H). The position of the fields inside
  // the 16-bit word is this design's choice.
  localparam int unsigned PORTA_DIR_BIT    = 12;
  localparam int unsigned PORTA_ENABLE_BIT = 13;

  // Winding steering signals. a_pos / b_neg steer the sine current into the
  // two ends of winding A-B, c_pos / d_neg steer the cosine current into
  // winding C-D.
  typedef struct packed {
    logic a_pos;   // A+
    logic b_neg;   // B-
    logic c_pos;   // C+
    logic d_neg;   // D-
  } drive_en_t;

  // Quadrant of the electrical cycle, numbered in the order they are
  // visited for the selected direction.
  typedef enum logic [1:0] {
    QUAD_I   = 2'd0,
    QUAD_II  = 2'd1,
    QUAD_III = 2'd2,
    QUAD_IV  = 2'd3
  } quadrant_e;

  // Direction bit: 0 = counter-clockwise, 1 = clockwise.
  localparam logic DIR_CCW = 1'b0;
  localparam logic DIR_CW  = 1'b1;

  // Winding sequence for each direction and quadrant.
  function automatic drive_en_t drive_pattern(input logic dir, input quadrant_e q);
    drive_en_t d;
    d = '0;
    if (dir == DIR_CCW) begin
      unique case (q)
        QUAD_I:   begin d.a_pos = 1'b1; d.d_neg = 1'b1; end
        QUAD_II:  begin d.a_pos = 1'b1; d.c_pos = 1'b1; end
        QUAD_III: begin d.b_neg = 1'b1; d.c_pos = 1'b1; end
        QUAD_IV:  begin d.b_neg = 1'b1; d.d_neg = 1'b1; end
      endcase
    end else begin
      unique case (q)
        QUAD_I:   begin d.a_pos = 1'b1; d.c_pos = 1'b1; end
        QUAD_II:  begin d.a_pos = 1'b1; d.d_neg = 1'b1; end
        QUAD_III: begin d.b_neg = 1'b1; d.d_neg = 1'b1; end
        QUAD_IV:  begin d.b_neg = 1'b1; d.c_pos = 1'b1; end
      endcase
    end
    return d;
  endfunction

endpackage
