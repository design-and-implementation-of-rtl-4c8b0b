// sine_cos_rom: angle to sine/cosine converter.
//
// One table holds sin(theta) for theta = i * 90/128 degrees, i = 0..128,
// as 12-bit unsigned fractions of full scale:
//     SIN[i] = round(4095 * sin(i * pi / 256))
// so SIN[0] = 0 and SIN[128] = 4095. The cosine comes from the same table,
// read at the complementary index, cos(theta_i) = SIN[128 - i], so both
// outputs are given at once for one angle input. The table is computed at
// elaboration time; reads are combinational.
//
// Interface: angle is the index 0..128 from the steps counter; values above
// 128 are clamped to 128. sin_theta and cos_theta follow the angle in the
// same cycle.
//
// From the description: 129 entries from 0 to 90 degrees for micro-stepping
// ratios up to 128, a single table serving both sine and cosine, 12-bit
// outputs. This design's own choice: the scaling of full scale to 4095 with
// rounding.
module sine_cos_rom
  import microstep_pkg::*;
#(
  parameter int unsigned STEPS = MAX_MSR,   // table covers 0..STEPS
  parameter int unsigned W     = ROM_W
) (
  input  logic [ANGLE_W-1:0] angle,
  output logic [W-1:0]       sin_theta,
  output logic [W-1:0]       cos_theta
);

  localparam int unsigned DEPTH = STEPS + 1;
  localparam real         PI    = 3.14159265358979323846;

  typedef logic [W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real    full;
    full = real'((1 << W) - 1);
    for (int i = 0; i < DEPTH; i++) begin
      t[i] = W'($rtoi(full * $sin(real'(i) * PI / (2.0 * real'(STEPS))) + 0.5));
    end
    return t;
  endfunction

  localparam table_t SIN_TABLE = build_table();

  logic [ANGLE_W-1:0] idx;

  always_comb begin
    idx       = (angle > ANGLE_W'(STEPS)) ? ANGLE_W'(STEPS) : angle;
    sin_theta = SIN_TABLE[idx];
    cos_theta = SIN_TABLE[ANGLE_W'(STEPS) - idx];
  end

endmodule
