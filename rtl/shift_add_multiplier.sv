// shift_add_multiplier: amplitude times sine (or cosine) fraction.
//
// Multiplies the 10-bit amplitude by a 12-bit unsigned fraction (full scale
// 4095) and keeps the top 10 bits of the 22-bit product, rounded:
//     y = (a * f + 2^(FW-1)) >> FW
// The product is built the shift-and-add way: for every set bit k of the
// fraction, a shifted left by k is added to the sum. All twelve steps are
// unrolled into one combinational adder chain, so a new result is ready in
// the same cycle and the multiplier keeps up with the fastest step rate.
// With a = 1023 and f = 4095 the result is 1023, the DAC's full scale.
//
// From the description: 10-bit and 12-bit inputs, 10-bit output, shift and
// add method. This design's own choices: the rounding, and unrolling the
// shift-and-add steps instead of running them over several clocks.
module shift_add_multiplier
  import microstep_pkg::*;
#(
  parameter int unsigned AW = TORQUE_W,
  parameter int unsigned FW = ROM_W,
  parameter int unsigned YW = OUT_W
) (
  input  logic [AW-1:0] a,   // amplitude
  input  logic [FW-1:0] f,   // fraction, 0..2^FW-1
  output logic [YW-1:0] y
);

  localparam int unsigned PW = AW + FW;

  logic [PW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < FW; k++) begin
      if (f[k]) acc = acc + (PW'(a) << k);
    end
    y = YW'((acc + (PW'(1) << (FW - 1))) >> FW);
  end

endmodule
