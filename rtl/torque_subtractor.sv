// torque_subtractor: differential amplitude Tmax - Toffset.
//
// Subtracts the offset torque word from the maximum torque word; the
// difference scales both winding currents. If the offset exceeds the
// maximum the result is held at 0 instead of wrapping round to a large
// value. Combinational.
//
// From the description: a 10-bit subtractor of Tmax and Toffset feeding
// both multipliers. This design's own choice: the clamp at 0.
module torque_subtractor
  import microstep_pkg::*;
#(
  parameter int unsigned W = TORQUE_W
) (
  input  logic [W-1:0] tmax,
  input  logic [W-1:0] toffset,
  output logic [W-1:0] amplitude
);

  logic [W:0] diff;

  always_comb begin
    diff      = {1'b0, tmax} - {1'b0, toffset};
    amplitude = diff[W] ? '0 : diff[W-1:0];
  end

endmodule
