// address_decoder: 3-to-8 chip-select decoder of the processor interface.
//
// A host write cycle selects one of eight output ports. The upper address
// bits IA9..IA3 must match BASE_ADDR (100H by default, so ports sit at
// 100H..107H), the cycle must be an I/O cycle (MION low), I/O must not be
// disabled (IODIS low) and the write strobe must be active (WRN low). The
// low three address bits then pick CS0..CS7; otherwise no chip select is
// active. Purely combinational.
//
// From the description: the 3-8 decoder, its inputs MION, IODIS, WRN and
// IA9-0, the eight chip selects and the 100H-107H window. This design's own
// choice: all three control inputs are taken as active-low enables, and
// WRN takes part in the decode.
module address_decoder
  import microstep_pkg::*;
#(
  parameter int unsigned              AW   = ADDR_W,
  parameter logic [ADDR_W-1:0]        BASE = BASE_ADDR
) (
  input  logic [AW-1:0] ia,      // address bus IA9-IA0
  input  logic          mion,    // memory/IO, low for an I/O cycle
  input  logic          iodis,   // I/O disable, high blocks all selects
  input  logic          wrn,     // write strobe, active low
  output logic [7:0]    cs       // one-hot chip selects CS0..CS7
);

  logic window;

  always_comb begin
    window = (ia[AW-1:3] == BASE[AW-1:3]) && !mion && !iodis && !wrn;
    cs     = '0;
    if (window) cs[ia[2:0]] = 1'b1;
  end

  // At most one port is selected by any bus cycle.
  always_comb assert ($onehot0(cs));

endmodule
