// data_latch: one 16-bit output port of the processor interface.
//
// A D-type register clocked by the controller clock with an asynchronous,
// active-high power-on reset. While its chip select is high the register
// takes the data bus on the next rising clock edge; otherwise it holds.
// The output is the stored word, valid from the edge after the write.
//
// From the description: 16-bit D flip-flop latch, clocked, with power-on
// reset and enabled by its chip select. This design's own choice: the chip
// select acts as a synchronous enable rather than an asynchronous one, so
// the whole controller stays in one clock domain, and reset clears to 0.
module data_latch #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         por,    // power-on reset, active high, asynchronous
  input  logic         cs,     // chip select = write enable
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge por) begin
    if (por)     q <= '0;
    else if (cs) q <= d;
  end

endmodule
