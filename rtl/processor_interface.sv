// processor_interface: register file written by the host processor.
//
// The host writes 16-bit words to eight I/O addresses, 100H..107H. An
// address decoder turns the write cycle into one of eight chip selects, and
// each chip select loads one 16-bit data latch (PORTA..PORTH). The latched
// words are split into the controller's settings:
//   PORTA (100H): ID11..ID0 step rate, ID12 direction, ID13 enable
//   PORTB (101H): ID7..ID0 micro-stepping ratio (MSR)
//   PORTC (102H): ID9..ID0 maximum torque Tmax
//   PORTD (103H): ID9..ID0 offset torque Toffset
//   PORTE..PORTH (104H..107H): spare, brought out whole
// A setting changes on the clock edge that ends the write cycle, one cycle
// after WRN goes low with a valid address. All settings reset to 0 on POR,
// so the controller starts disabled.
//
// From the description: the decoder, the eight latches, the address window
// and what each of PORTA..PORTD holds. This design's own choice: where each
// field sits inside its 16-bit word.
module processor_interface
  import microstep_pkg::*;
(
  input  logic                    clk,
  input  logic                    por,
  input  logic [ADDR_W-1:0]       ia,
  input  logic [DATA_W-1:0]       id,
  input  logic                    mion,
  input  logic                    iodis,
  input  logic                    wrn,
  output logic [STEP_RATE_W-1:0]  step_rate,
  output logic                    direction,
  output logic                    enable,
  output logic [MSR_W-1:0]        msr,
  output logic [TORQUE_W-1:0]     tmax,
  output logic [TORQUE_W-1:0]     toffset,
  output logic [DATA_W-1:0]       misc_port [4]   // PORTE..PORTH
);

  logic [NUM_PORTS-1:0] cs;
  logic [DATA_W-1:0]    port [NUM_PORTS];

  address_decoder u_decoder (
    .ia    (ia),
    .mion  (mion),
    .iodis (iodis),
    .wrn   (wrn),
    .cs    (cs)
  );

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_port
    data_latch #(.W(DATA_W)) u_latch (
      .clk (clk),
      .por (por),
      .cs  (cs[i]),
      .d   (id),
      .q   (port[i])
    );
  end

  assign step_rate = port[0][STEP_RATE_W-1:0];
  assign direction = port[0][PORTA_DIR_BIT];
  assign enable    = port[0][PORTA_ENABLE_BIT];
  assign msr       = port[1][MSR_W-1:0];
  assign tmax      = port[2][TORQUE_W-1:0];
  assign toffset   = port[3][TORQUE_W-1:0];

  for (genvar i = 0; i < 4; i++) begin : g_misc
    assign misc_port[i] = port[4+i];
  end

endmodule
