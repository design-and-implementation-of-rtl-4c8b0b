// clock_generation: step-rate clock divider.
//
// Divides the master clock by the 12-bit step rate. A 12-bit up-counter
// runs on the master clock and is compared with STEP_RATE/2; when it
// reaches the half period it restarts and SYS_CLK changes level, so one
// SYS_CLK period lasts STEP_RATE master-clock periods (a step rate of 2
// gives a SYS_CLK of half the clock frequency). Odd step rates round down
// to the even value below; step rates 0 and 1 behave like 2.
//
// Besides the SYS_CLK square wave, the block gives sys_tick, a one-cycle
// pulse in the master-clock cycle whose closing edge is SYS_CLK's rising
// edge. The rest of the controller runs on the master clock and uses
// sys_tick as a clock enable, which has the same effect as clocking it with
// SYS_CLK but keeps a single clock domain.
//
// From the description: the counter, the comparison with STEP_RATE/2 that
// restarts it, and the period of STEP_RATE clocks. This design's own
// choices: the counter restarts one count earlier than a literal compare
// with STEP_RATE/2 would, so that the period is exactly STEP_RATE clocks
// as the description states, and the clock-enable form of SYS_CLK.
module clock_generation
  import microstep_pkg::*;
#(
  parameter int unsigned W = STEP_RATE_W
) (
  input  logic         clk,        // master clock
  input  logic         por,        // power-on reset, active high
  input  logic [W-1:0] step_rate,  // SYS_CLK period in master-clock cycles
  output logic         sys_clk,    // divided clock, 50 % duty for even rates
  output logic         sys_tick    // one-cycle pulse before each SYS_CLK rise
);

  logic [W-1:0] count;
  logic [W-1:0] half;
  logic         wrap;

  always_comb begin
    half = step_rate >> 1;
    if (half == '0) half = W'(1);
    wrap     = (count >= half - W'(1));
    sys_tick = wrap && !sys_clk;
  end

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      count   <= '0;
      sys_clk <= 1'b0;
    end else if (wrap) begin
      count   <= '0;
      sys_clk <= !sys_clk;
    end else begin
      count   <= count + W'(1);
    end
  end

endmodule
