// delay_line: shift-register delay for the delayed-window random count.
//
// Each channel is delayed by DELAY clock cycles through a chain of
// flip-flops. The delayed triggers feed their own shaper and the random
// coincidence terms of the gating network. The length (default 32 cycles,
// about 111 ns at 288 MHz, well outside the coincidence window) is this
// design's choice; the shift-register construction follows the processor's
// description.
//
// Timing: q equals d as it was DELAY rising edges earlier.
module delay_line
  import coinc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_N_A + DEF_N_B,
  parameter int unsigned DELAY = DEF_DELAY_CYCLES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [DELAY-1:0][WIDTH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else begin
      sr[0] <= d;
      for (int unsigned i = 1; i < DELAY; i++) sr[i] <= sr[i-1];
    end
  end

  assign q = sr[DELAY-1];

  initial assert (DELAY >= 1) else $error("delay_line: DELAY must be at least 1");

endmodule
