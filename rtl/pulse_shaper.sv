// pulse_shaper: turns each rising edge of a synchronized trigger into a pulse
// of exactly PULSE_CYCLES fast-clock cycles.
//
// A registered copy of the input is compared with the input to find rising
// edges; each edge is registered and, for PULSE_CYCLES > 1, kept for further
// cycles in a short shift register whose taps are ORed. With one-cycle pulses
// two triggers are coincident only if they rise within the same clock period;
// two-cycle pulses also catch pairs that straddle one clock edge. An edge that
// arrives while a longer pulse is still high extends it (this design's
// choice).
//
// Timing: q rises one cycle after the first cycle d is seen high, and stays
// high PULSE_CYCLES cycles.
module pulse_shaper
  import coinc_pkg::*;
#(
  parameter int unsigned WIDTH        = DEF_N_A + DEF_N_B,
  parameter int unsigned PULSE_CYCLES = DEF_PULSE_CYCLES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0]                    prev;
  logic [PULSE_CYCLES-1:0][WIDTH-1:0]  hist;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0;
      hist <= '0;
    end else begin
      prev    <= d;
      hist[0] <= d & ~prev;
      for (int unsigned i = 1; i < PULSE_CYCLES; i++) hist[i] <= hist[i-1];
    end
  end

  always_comb begin
    q = '0;
    for (int unsigned i = 0; i < PULSE_CYCLES; i++) q = q | hist[i];
  end

  initial assert (PULSE_CYCLES >= 1) else $error("pulse_shaper: PULSE_CYCLES must be at least 1");

  // An edge is detected at most once: the edge register is never high in two
  // consecutive cycles.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (hist[0] & $past(hist[0])) == '0)
    else $error("pulse_shaper: edge detected in two consecutive cycles");

endmodule
