// output_sync: carries one-cycle pulses from the fast coincidence clock into
// the slower system clock domain.
//
// A single fast-clock pulse may fall between two system-clock edges, so it is
// not sampled directly. Instead the rising edge of every pulse (a pulse of
// any length counts once) flips a per-channel toggle flag in the fast domain;
// the flag crosses into the system domain through a chain of
// STAGES flip-flops, and each change of the synchronized flag produces one
// registered system-clock pulse. This toggle scheme is this design's choice of
// re-synchronizer.
//
// Rule of use: pulses on one channel must be at least STAGES+2 system-clock
// periods apart, or two of them may merge into one (or cancel).
// Timing: the system pulse appears STAGES+1 to STAGES+2 system cycles after
// the fast pulse begins (plus one fast cycle for the edge detection).
module output_sync
  import coinc_pkg::*;
#(
  parameter int unsigned WIDTH  = 2 * (DEF_N_A + DEF_N_B),
  parameter int unsigned STAGES = DEF_OUT_SYNC_STAGES
) (
  input  logic             clk_fast,
  input  logic             rst_fast_n,
  input  logic             clk_sys,
  input  logic             rst_sys_n,
  input  logic [WIDTH-1:0] pulse_fast,
  output logic [WIDTH-1:0] pulse_sys
);

  logic [WIDTH-1:0]             toggle, pulse_prev;
  logic [STAGES-1:0][WIDTH-1:0] chain;
  logic [WIDTH-1:0]             last;

  always_ff @(posedge clk_fast or negedge rst_fast_n) begin
    if (!rst_fast_n) begin
      toggle     <= '0;
      pulse_prev <= '0;
    end else begin
      pulse_prev <= pulse_fast;
      toggle     <= toggle ^ (pulse_fast & ~pulse_prev);
    end
  end

  always_ff @(posedge clk_sys or negedge rst_sys_n) begin
    if (!rst_sys_n) begin
      chain     <= '0;
      last      <= '0;
      pulse_sys <= '0;
    end else begin
      chain[0] <= toggle;
      for (int unsigned i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
      last      <= chain[STAGES-1];
      pulse_sys <= chain[STAGES-1] ^ last;
    end
  end

  initial assert (STAGES >= 1) else $error("output_sync: STAGES must be at least 1");

endmodule
