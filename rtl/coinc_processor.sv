// coinc_processor: one synchronous coincidence processor, clocked by a single
// phase of the fast clock.
//
// Asynchronous detector triggers of two facing subsets, A (N_A channels) and
// B (N_B channels), are synchronized to the fast clock, shaped into pulses of
// PULSE_CYCLES cycles and fed to a synchronous AND-gating network. A second
// path delays the synchronized triggers by DELAY_CYCLES before shaping them;
// the gating network uses it to flag random coincidences (delayed-window
// technique). The four groups of coincidence triggers are then carried into
// the system clock domain by a toggle re-synchronizer.
//
//   trig --> input_sync --+--> pulse_shaper -----------------> gating --> output_sync --> *_sys
//                         +--> delay_line --> pulse_shaper ---^
//
// Two triggers are reported as coincident when their rising edges are
// captured in the same fast-clock period (one-cycle pulses) or in adjacent
// periods (two-cycle pulses). The block structure follows the processor's
// description; synchronizer depths, delay length and the re-synchronizer
// mechanism are this design's choices.
//
// Timing (fast cycles, counted from the first rising edge that samples a
// trigger high): the fast-domain outputs *_fast go high
// IN_SYNC_STAGES + PIPE_STAGES + 1 edges later; the system-domain outputs
// follow OUT_SYNC_STAGES+1 to OUT_SYNC_STAGES+2 system cycles after that.
module coinc_processor
  import coinc_pkg::*;
#(
  parameter int unsigned N_A             = DEF_N_A,
  parameter int unsigned N_B             = DEF_N_B,
  parameter int unsigned PIPE_STAGES     = DEF_PIPE_STAGES,
  parameter int unsigned PULSE_CYCLES    = DEF_PULSE_CYCLES,
  parameter int unsigned IN_SYNC_STAGES  = DEF_IN_SYNC_STAGES,
  parameter int unsigned OUT_SYNC_STAGES = DEF_OUT_SYNC_STAGES,
  parameter int unsigned DELAY_CYCLES    = DEF_DELAY_CYCLES
) (
  input  logic           clk_fast,
  input  logic           rst_fast_n,
  input  logic           clk_sys,
  input  logic           rst_sys_n,
  input  logic [N_A-1:0] trig_a,
  input  logic [N_B-1:0] trig_b,
  // system-clock-domain coincidence outputs
  output logic [N_A-1:0] coinc_a,
  output logic [N_B-1:0] coinc_b,
  output logic [N_A-1:0] rand_a,
  output logic [N_B-1:0] rand_b,
  // the same triggers in the fast domain, before re-synchronization
  output logic [N_A-1:0] coinc_a_fast,
  output logic [N_B-1:0] coinc_b_fast,
  output logic [N_A-1:0] rand_a_fast,
  output logic [N_B-1:0] rand_b_fast
);

  localparam int unsigned N = N_A + N_B;

  logic [N-1:0] trig_sync, trig_dly, pulse, pulse_dly;

  input_sync #(.WIDTH(N), .STAGES(IN_SYNC_STAGES)) u_in_sync (
    .clk(clk_fast), .rst_n(rst_fast_n), .d({trig_b, trig_a}), .q(trig_sync)
  );

  pulse_shaper #(.WIDTH(N), .PULSE_CYCLES(PULSE_CYCLES)) u_shaper (
    .clk(clk_fast), .rst_n(rst_fast_n), .d(trig_sync), .q(pulse)
  );

  delay_line #(.WIDTH(N), .DELAY(DELAY_CYCLES)) u_delay (
    .clk(clk_fast), .rst_n(rst_fast_n), .d(trig_sync), .q(trig_dly)
  );

  pulse_shaper #(.WIDTH(N), .PULSE_CYCLES(PULSE_CYCLES)) u_shaper_dly (
    .clk(clk_fast), .rst_n(rst_fast_n), .d(trig_dly), .q(pulse_dly)
  );

  gating_network #(.N_A(N_A), .N_B(N_B), .PIPE_STAGES(PIPE_STAGES)) u_gating (
    .clk(clk_fast), .rst_n(rst_fast_n),
    .a(pulse[N_A-1:0]),         .b(pulse[N-1:N_A]),
    .a_dly(pulse_dly[N_A-1:0]), .b_dly(pulse_dly[N-1:N_A]),
    .coinc_a(coinc_a_fast), .coinc_b(coinc_b_fast),
    .rand_a(rand_a_fast),   .rand_b(rand_b_fast)
  );

  output_sync #(.WIDTH(2 * N), .STAGES(OUT_SYNC_STAGES)) u_out_sync (
    .clk_fast, .rst_fast_n, .clk_sys, .rst_sys_n,
    .pulse_fast({rand_b_fast, rand_a_fast, coinc_b_fast, coinc_a_fast}),
    .pulse_sys ({rand_b, rand_a, coinc_b, coinc_a})
  );

endmodule
