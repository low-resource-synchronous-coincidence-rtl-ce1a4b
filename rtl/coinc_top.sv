// coinc_top: multi-phase synchronous coincidence processor for a dual planar
// PET detector (default: dual phase, 48 + 48 channels).
//
// A coincidence processor clocked at one phase of a fast clock loses pairs of
// triggers that are closer than one period but fall on either side of a clock
// edge. NUM_PHASES identical processors (coinc_processor) are therefore run on
// clock phases spread evenly over one period (0 and 180 degrees by default),
// all seeing the same triggers. A pair that straddles an edge of one phase
// lies entirely within a period of another, so ORing the replicas' outputs
// catches every pair closer than tau/2 and gives a coincidence window of
// 3*tau/2 full width at half maximum with two phases. Each replica carries its
// outputs into the system clock domain on its own; the registered
// system-domain outputs are then ORed here.
//
// The phase clocks and the system clock come from the FPGA's clock manager
// and enter as ports; rst_fast_n[p] must be released synchronously to
// clk_fast[p]. The multi-phase structure and the OR follow the processor's
// description; the generalisation to NUM_PHASES > 2 is a parameter of this
// design.
//
// Outputs are one-cycle system-clock pulses per channel. A pair seen by two
// replicas whose re-synchronized pulses land in adjacent system cycles gives a
// two-cycle output pulse; the acquisition logic should count rising edges.
module coinc_top
  import coinc_pkg::*;
#(
  parameter int unsigned N_A             = DEF_N_A,
  parameter int unsigned N_B             = DEF_N_B,
  parameter int unsigned NUM_PHASES      = DEF_NUM_PHASES,
  parameter int unsigned PIPE_STAGES     = DEF_PIPE_STAGES,
  parameter int unsigned PULSE_CYCLES    = DEF_PULSE_CYCLES,
  parameter int unsigned IN_SYNC_STAGES  = DEF_IN_SYNC_STAGES,
  parameter int unsigned OUT_SYNC_STAGES = DEF_OUT_SYNC_STAGES,
  parameter int unsigned DELAY_CYCLES    = DEF_DELAY_CYCLES
) (
  input  logic [NUM_PHASES-1:0] clk_fast,
  input  logic [NUM_PHASES-1:0] rst_fast_n,
  input  logic                  clk_sys,
  input  logic                  rst_sys_n,
  input  logic [N_A-1:0]        trig_a,
  input  logic [N_B-1:0]        trig_b,
  output logic [N_A-1:0]        coinc_a,
  output logic [N_B-1:0]        coinc_b,
  output logic [N_A-1:0]        rand_a,
  output logic [N_B-1:0]        rand_b
);

  logic [NUM_PHASES-1:0][N_A-1:0] ph_coinc_a, ph_rand_a;
  logic [NUM_PHASES-1:0][N_B-1:0] ph_coinc_b, ph_rand_b;

  for (genvar p = 0; p < NUM_PHASES; p++) begin : g_phase
    coinc_processor #(
      .N_A(N_A), .N_B(N_B), .PIPE_STAGES(PIPE_STAGES), .PULSE_CYCLES(PULSE_CYCLES),
      .IN_SYNC_STAGES(IN_SYNC_STAGES), .OUT_SYNC_STAGES(OUT_SYNC_STAGES),
      .DELAY_CYCLES(DELAY_CYCLES)
    ) u_proc (
      .clk_fast(clk_fast[p]), .rst_fast_n(rst_fast_n[p]),
      .clk_sys, .rst_sys_n,
      .trig_a, .trig_b,
      .coinc_a(ph_coinc_a[p]), .coinc_b(ph_coinc_b[p]),
      .rand_a(ph_rand_a[p]),   .rand_b(ph_rand_b[p]),
      .coinc_a_fast(), .coinc_b_fast(), .rand_a_fast(), .rand_b_fast()
    );
  end

  always_comb begin
    coinc_a = '0;
    coinc_b = '0;
    rand_a  = '0;
    rand_b  = '0;
    for (int unsigned p = 0; p < NUM_PHASES; p++) begin
      coinc_a = coinc_a | ph_coinc_a[p];
      coinc_b = coinc_b | ph_coinc_b[p];
      rand_a  = rand_a  | ph_rand_a[p];
      rand_b  = rand_b  | ph_rand_b[p];
    end
  end

endmodule
