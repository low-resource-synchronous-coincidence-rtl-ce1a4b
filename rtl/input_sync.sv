// input_sync: multi-flop synchronizer for asynchronous detector triggers.
//
// Every channel passes through a chain of STAGES flip-flops clocked by the
// fast coincidence clock. The chain gives a metastable first stage
// STAGES-1 clock periods to resolve; its cost is a latency of STAGES periods
// (k*tau), which must exceed the device's metastability resolving time.
// The depth (default 2) is this design's choice. Asynchronous active-low reset
// clears the chain.
//
// Timing: a level present on d before a rising edge appears on q after
// STAGES rising edges (the first of them included).
module input_sync
  import coinc_pkg::*;
#(
  parameter int unsigned WIDTH  = DEF_N_A + DEF_N_B,
  parameter int unsigned STAGES = DEF_IN_SYNC_STAGES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [STAGES-1:0][WIDTH-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else begin
      chain[0] <= d;
      for (int unsigned i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
    end
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 1) else $error("input_sync: STAGES must be at least 1");

endmodule
