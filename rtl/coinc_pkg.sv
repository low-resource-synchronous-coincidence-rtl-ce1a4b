// coinc_pkg: constants and elaboration-time helpers shared by the synchronous
// coincidence processor.
//
// The default sizes are the largest configuration characterised for this
// processor: two detector subsets of 48 channels each (96 channels in all),
// gated at 288 MHz with four pipeline stages in the gating network, the
// figure needed on a Spartan-3E class device. Synchronizer depths and the
// delayed-window length are this design's own choices.
package coinc_pkg;

  // Channels per detector subset (dual planar geometry: subset A faces B).
  localparam int unsigned DEF_N_A = 48;
  localparam int unsigned DEF_N_B = 48;
  // Pipeline stages splitting the OR reductions of the gating network.
  localparam int unsigned DEF_PIPE_STAGES = 4;
  // Width of the shaped pulses in fast-clock cycles (1 for the multi-phase
  // processor, 2 for the single-clock hazard-recovery variant).
  localparam int unsigned DEF_PULSE_CYCLES = 1;
  // Flip-flops in the fast-domain input synchronizer and in the system-domain
  // re-synchronizer.
  localparam int unsigned DEF_IN_SYNC_STAGES  = 2;
  localparam int unsigned DEF_OUT_SYNC_STAGES = 2;
  // Length of the delayed window used to count random coincidences.
  localparam int unsigned DEF_DELAY_CYCLES = 32;
  // Number of fast-clock phases (replicas of the processor).
  localparam int unsigned DEF_NUM_PHASES = 2;

  // Smallest fan-in g with g**stages >= n: the fan-in of each level of an OR
  // tree that reduces n inputs to one in 'stages' levels.
  function automatic int unsigned tree_fanin(int unsigned n, int unsigned stages);
    int unsigned g;
    int unsigned p;
    if (stages == 0 || n <= 1) return (n < 1) ? 1 : n;
    for (g = 1; g <= n; g++) begin
      p = 1;
      for (int unsigned i = 0; i < stages && p < n; i++) p = p * g;
      if (p >= n) return g;
    end
    return n;
  endfunction

  // Number of signals left after 'level' levels of an OR tree of fan-in g.
  function automatic int unsigned tree_width(int unsigned n, int unsigned g, int unsigned level);
    int unsigned w;
    w = n;
    for (int unsigned i = 0; i < level; i++) w = (w + g - 1) / g;
    return (w < 1) ? 1 : w;
  endfunction

endpackage
