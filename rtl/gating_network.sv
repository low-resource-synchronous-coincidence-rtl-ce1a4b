// gating_network: synchronous AND-gating for a dual planar detector pair.
//
// Each channel A_i of subset A may be in coincidence with any channel B_j of
// subset B. With shaped one-cycle pulses the prompt coincidences are
//   C_A,i = A_i & OR_j B_j        C_B,j = B_j & OR_i A_i
// and the random coincidences of the delayed-window technique gate the prompt
// pulses of one subset with the delayed pulses of the other:
//   R_A,i = A_i & OR_j Bd_j       R_B,j = B_j & OR_i Ad_i
// so every random trigger falls on a prompt event, without waiting for the
// window delay. The equations for C follow the processor's description; the R
// equations are this design's reading of its delayed-window variant.
//
// For wide subsets at high clock rates the OR reductions are split into
// PIPE_STAGES register stages (see or_tree_pipe), and the per-channel pulses
// are delayed by the same number of stages so that they meet the matching OR.
// All outputs are registered.
//
// Timing: an output reflects the inputs PIPE_STAGES+1 cycles earlier.
module gating_network
  import coinc_pkg::*;
#(
  parameter int unsigned N_A         = DEF_N_A,
  parameter int unsigned N_B         = DEF_N_B,
  parameter int unsigned PIPE_STAGES = DEF_PIPE_STAGES
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N_A-1:0] a,
  input  logic [N_B-1:0] b,
  input  logic [N_A-1:0] a_dly,
  input  logic [N_B-1:0] b_dly,
  output logic [N_A-1:0] coinc_a,
  output logic [N_B-1:0] coinc_b,
  output logic [N_A-1:0] rand_a,
  output logic [N_B-1:0] rand_b
);

  logic any_a, any_b, any_a_dly, any_b_dly;
  logic [N_A-1:0] a_al;
  logic [N_B-1:0] b_al;

  or_tree_pipe #(.WIDTH(N_A), .STAGES(PIPE_STAGES)) u_or_a     (.clk, .rst_n, .in(a),     .out(any_a));
  or_tree_pipe #(.WIDTH(N_B), .STAGES(PIPE_STAGES)) u_or_b     (.clk, .rst_n, .in(b),     .out(any_b));
  or_tree_pipe #(.WIDTH(N_A), .STAGES(PIPE_STAGES)) u_or_a_dly (.clk, .rst_n, .in(a_dly), .out(any_a_dly));
  or_tree_pipe #(.WIDTH(N_B), .STAGES(PIPE_STAGES)) u_or_b_dly (.clk, .rst_n, .in(b_dly), .out(any_b_dly));

  // Align the per-channel pulses with the pipelined OR reductions.
  if (PIPE_STAGES == 0) begin : g_no_align
    assign a_al = a;
    assign b_al = b;
  end else begin : g_align
    logic [PIPE_STAGES-1:0][N_A-1:0] a_sr;
    logic [PIPE_STAGES-1:0][N_B-1:0] b_sr;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a_sr <= '0;
        b_sr <= '0;
      end else begin
        a_sr[0] <= a;
        b_sr[0] <= b;
        for (int unsigned i = 1; i < PIPE_STAGES; i++) begin
          a_sr[i] <= a_sr[i-1];
          b_sr[i] <= b_sr[i-1];
        end
      end
    end
    assign a_al = a_sr[PIPE_STAGES-1];
    assign b_al = b_sr[PIPE_STAGES-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coinc_a <= '0;
      coinc_b <= '0;
      rand_a  <= '0;
      rand_b  <= '0;
    end else begin
      coinc_a <= a_al & {N_A{any_b}};
      coinc_b <= b_al & {N_B{any_a}};
      rand_a  <= a_al & {N_A{any_b_dly}};
      rand_b  <= b_al & {N_B{any_a_dly}};
    end
  end

endmodule
