// or_tree_pipe: OR reduction of WIDTH inputs, split over STAGES pipeline
// registers.
//
// Each level ORs groups of FANIN signals, FANIN being the smallest integer
// with FANIN**STAGES >= WIDTH, and registers the result, so the output is the
// OR of the inputs presented STAGES clock cycles earlier. With STAGES = 0 the
// reduction is purely combinational. This is how the gating network of the
// coincidence processor is divided into pipelined stages; the exact division
// (equal fan-in per level) is this design's choice.
module or_tree_pipe
  import coinc_pkg::*;
#(
  parameter int unsigned WIDTH  = DEF_N_B,
  parameter int unsigned STAGES = DEF_PIPE_STAGES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in,
  output logic             out
);

  localparam int unsigned FANIN = tree_fanin(WIDTH, STAGES);

  if (STAGES == 0) begin : g_comb
    assign out = |in;
  end else begin : g_pipe
    for (genvar s = 0; s < STAGES; s++) begin : g_lvl
      localparam int unsigned WI = tree_width(WIDTH, FANIN, s);
      localparam int unsigned WO = tree_width(WIDTH, FANIN, s + 1);
      logic [WI-1:0] lin;
      logic [WO-1:0] r;
      if (s == 0) begin : g_first
        assign lin = in;
      end else begin : g_next
        assign lin = g_lvl[s-1].r;
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          r <= '0;
        end else begin
          for (int unsigned k = 0; k < WO; k++) begin
            logic acc;
            acc = 1'b0;
            for (int unsigned m = 0; m < FANIN; m++)
              if (k * FANIN + m < WI) acc = acc | lin[k*FANIN+m];
            r[k] <= acc;
          end
        end
      end
    end
    assign out = g_lvl[STAGES-1].r[0];
  end

endmodule
