// tb_pulse_shaper: self-checking test of the edge-to-pulse shaper, with
// one-cycle and two-cycle pulses. A reference model keeps the input history:
// a rising edge seen at cycle t must give a pulse over cycles t+1 ..
// t+PULSE_CYCLES, and nothing else.
`timescale 1ns/1ps
module tb_pulse_shaper;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d = '0, q1, q2;
  logic [W-1:0] prev = '0, rise_0 = '0, rise_1 = '0;
  int checks = 0, failures = 0, pulses = 0;

  pulse_shaper #(.WIDTH(W), .PULSE_CYCLES(1)) dut1 (.clk, .rst_n, .d, .q(q1));
  pulse_shaper #(.WIDTH(W), .PULSE_CYCLES(2)) dut2 (.clk, .rst_n, .d, .q(q2));

  always #5 clk = ~clk;

  initial begin
    #30000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // levels change rarely so that isolated and back-to-back edges both occur
      for (int i = 0; i < W; i++) if ($urandom_range(2, 0) == 0) d[i] = ~d[i];
      @(posedge clk);
      rise_1 = rise_0;
      rise_0 = d & ~prev;
      prev   = d;
      #1;
      checks += 2;
      if (q1 !== rise_0) begin
        failures++; $display("FAIL cycle %0d: 1-cycle q=%b expected %b", n, q1, rise_0);
      end
      if (q2 !== (rise_0 | rise_1)) begin
        failures++; $display("FAIL cycle %0d: 2-cycle q=%b expected %b", n, q2, rise_0 | rise_1);
      end
      pulses += $countones(rise_0);
    end
    checks++;
    if (pulses < 50) begin failures++; $display("FAIL: too few edges exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
