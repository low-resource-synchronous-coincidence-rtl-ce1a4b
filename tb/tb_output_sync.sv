// tb_output_sync: self-checking test of the fast-to-system pulse
// re-synchronizer. One-cycle pulses are produced on random channels of a
// 288 MHz domain, spaced at least STAGES+2 system periods apart per channel;
// every pulse must arrive as exactly one 72 MHz pulse on the same channel,
// STAGES+1 to STAGES+2 system cycles after it was sent.
`timescale 1ps/1ps
module tb_output_sync;
  localparam int W = 4, S = 2;
  localparam int TF = 3472, TS = 13888;
  logic clk_fast = 0, clk_sys = 0, rst_fast_n = 0, rst_sys_n = 0;
  logic [W-1:0] pf = '0, ps;
  int checks = 0, failures = 0;
  int sent [W], got [W];
  longint t_sent [W];
  longint t_last_sys [W];

  output_sync #(.WIDTH(W), .STAGES(S)) dut (.clk_fast, .rst_fast_n, .clk_sys, .rst_sys_n,
                                            .pulse_fast(pf), .pulse_sys(ps));

  always #(TF/2) clk_fast = ~clk_fast;
  initial begin #777; forever #(TS/2) clk_sys = ~clk_sys; end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: count system pulses and check their latency
  always @(posedge clk_sys) begin
    #1;
    for (int i = 0; i < W; i++)
      if (rst_sys_n && ps[i]) begin
        longint lat;
        got[i]++;
        lat = $time - t_sent[i];
        checks++;
        if (lat < longint'(S) * TS || lat > longint'(S + 3) * TS) begin
          failures++;
          $display("FAIL ch %0d: latency %0d ps", i, lat);
        end
      end
  end

  initial begin
    for (int i = 0; i < W; i++) begin sent[i] = 0; got[i] = 0; t_sent[i] = 0; t_last_sys[i] = -1000000; end
    repeat (4) @(posedge clk_sys);
    rst_sys_n = 1;
    @(negedge clk_fast) rst_fast_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk_fast);
      pf = '0;
      for (int i = 0; i < W; i++)
        if ($urandom_range(15, 0) == 0 && $time - t_last_sys[i] > longint'(S + 3) * TS) begin
          pf[i] = 1'b1;
          sent[i]++;
          t_sent[i] = $time + TF / 2;
          t_last_sys[i] = $time;
        end
      @(negedge clk_fast);
      pf = '0;
    end
    repeat (10) @(posedge clk_sys);
    for (int i = 0; i < W; i++) begin
      checks++;
      if (sent[i] != got[i] || sent[i] < 20) begin
        failures++;
        $display("FAIL ch %0d: sent %0d received %0d", i, sent[i], got[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
