// tb_delay_line: self-checking test of the shift-register delay line.
// Random levels are applied between clock edges; the output must equal the
// input of DELAY edges earlier, and must be zero while reset is held.
`timescale 1ns/1ps
module tb_delay_line;
  localparam int W = 5, S = 9;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.WIDTH(W), .DELAY(S)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL: q not cleared by reset"); end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < S - 1; i++) hist.push_back('0);
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      d = W'($urandom);
      hist.push_back(d);
      @(posedge clk); #1;
      checks++;
      if (q !== hist[0]) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", n, q, hist[0]);
      end
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
