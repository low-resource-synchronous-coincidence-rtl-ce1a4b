// tb_gating_network: self-checking test of the synchronous AND-gating network,
// unpipelined and with two pipeline stages. Sparse random pulses are applied
// each cycle; a reference model evaluates the prompt and random coincidence
// equations on the inputs of PIPE_STAGES+1 cycles earlier.
`timescale 1ns/1ps
module tb_gating_network;
  localparam int NA = 5, NB = 7, P = 2;
  typedef struct packed {
    logic [NA-1:0] a;
    logic [NB-1:0] b;
    logic [NA-1:0] ad;
    logic [NB-1:0] bd;
  } in_t;
  typedef struct packed {
    logic [NA-1:0] ca;
    logic [NB-1:0] cb;
    logic [NA-1:0] ra;
    logic [NB-1:0] rb;
  } out_t;

  logic clk = 0, rst_n = 0;
  in_t  stim = '0;
  out_t o0, o2;
  in_t  hist [$];
  int checks = 0, failures = 0, n_coinc = 0, n_rand = 0;

  gating_network #(.N_A(NA), .N_B(NB), .PIPE_STAGES(0)) dut0 (
    .clk, .rst_n, .a(stim.a), .b(stim.b), .a_dly(stim.ad), .b_dly(stim.bd),
    .coinc_a(o0.ca), .coinc_b(o0.cb), .rand_a(o0.ra), .rand_b(o0.rb));
  gating_network #(.N_A(NA), .N_B(NB), .PIPE_STAGES(P)) dut2 (
    .clk, .rst_n, .a(stim.a), .b(stim.b), .a_dly(stim.ad), .b_dly(stim.bd),
    .coinc_a(o2.ca), .coinc_b(o2.cb), .rand_a(o2.ra), .rand_b(o2.rb));

  function automatic out_t model(in_t x);
    out_t r;
    r = '0;
    for (int i = 0; i < NA; i++)
      for (int j = 0; j < NB; j++) begin
        if (x.a[i] && x.b[j])  begin r.ca[i] = 1; r.cb[j] = 1; end
        if (x.a[i] && x.bd[j]) r.ra[i] = 1;
        if (x.b[j] && x.ad[i]) r.rb[j] = 1;
      end
    return r;
  endfunction

  function automatic logic [31:0] sparse(int w);
    logic [31:0] v = '0;
    for (int i = 0; i < w; i++) v[i] = ($urandom_range(7, 0) == 0);
    return v;
  endfunction

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    out_t e0, e2;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < P + 1; i++) hist.push_back('0);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      stim.a  = NA'(sparse(NA));
      stim.b  = NB'(sparse(NB));
      stim.ad = NA'(sparse(NA));
      stim.bd = NB'(sparse(NB));
      hist.push_back(stim);
      @(posedge clk); #1;
      e0 = model(hist[P + 1]);
      e2 = model(hist[1]);
      checks += 2;
      if (o0 !== e0) begin failures++; $display("FAIL cycle %0d: unpipelined %h expected %h", n, o0, e0); end
      if (o2 !== e2) begin failures++; $display("FAIL cycle %0d: pipelined %h expected %h", n, o2, e2); end
      n_coinc += $countones(e2.ca);
      n_rand  += $countones(e2.rb);
      void'(hist.pop_front());
    end
    checks++;
    if (n_coinc < 50 || n_rand < 50) begin failures++; $display("FAIL: too few coincidences exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
