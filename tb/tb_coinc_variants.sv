// tb_coinc_variants: coincidence-window sweep for the clocking variants of
// the processor, each built from coinc_top with 2 + 2 channels:
//   v0  single clock at 288 MHz, one-cycle pulses   (expected window tau)
//   v1  single clock at 288 MHz, two-cycle pulses   (expected window 3*tau)
//   v2  four phases of a 192 MHz clock, one-cycle pulses
//                                                   (expected window 7*tau/4)
// The default two-phase configuration is swept by tb_coinc_top.
// One A and one B channel fire with an offset stepped from -12 ns to +12 ns
// in 20 ps steps at a random position in the clock period. For every offset
// and variant a reference model decides from the capture edges whether the
// pair must be reported (same edge in some phase; edges at most one apart for
// two-cycle pulses), and the system-domain outputs are checked for exactly
// that. The detection efficiency integrated over the offset (the window
// area) is compared with the value expected for each variant.
`timescale 1ps/1ps
module tb_coinc_variants;
  localparam int NA = 2, NB = 2, NV = 3, D = 8;
  localparam longint T0 = 10000, TS = 13888;
  localparam longint TF [NV] = '{3472, 3472, 5208};
  localparam int     NPV [NV] = '{1, 1, 4};
  localparam int     PCV [NV] = '{1, 2, 1};
  localparam real    AREA [NV] = '{1.0, 3.0, 1.75};

  logic clk_sys = 0, rst_sys_n = 0;
  logic [0:0] clk0 = '0, clk1 = '0, rst0 = '0, rst1 = '0;
  logic [3:0] clk2 = '0, rst2 = '0;
  logic [NA-1:0] ta = '0;
  logic [NB-1:0] tb = '0;
  logic [NA-1:0] ca [NV], ra [NV];
  logic [NB-1:0] cb [NV], rb [NV];
  int checks = 0, failures = 0;
  longint hits [NV];

  coinc_top #(.N_A(NA), .N_B(NB), .NUM_PHASES(1), .PIPE_STAGES(0), .PULSE_CYCLES(1), .DELAY_CYCLES(D)) v0 (
    .clk_fast(clk0), .rst_fast_n(rst0), .clk_sys, .rst_sys_n, .trig_a(ta), .trig_b(tb),
    .coinc_a(ca[0]), .coinc_b(cb[0]), .rand_a(ra[0]), .rand_b(rb[0]));
  coinc_top #(.N_A(NA), .N_B(NB), .NUM_PHASES(1), .PIPE_STAGES(0), .PULSE_CYCLES(2), .DELAY_CYCLES(D)) v1 (
    .clk_fast(clk1), .rst_fast_n(rst1), .clk_sys, .rst_sys_n, .trig_a(ta), .trig_b(tb),
    .coinc_a(ca[1]), .coinc_b(cb[1]), .rand_a(ra[1]), .rand_b(rb[1]));
  coinc_top #(.N_A(NA), .N_B(NB), .NUM_PHASES(4), .PIPE_STAGES(0), .PULSE_CYCLES(1), .DELAY_CYCLES(D)) v2 (
    .clk_fast(clk2), .rst_fast_n(rst2), .clk_sys, .rst_sys_n, .trig_a(ta), .trig_b(tb),
    .coinc_a(ca[2]), .coinc_b(cb[2]), .rand_a(ra[2]), .rand_b(rb[2]));

  initial begin #T0; forever begin clk0 = 1; clk1 = 1; #(TF[0]/2); clk0 = 0; clk1 = 0; #(TF[0]/2); end end
  for (genvar p = 0; p < 4; p++) begin : g_c2
    initial begin #(T0 + p * TF[2] / 4); forever begin clk2[p] = 1; #(TF[2]/2); clk2[p] = 0; #(TF[2]/2); end end
  end
  initial begin #3333; forever begin clk_sys = 1; #(TS/2); clk_sys = 0; #(TS/2); end end

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int e_ca [NV], e_cb [NV], e_r [NV];
  logic [NA-1:0] ca_q [NV];
  logic [NB-1:0] cb_q [NV];
  int cur_i, cur_j;
  always @(posedge clk_sys) begin
    #1;
    for (int v = 0; v < NV; v++) begin
      if (ca[v][cur_i] && !ca_q[v][cur_i]) e_ca[v]++;
      if (cb[v][cur_j] && !cb_q[v][cur_j]) e_cb[v]++;
      if (ra[v] != '0 || rb[v] != '0) e_r[v]++;
      if ((ca[v] & ~(NA'(1) << cur_i)) != '0 || (cb[v] & ~(NB'(1) << cur_j)) != '0) e_r[v]++;
      ca_q[v] = ca[v];
      cb_q[v] = cb[v];
    end
  end

  function automatic longint cap(int v, longint t, int p);
    return (t - T0 - p * TF[v] / NPV[v]) / TF[v] + 1;
  endfunction

  // true if t is within 150 ps of a fast edge of any variant
  function automatic bit near_edge(longint t);
    for (int v = 0; v < NV; v++) begin
      longint q = TF[v] / NPV[v];
      longint ph = (t - T0) % q;
      if (ph < 150 || ph > q - 150) return 1;
    end
    return 0;
  endfunction

  function automatic longint safe_time(longint t);
    while (near_edge(t)) t += 37;
    return t;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    longint t0, tA, tB;
    repeat (4) @(posedge clk_sys);
    rst_sys_n = 1;
    @(negedge clk0[0]); rst0 = '1; rst1 = '1;
    for (int p = 0; p < 4; p++) begin @(negedge clk2[p]); rst2[p] = 1; end
    #50000;
    for (int v = 0; v < NV; v++) hits[v] = 0;
    for (int k = -600; k <= 600; k++) begin
      bit exp [NV];
      t0 = $time;
      cur_i = $urandom_range(NA - 1, 0);
      cur_j = $urandom_range(NB - 1, 0);
      for (int v = 0; v < NV; v++) begin e_ca[v] = 0; e_cb[v] = 0; e_r[v] = 0; end
      tA = safe_time(t0 + 20000 + longint'($urandom_range(20000, 0)));
      tB = safe_time(tA + 20 * k);
      for (int v = 0; v < NV; v++) begin
        exp[v] = 0;
        for (int p = 0; p < NPV[v]; p++) begin
          longint dk;
          dk = cap(v, tA, p) - cap(v, tB, p);
          if (dk == 0 || (PCV[v] == 2 && (dk == 1 || dk == -1))) exp[v] = 1;
        end
      end
      fork
        begin #(tA - $time); ta[cur_i] = 1; #12000; ta[cur_i] = 0; end
        begin #(tB - $time); tb[cur_j] = 1; #12000; tb[cur_j] = 0; end
      join
      #(t0 + 250000 - $time);
      for (int v = 0; v < NV; v++) begin
        check(e_ca[v] == int'(exp[v]) && e_cb[v] == int'(exp[v]),
              $sformatf("variant %0d offset %0d ps: %0d/%0d edges, expected %0d", v, tB - tA, e_ca[v], e_cb[v], exp[v]));
        check(e_r[v] == 0, $sformatf("variant %0d: spurious output", v));
        if (exp[v]) hits[v]++;
      end
    end
    for (int v = 0; v < NV; v++) begin
      real area;
      area = real'(hits[v]) * 20.0 / real'(TF[v]);
      $display("variant %0d: window area %0.3f periods = %0.2f ns (expected %0.2f periods)",
               v, area, area * real'(TF[v]) / 1000.0, AREA[v]);
      check(area > AREA[v] - 0.2 && area < AREA[v] + 0.2, $sformatf("variant %0d window width", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
