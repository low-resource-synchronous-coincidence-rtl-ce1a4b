// tb_coinc_top: end-to-end test of the multi-phase coincidence processor at
// its default configuration (48 + 48 channels, two phases of a 288 MHz clock,
// four gating pipeline stages, 32-cycle delayed window, 72 MHz system clock).
//
// Trials, each 300 ns long:
//  * a delay sweep: one A and one B channel fire with an offset stepped from
//    -10 ns to +10 ns in 20 ps steps, at a random position in the clock period;
//  * random-coincidence trials: B fires about one delayed window before A;
//  * multi-channel trials: two A channels and two B channels fire together;
//  * single triggers, which must give nothing.
// A reference model computes, for every phase, the fast-clock edge that first
// samples each trigger. A prompt coincidence is expected on a channel when a
// partner of the other subset is captured by the same edge in at least one
// phase; a random one when the partner's capture edge plus the window delay
// equals the channel's own. Every channel of every output is checked for the
// expected number of system-clock rising edges (0 or 1), and the first edge
// for a bounded latency. The sweep's detection efficiency integrated over the
// offset must be close to 3/2 of the fast period, the dual-phase window.
// Mechanisms counted, each required at least once: coincidences caught by one
// phase only (hazard recovery), by both, pairs rejected, random
// coincidences, multi-channel coincidences.
`timescale 1ps/1ps
module tb_coinc_top;
  import coinc_pkg::*;
  localparam int NA = DEF_N_A, NB = DEF_N_B, NP = DEF_NUM_PHASES;
  localparam int P = DEF_PIPE_STAGES, SI = DEF_IN_SYNC_STAGES, SO = DEF_OUT_SYNC_STAGES;
  localparam int D = DEF_DELAY_CYCLES;
  localparam longint TF = 3472, TS = 13888, T0 = 10000;
  localparam longint TRIAL = 300000;
  localparam int MAXEV = 4;

  logic [NP-1:0] clk_fast = '0, rst_fast_n = '0;
  logic clk_sys = 0, rst_sys_n = 0;
  logic [NA-1:0] ta = '0;
  logic [NB-1:0] tb = '0;
  logic [NA-1:0] ca, ra;
  logic [NB-1:0] cb, rb;
  int checks = 0, failures = 0;
  int n_one_phase = 0, n_both = 0, n_reject = 0, n_random = 0, n_multi = 0;
  longint sweep_hits = 0, sweep_n = 0;

  coinc_top dut (.clk_fast, .rst_fast_n, .clk_sys, .rst_sys_n, .trig_a(ta), .trig_b(tb),
                 .coinc_a(ca), .coinc_b(cb), .rand_a(ra), .rand_b(rb));

  for (genvar p = 0; p < NP; p++) begin : g_clk
    initial begin
      #(T0 + p * TF / NP);
      forever begin clk_fast[p] = 1; #(TF/2); clk_fast[p] = 0; #(TF/2); end
    end
  end
  initial begin #3333; forever begin clk_sys = 1; #(TS/2); clk_sys = 0; #(TS/2); end end

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // system-domain observation: rising edges per channel, first edge time
  int     e_ca [NA], e_ra [NA], e_cb [NB], e_rb [NB];
  longint f_ca [NA], f_cb [NB];
  logic [NA-1:0] ca_q = '0, ra_q = '0;
  logic [NB-1:0] cb_q = '0, rb_q = '0;
  always @(posedge clk_sys) begin
    #1;
    for (int i = 0; i < NA; i++) begin
      if (ca[i] && !ca_q[i]) begin if (e_ca[i] == 0) f_ca[i] = $time; e_ca[i]++; end
      if (ra[i] && !ra_q[i]) e_ra[i]++;
    end
    for (int j = 0; j < NB; j++) begin
      if (cb[j] && !cb_q[j]) begin if (e_cb[j] == 0) f_cb[j] = $time; e_cb[j]++; end
      if (rb[j] && !rb_q[j]) e_rb[j]++;
    end
    ca_q = ca; ra_q = ra; cb_q = cb; rb_q = rb;
  end

  function automatic longint cap(longint t, int p);
    return (t - T0 - p * TF / NP) / TF + 1;
  endfunction

  function automatic longint safe_time(longint t);
    longint q, ph;
    q = TF / NP;
    ph = (t - T0) % q;
    if (ph < 150) return t + 150 - ph;
    if (ph > q - 150) return t + (q - ph) + 150;
    return t;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // One trial with up to MAXEV events; side 0 = A, 1 = B.
  int     ev_n;
  int     ev_side [MAXEV], ev_ch [MAXEV];
  longint ev_t [MAXEV];

  task automatic run_trial(output int n_prompt_phases);
    longint t0;
    int exp_ca [NA], exp_ra [NA], exp_cb [NB], exp_rb [NB];
    longint last_cap [NA + NB];
    t0 = $time;
    for (int i = 0; i < NA; i++) begin e_ca[i] = 0; e_ra[i] = 0; exp_ca[i] = 0; exp_ra[i] = 0; end
    for (int j = 0; j < NB; j++) begin e_cb[j] = 0; e_rb[j] = 0; exp_cb[j] = 0; exp_rb[j] = 0; end
    n_prompt_phases = 0;
    // reference model
    for (int p = 0; p < NP; p++) begin
      bit hit = 0;
      for (int x = 0; x < ev_n; x++)
        for (int y = 0; y < ev_n; y++)
          if (ev_side[x] == 0 && ev_side[y] == 1) begin
            if (cap(ev_t[x], p) == cap(ev_t[y], p)) begin
              exp_ca[ev_ch[x]] = 1; exp_cb[ev_ch[y]] = 1; hit = 1;
            end
            if (cap(ev_t[x], p) == cap(ev_t[y], p) + D) exp_ra[ev_ch[x]] = 1;
            if (cap(ev_t[y], p) == cap(ev_t[x], p) + D) exp_rb[ev_ch[y]] = 1;
          end
      if (hit) n_prompt_phases++;
    end
    for (int x = 0; x < ev_n; x++) begin
      longint c = cap(ev_t[x], 0);
      for (int p = 1; p < NP; p++) if (cap(ev_t[x], p) > c) c = cap(ev_t[x], p);
      last_cap[x] = c;
    end
    // stimulus: 10 ns wide triggers
    for (int x = 0; x < ev_n; x++) begin
      automatic int xx = x;
      fork
        begin
          #(ev_t[xx] - $time);
          if (ev_side[xx] == 0) ta[ev_ch[xx]] = 1; else tb[ev_ch[xx]] = 1;
          #10000;
          if (ev_side[xx] == 0) ta[ev_ch[xx]] = 0; else tb[ev_ch[xx]] = 0;
        end
      join_none
    end
    #(t0 + TRIAL - $time);
    for (int i = 0; i < NA; i++) begin
      check(e_ca[i] == exp_ca[i], $sformatf("coinc_a[%0d]: %0d edges, expected %0d", i, e_ca[i], exp_ca[i]));
      check(e_ra[i] == exp_ra[i], $sformatf("rand_a[%0d]: %0d edges, expected %0d", i, e_ra[i], exp_ra[i]));
    end
    for (int j = 0; j < NB; j++) begin
      check(e_cb[j] == exp_cb[j], $sformatf("coinc_b[%0d]: %0d edges, expected %0d", j, e_cb[j], exp_cb[j]));
      check(e_rb[j] == exp_rb[j], $sformatf("rand_b[%0d]: %0d edges, expected %0d", j, e_rb[j], exp_rb[j]));
    end
    // latency bound: capture edge + (SI+P+2) fast cycles + (SO+3) system cycles
    for (int x = 0; x < ev_n; x++) begin
      longint bound = T0 + last_cap[x] * TF + (SI + P + 2) * TF + (SO + 3) * TS;
      if (ev_side[x] == 0 && exp_ca[ev_ch[x]] != 0)
        check(f_ca[ev_ch[x]] <= bound + TF, $sformatf("coinc_a latency %0d ps", f_ca[ev_ch[x]] - ev_t[x]));
      if (ev_side[x] == 1 && exp_cb[ev_ch[x]] != 0)
        check(f_cb[ev_ch[x]] <= bound + TF, $sformatf("coinc_b latency %0d ps", f_cb[ev_ch[x]] - ev_t[x]));
    end
  endtask

  initial begin
    int np;
    longint base, t;
    repeat (4) @(posedge clk_sys);
    rst_sys_n = 1;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk_fast[p]);
      rst_fast_n[p] = 1;
    end
    #50000;

    // delay sweep, -10 ns .. +10 ns in 20 ps steps
    for (int k = -500; k <= 500; k++) begin
      base = $time + 20000 + longint'($urandom_range(TF - 1, 0));
      ev_n = 2;
      ev_side[0] = 0; ev_ch[0] = $urandom_range(NA - 1, 0); ev_t[0] = safe_time(base);
      ev_side[1] = 1; ev_ch[1] = $urandom_range(NB - 1, 0); ev_t[1] = safe_time(ev_t[0] + 20 * k);
      run_trial(np);
      sweep_n++;
      if (np > 0) sweep_hits++;
      if (np == 1 && NP > 1) n_one_phase++;
      if (np == NP) n_both++;
      if (np == 0) n_reject++;
    end

    // random coincidences: B about one delayed window before A
    for (int k = 0; k < 200; k++) begin
      base = $time + 150000 + longint'($urandom_range(TF - 1, 0));
      ev_n = 2;
      ev_side[0] = 0; ev_ch[0] = $urandom_range(NA - 1, 0); ev_t[0] = safe_time(base);
      ev_side[1] = 1; ev_ch[1] = $urandom_range(NB - 1, 0);
      ev_t[1] = safe_time(ev_t[0] - D * TF + longint'($urandom_range(2 * TF, 0)) - TF);
      run_trial(np);
      for (int p = 0; p < NP; p++)
        if (cap(ev_t[0], p) == cap(ev_t[1], p) + D) begin n_random++; break; end
    end

    // multi-channel coincidences: two A and two B channels within a period
    for (int k = 0; k < 100; k++) begin
      int a1, a2, b1, b2;
      base = $time + 20000 + longint'($urandom_range(TF - 1, 0));
      a1 = $urandom_range(NA - 1, 0); a2 = (a1 + 1 + $urandom_range(NA - 2, 0)) % NA;
      b1 = $urandom_range(NB - 1, 0); b2 = (b1 + 1 + $urandom_range(NB - 2, 0)) % NB;
      ev_n = 4;
      ev_side[0] = 0; ev_ch[0] = a1; ev_t[0] = safe_time(base);
      ev_side[1] = 0; ev_ch[1] = a2; ev_t[1] = safe_time(base + $urandom_range(TF, 0));
      ev_side[2] = 1; ev_ch[2] = b1; ev_t[2] = safe_time(base + $urandom_range(TF, 0));
      ev_side[3] = 1; ev_ch[3] = b2; ev_t[3] = safe_time(base + $urandom_range(TF, 0));
      run_trial(np);
      if (np > 0) n_multi++;
    end

    // single triggers
    for (int k = 0; k < 50; k++) begin
      ev_n = 1;
      ev_side[0] = k % 2; ev_ch[0] = $urandom_range(NA - 1, 0);
      ev_t[0] = safe_time($time + 20000 + longint'($urandom_range(TF - 1, 0)));
      run_trial(np);
    end

    // efficiency integral over the sweep, in units of the fast period
    begin
      real area;
      area = real'(sweep_hits) * 20.0 / real'(TF);
      $display("sweep: %0d of %0d offsets detected, window area = %0.3f periods (%0.2f ns)",
               sweep_hits, sweep_n, area, area * real'(TF) / 1000.0);
      check(area > (NP == 1 ? 0.8 : 1.0 + 0.5 * real'(NP - 1) / real'(NP) * 2.0 - 0.2) &&
            area < (NP == 1 ? 1.2 : 1.0 + 0.5 * real'(NP - 1) / real'(NP) * 2.0 + 0.2),
            "coincidence window width");
    end
    $display("one-phase-only=%0d all-phases=%0d rejected=%0d random=%0d multi=%0d",
             n_one_phase, n_both, n_reject, n_random, n_multi);
    check(NP == 1 || n_one_phase > 0, "hazard recovered by a single phase");
    check(n_both > 0,   "coincidence seen by all phases");
    check(n_reject > 0, "pair rejected");
    check(n_random > 0, "random coincidence");
    check(n_multi > 0,  "multi-channel coincidence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
