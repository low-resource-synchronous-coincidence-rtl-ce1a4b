// tb_coinc_processor: end-to-end test of one coincidence processor replica.
//
// Two instances share a 288 MHz fast clock and a 72 MHz system clock: one
// shapes one-cycle pulses, the other two-cycle pulses. Each trial fires one
// channel of subset A and one of subset B with a random offset, either close
// together (prompt trial) or with B earlier by about the delayed window
// (random trial), or one channel alone. A reference model works out, from the
// trigger times alone, which fast-clock edge first samples each trigger:
// prompt coincidence when both are captured by the same edge (one-cycle
// pulses) or edges at most one apart (two-cycle pulses); random coincidence
// when B's capture edge plus DELAY equals A's. The testbench checks every
// fast-domain output, the exact latency of the first fast output edge, and
// that the system-domain outputs give exactly the expected pulses.
`timescale 1ps/1ps
module tb_coinc_processor;
  localparam int NA = 2, NB = 3, P = 1, SI = 2, SO = 2, D = 8;
  localparam longint TF = 3472, TS = 13888, T0 = TF / 2;  // first fast edge at T0
  localparam int LAT = SI + P + 1;                        // capture edge -> fast output

  logic clk_fast = 0, clk_sys = 0, rst_fast_n = 0, rst_sys_n = 0;
  logic [NA-1:0] ta = '0;
  logic [NB-1:0] tb = '0;
  logic [NA-1:0] ca [2], ra [2], caf [2], raf [2];
  logic [NB-1:0] cb [2], rb [2], cbf [2], rbf [2];
  int checks = 0, failures = 0;
  int n_prompt = 0, n_random = 0, n_reject = 0, n_hazard2 = 0;
  longint edge_no = -1;
  // observed activity of the current trial, per instance
  int  first_edge_ca [2], first_edge_cb [2], first_edge_ra [2];
  int  sys_ca [2][NA], sys_cb [2][NB], sys_ra [2][NA], sys_rb [2][NB];
  int  fast_other [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    coinc_processor #(.N_A(NA), .N_B(NB), .PIPE_STAGES(P), .PULSE_CYCLES(g + 1),
                      .IN_SYNC_STAGES(SI), .OUT_SYNC_STAGES(SO), .DELAY_CYCLES(D)) dut (
      .clk_fast, .rst_fast_n, .clk_sys, .rst_sys_n, .trig_a(ta), .trig_b(tb),
      .coinc_a(ca[g]), .coinc_b(cb[g]), .rand_a(ra[g]), .rand_b(rb[g]),
      .coinc_a_fast(caf[g]), .coinc_b_fast(cbf[g]), .rand_a_fast(raf[g]), .rand_b_fast(rbf[g]));
  end

  initial begin #T0; forever begin clk_fast = 1; #(TF/2); clk_fast = 0; #(TF/2); end end
  initial begin #1111; forever begin clk_sys = 1; #(TS/2); clk_sys = 0; #(TS/2); end end

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cur_i, cur_j;
  always @(posedge clk_fast) begin
    edge_no++;
    #1;
    for (int g = 0; g < 2; g++) begin
      if (caf[g][cur_i] && first_edge_ca[g] < 0) first_edge_ca[g] = int'(edge_no);
      if (cbf[g][cur_j] && first_edge_cb[g] < 0) first_edge_cb[g] = int'(edge_no);
      if (raf[g][cur_i] && first_edge_ra[g] < 0) first_edge_ra[g] = int'(edge_no);
      for (int i = 0; i < NA; i++) if (i != cur_i && (caf[g][i] || raf[g][i])) fast_other[g]++;
      for (int j = 0; j < NB; j++) if (j != cur_j && (cbf[g][j] || rbf[g][j])) fast_other[g]++;
      if (rbf[g] != '0) fast_other[g]++;
    end
  end

  logic [NA-1:0] ca_q [2], ra_q [2];
  logic [NB-1:0] cb_q [2], rb_q [2];
  always @(posedge clk_sys) begin
    #1;
    for (int g = 0; g < 2; g++) begin
      for (int i = 0; i < NA; i++) begin
        if (ca[g][i] && !ca_q[g][i]) sys_ca[g][i]++;
        if (ra[g][i] && !ra_q[g][i]) sys_ra[g][i]++;
      end
      for (int j = 0; j < NB; j++) begin
        if (cb[g][j] && !cb_q[g][j]) sys_cb[g][j]++;
        if (rb[g][j] && !rb_q[g][j]) sys_rb[g][j]++;
      end
      ca_q[g] = ca[g]; ra_q[g] = ra[g]; cb_q[g] = cb[g]; rb_q[g] = rb[g];
    end
  end

  // index of the first fast edge strictly after time t
  function automatic longint cap(longint t);
    return (t - T0) / TF + 1;
  endfunction

  // a time near 'base' that is at least 150 ps away from any fast edge
  function automatic longint safe_time(longint base);
    longint ph;
    ph = (base - T0) % TF;
    if (ph < 150) return base + 150 - ph;
    if (ph > TF - 150) return base + (TF - ph) + 150;
    return base;
  endfunction

  task automatic clear_obs();
    for (int g = 0; g < 2; g++) begin
      first_edge_ca[g] = -1; first_edge_cb[g] = -1; first_edge_ra[g] = -1; fast_other[g] = 0;
      for (int i = 0; i < NA; i++) begin sys_ca[g][i] = 0; sys_ra[g][i] = 0; end
      for (int j = 0; j < NB; j++) begin sys_cb[g][j] = 0; sys_rb[g][j] = 0; end
    end
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // kind: 0 prompt pair, 1 random pair, 2 A alone
  task automatic trial(int kind);
    longint t_start, ta_t, tb_t, ka, kb, off;
    bit exp_c [2], exp_r, exp_rg [2];
    cur_i = $urandom_range(NA - 1, 0);
    cur_j = $urandom_range(NB - 1, 0);
    clear_obs();
    t_start = $time;
    off = longint'($urandom_range(4 * TF, 0)) - 2 * TF;
    ta_t = safe_time(t_start + 60000 + longint'($urandom_range(TF - 1, 0)));
    if (kind == 1) tb_t = safe_time(ta_t - D * TF + off / 2);
    else           tb_t = safe_time(ta_t + off);
    ka = cap(ta_t);
    kb = cap(tb_t);
    // drive triggers (10 ns wide)
    fork
      begin if (kind != 2) begin #(tb_t - $time); tb[cur_j] = 1; #10000; tb[cur_j] = 0; end end
      begin #(ta_t - $time); ta[cur_i] = 1; #10000; ta[cur_i] = 0; end
    join
    #(t_start + 150000 - $time);
    exp_c[0] = (kind == 0) && (ka == kb);
    exp_c[1] = (kind == 0) && (ka - kb <= 1) && (kb - ka <= 1);
    exp_r    = (kind == 1) && (ka == kb + D);
    exp_rg[0] = exp_r;
    exp_rg[1] = (kind == 1) && (ka - kb - D <= 1) && (kb + D - ka <= 1);
    for (int g = 0; g < 2; g++) begin
      check((first_edge_ca[g] >= 0) == exp_c[g], $sformatf("inst %0d prompt A detect=%0d ka=%0d kb=%0d", g, first_edge_ca[g] >= 0, ka, kb));
      check((first_edge_cb[g] >= 0) == exp_c[g], $sformatf("inst %0d prompt B", g));
      check((first_edge_ra[g] >= 0) == exp_rg[g], $sformatf("inst %0d random A", g));
      if (exp_c[g]) check(longint'(first_edge_ca[g]) == (ka > kb ? ka : kb) + LAT,
                          $sformatf("inst %0d latency: edge %0d, expected %0d", g, first_edge_ca[g], (ka > kb ? ka : kb) + LAT));
      if (exp_r && g == 0) check(longint'(first_edge_ra[g]) == ka + LAT, "random latency");
      check(fast_other[g] == 0, $sformatf("inst %0d spurious fast output", g));
      check(sys_ca[g][cur_i] == int'(exp_c[g]) && sys_cb[g][cur_j] == int'(exp_c[g]),
            $sformatf("inst %0d system prompt pulses %0d/%0d", g, sys_ca[g][cur_i], sys_cb[g][cur_j]));
      check(sys_ra[g][cur_i] == int'(exp_rg[g]), $sformatf("inst %0d system random pulse", g));
    end
    if (exp_c[0]) n_prompt++;
    if (kind == 0 && !exp_c[0]) n_reject++;
    if (exp_c[1] && !exp_c[0]) n_hazard2++;
    if (exp_r) n_random++;
  endtask

  initial begin
    repeat (4) @(posedge clk_sys);
    rst_sys_n = 1;
    @(negedge clk_fast) rst_fast_n = 1;
    for (int n = 0; n < 600; n++) trial(n % 3 == 2 ? 2 : (n % 3));
    check(n_prompt > 10,  "prompt coincidences exercised");
    check(n_reject > 10,  "rejected pairs exercised");
    check(n_hazard2 > 10, "two-cycle hazard recovery exercised");
    check(n_random > 10,  "random coincidences exercised");
    $display("prompt=%0d rejected=%0d recovered_by_2cycle=%0d random=%0d", n_prompt, n_reject, n_hazard2, n_random);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
