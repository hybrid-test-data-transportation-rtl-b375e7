// tb_hybrid_test_top: end-to-end testbench of hybrid_test_top at its default
// parameters (16-bit flit split 4/4/5/3 among four cores, 10-cell chains, one
// test vector per core). Four behavioural cores (cut_scan_model) hang on the
// scan ports. A tester model packs one stimuli set of every core into each
// flit (core i at the sum of the widths of cores 0..i-1) and delivers the
// same flit to every core, each copy with its own random delay, as a
// multicast network would. An ATE-sink model takes the response flits from
// each core's network-interface port with random WREADY, unpacks the stacked
// response sets (slot s at bits s*P), and compares them with responses
// computed from the stimuli each core consumed.
// Phases: functional pass-through with test enable low, a test with random
// stalls, and a test without stalls whose length is checked against
// 2*CHAIN_LEN + 1 capture + 2 control cycles and in which consecutive
// response flits of a core must leave floor(16/P) cycles apart (one set
// stacked per cycle). The network clock ratio of this example (2, and 3
// for single-payload packets) is checked with hts_pkg::clock_ratio. Each core must send exactly
// ceil(CHAIN_LEN / floor(16/P)) response flits per test vector. The
// mechanisms counted, each of which must occur: multicast flits (one flit
// taken by all four cores), flits flushed full, flits flushed early by WLAST,
// cores stalled by the network interface through TWREADY, wrappers waiting
// for stimuli, and functional beats passed through.
module tb_hybrid_test_top
  import tb_hts_pkg::*;
;
  localparam int unsigned FW = 16, N = 4, L = 10, NTV = 1;
  localparam int unsigned PW  [N] = '{4, 4, 5, 3};
  localparam int unsigned LSB [N] = '{0, 4, 8, 13};

  logic clk = 0, rst_n = 0, test_en = 0;
  logic [N-1:0] start = '0, busy, done, stim_valid, stim_ready, scan_shift, scan_capture;
  logic [N-1:0][FW-1:0] stim_flit, scan_in, scan_out, func_wdata, ni_wdata;
  logic [N-1:0] func_wvalid, func_wlast, func_wready, ni_wvalid, ni_wlast, ni_wready;
  int unsigned checks = 0, failures = 0, cycle = 0;
  bit rand_stall = 0;
  bit timed_run  = 0;             // stall-free run: flit intervals are checked
  int unsigned n_rate = 0;        // flit intervals checked

  hybrid_test_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Tester: flit k holds stimuli set k of every core in its portion.
  function automatic logic [FW-1:0] tester_flit(int unsigned k);
    logic [FW-1:0] f = '0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned b = 0; b < PW[i]; b++) f[LSB[i] + b] = stim_set(i, k)[b];
    return f;
  endfunction

  // mechanism counters
  int unsigned n_full [N], n_early [N], n_nistall [N], n_starve [N], n_flits [N];
  int unsigned n_func = 0, n_multicast = 0;
  int unsigned taken_by [64];   // how many cores took tester flit k (this run)

  for (genvar gi = 0; gi < N; gi++) begin : g_core
    localparam int unsigned P = PW[gi];
    localparam int unsigned S = FW / P;

    cut_scan_model #(.P(P), .LEN(L)) u_cut (
      .clk, .rst_n, .shift(scan_shift[gi]), .capture(scan_capture[gi]),
      .si(scan_in[gi][P-1:0]), .so(scan_out[gi][P-1:0]));
    assign scan_out[gi][FW-1:P] = '0;

    int unsigned   k;            // next flit index for this core
    logic [P-1:0]  sets [$];     // stimuli sets consumed
    int unsigned   rsets;        // response sets received
    int unsigned   last_flit;    // cycle of the previous response flit

    assign stim_flit[gi] = tester_flit(k);

    function automatic logic [P-1:0] exp_resp(int unsigned t, int unsigned j);
      logic [P-1:0] r;
      for (int unsigned c = 0; c < P; c++) begin
        logic [63:0] pat = '0;
        for (int unsigned b = 0; b < L; b++) pat[b] = sets[t*L + (L-1-b)][c];
        r[c] = cap_bit(pat, L, L-1-j, c);
      end
      return r;
    endfunction

    always @(posedge clk) if (rst_n) begin
      if (test_en) begin
        if (stim_valid[gi] && stim_ready[gi]) begin
          sets.push_back(stim_flit[gi][LSB[gi] +: P]);
          taken_by[k]++;
          if (taken_by[k] == N) n_multicast++;
          k++;
        end
        if (ni_wvalid[gi] && ni_wready[gi]) begin
          automatic int unsigned t = rsets / L, pos = rsets % L;
          automatic int unsigned n = (L - pos < S) ? L - pos : S;
          for (int unsigned s = 0; s < n; s++)
            check(ni_wdata[gi][s*P +: P] == exp_resp(t, pos + s),
                  $sformatf("core %0d flit %0d slot %0d: %b", gi, n_flits[gi], s, ni_wdata[gi]));
          check((32'(ni_wdata[gi]) >> (S * P)) == 0, "idle bits not 0");
          check(ni_wlast[gi] == (pos + n == L), $sformatf("core %0d WLAST", gi));
          if (n == S) n_full[gi]++; else n_early[gi]++;
          // Rate: without stalls one set is stacked per cycle, so a flit of
          // n sets leaves n cycles after the previous flit of the same vector.
          if (timed_run && pos != 0) begin
            check(cycle - last_flit == n, $sformatf("core %0d flit interval %0d, expected %0d",
                                                    gi, cycle - last_flit, n));
            n_rate++;
          end
          last_flit = cycle;
          n_flits[gi]++;
          rsets += n;
        end
        if (ni_wvalid[gi] && !ni_wready[gi] && dut.g_core[gi].t_wvalid) n_nistall[gi]++;
        if (busy[gi] && !stim_valid[gi] && !scan_shift[gi] && !scan_capture[gi]) n_starve[gi]++;
      end
      stim_valid[gi] <= rand_stall ? ($urandom_range(0, 2) != 0) : 1'b1;
      ni_wready[gi]  <= rand_stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    end
  end

  task automatic run_test(bit timed);
    int unsigned t0;
    int unsigned tdone [N];
    foreach (taken_by[j]) taken_by[j] = 0;
    for (int i = 0; i < N; i++) tdone[i] = 0;
    g_core[0].k = 0; g_core[1].k = 0; g_core[2].k = 0; g_core[3].k = 0;
    g_core[0].sets.delete(); g_core[1].sets.delete(); g_core[2].sets.delete(); g_core[3].sets.delete();
    g_core[0].rsets = 0; g_core[1].rsets = 0; g_core[2].rsets = 0; g_core[3].rsets = 0;
    for (int i = 0; i < N; i++) n_flits[i] = 0;
    @(posedge clk);
    start <= '1;
    @(posedge clk);
    t0 = cycle;
    start <= '0;
    @(posedge clk);
    while (done != '1) begin
      for (int i = 0; i < N; i++) if (done[i] && tdone[i] == 0) tdone[i] = cycle - t0;
      @(posedge clk);
    end
    for (int i = 0; i < N; i++) if (tdone[i] == 0) tdone[i] = cycle - t0;
    repeat (3) @(posedge clk);   // last flits leave the accumulators
    while (ni_wvalid != '0) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      automatic int unsigned s = FW / PW[i];
      automatic int unsigned exp_flits = ((L + s - 1) / s) * NTV;
      check(n_flits[i] == exp_flits, $sformatf("core %0d sent %0d flits, expected %0d",
                                               i, n_flits[i], exp_flits));
      if (timed)
        check(tdone[i] == (NTV + 1) * L + NTV + 2,
              $sformatf("core %0d took %0d cycles", i, tdone[i]));
    end
    check(g_core[0].rsets == L * NTV && g_core[1].rsets == L * NTV &&
          g_core[2].rsets == L * NTV && g_core[3].rsets == L * NTV, "response sets lost");
  endtask

  // Network clock ratio of the 16-bit, 4/4/5/3 example: 2 with two payload
  // flits per packet (4 flits in all), 3 with one payload flit.
  initial begin
    int unsigned pw64 [64];
    foreach (pw64[j]) pw64[j] = 1;
    for (int i = 0; i < N; i++) pw64[i] = PW[i];
    check(hts_pkg::clock_ratio(FW, 4, N, pw64) == 2, "f_N/f_T for 4-flit packets");
    check(hts_pkg::clock_ratio(FW, 3, N, pw64) == 3, "f_N/f_T for 3-flit packets");
  end

  initial begin
    func_wdata = '0; func_wvalid = '0; func_wlast = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // functional mode: the accumulators are transparent
    rand_stall = 1;
    for (int c = 0; c < 40; c++) begin
      for (int i = 0; i < N; i++) begin
        func_wdata[i]  = FW'($urandom);
        func_wvalid[i] = 1'($urandom);
        func_wlast[i]  = 1'($urandom);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        check(ni_wdata[i] == func_wdata[i] && ni_wvalid[i] == func_wvalid[i] &&
              ni_wlast[i] == func_wlast[i] && func_wready[i] == ni_wready[i],
              $sformatf("core %0d functional pass-through", i));
        if (func_wvalid[i] && func_wready[i]) n_func++;
      end
      @(posedge clk);
    end
    func_wvalid = '0;

    // test mode
    test_en <= 1;
    @(posedge clk);
    run_test(0);
    rand_stall = 0;
    repeat (2) @(posedge clk);
    timed_run = 1;
    run_test(1);
    timed_run = 0;
    rand_stall = 1;
    run_test(0);

    begin
      automatic int unsigned full = 0, early = 0, nist = 0, starve = 0;
      for (int i = 0; i < N; i++) begin
        full += n_full[i]; early += n_early[i]; nist += n_nistall[i]; starve += n_starve[i];
      end
      $display("mechanisms: multicast=%0d full_flush=%0d wlast_flush=%0d ni_stall=%0d starve=%0d func=%0d",
               n_multicast, full, early, nist, starve, n_func);
      check(n_multicast > 0, "no multicast flit");
      check(full > 0, "no full flush");
      check(early > 0, "no WLAST flush");
      check(nist > 0, "no stall by the network interface");
      check(starve > 0, "no wait for stimuli");
      check(n_func > 0, "no functional beat");
      check(n_rate > 0, "no flit interval checked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
