// tb_fig2_example: the two-core example of the hybrid scheme, run through
// hybrid_test_top. A 5-bit flit is shared by CUT-A (2 scan chains, bits
// [1:0]) and CUT-B (3 scan chains, bits [4:2]); both have 10-cell chains and
// one test vector. Every stimuli flit carries one set of each core and is
// delivered to both. CUT-A stacks floor(5/2) = 2 response sets per flit and
// must send 5 response flits instead of 10. CUT-B's portion is wider than
// half the flit, so it sends each of its 10 sets in a flit of its own, in
// bits [4:2] with bits [1:0] idle. All response sets are compared with
// responses computed from the consumed stimuli (behavioural cores).
module tb_fig2_example
  import tb_hts_pkg::*;
;
  localparam int unsigned FW = 5, N = 2, L = 10;
  localparam int unsigned PW  [N] = '{2, 3};
  localparam int unsigned LSB [N] = '{0, 2};
  localparam int unsigned EXP_FLITS [N] = '{5, 10};

  logic clk = 0, rst_n = 0, test_en = 0;
  logic [N-1:0] start = '0, busy, done, stim_valid, stim_ready, scan_shift, scan_capture;
  logic [N-1:0][FW-1:0] stim_flit, scan_in, scan_out, func_wdata, ni_wdata;
  logic [N-1:0] func_wvalid, func_wlast, func_wready, ni_wvalid, ni_wlast, ni_wready;
  int unsigned checks = 0, failures = 0, cycle = 0;

  localparam int unsigned LEN_A [N] = '{L, L};
  localparam int unsigned TV_A  [N] = '{1, 1};

  hybrid_test_top #(.FLIT_W(FW), .N_CUT(N), .PORTION_W(PW), .CHAIN_LEN(LEN_A), .N_TV(TV_A))
    dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
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

  function automatic logic [FW-1:0] tester_flit(int unsigned k);
    logic [FW-1:0] f = '0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned b = 0; b < PW[i]; b++) f[LSB[i] + b] = stim_set(i, k)[b];
    return f;
  endfunction

  int unsigned n_flits [N];

  for (genvar gi = 0; gi < N; gi++) begin : g_core
    localparam int unsigned P = PW[gi];
    localparam int unsigned S = FW / P;
    localparam int unsigned BASE = (S == 1) ? LSB[gi] : 0;   // where slot 0 lies

    cut_scan_model #(.P(P), .LEN(L)) u_cut (
      .clk, .rst_n, .shift(scan_shift[gi]), .capture(scan_capture[gi]),
      .si(scan_in[gi][P-1:0]), .so(scan_out[gi][P-1:0]));
    assign scan_out[gi][FW-1:P] = '0;

    int unsigned   k = 0;
    logic [P-1:0]  sets [$];
    int unsigned   rsets = 0;

    assign stim_flit[gi]  = tester_flit(k);
    assign stim_valid[gi] = 1'b1;
    assign ni_wready[gi]  = 1'b1;

    function automatic logic [P-1:0] exp_resp(int unsigned j);
      logic [P-1:0] r;
      for (int unsigned c = 0; c < P; c++) begin
        logic [63:0] pat = '0;
        for (int unsigned b = 0; b < L; b++) pat[b] = sets[L-1-b][c];
        r[c] = cap_bit(pat, L, L-1-j, c);
      end
      return r;
    endfunction

    always @(posedge clk) if (rst_n && test_en) begin
      if (stim_valid[gi] && stim_ready[gi]) begin
        sets.push_back(stim_flit[gi][LSB[gi] +: P]);
        k++;
      end
      if (ni_wvalid[gi] && ni_wready[gi]) begin
        automatic int unsigned n = (L - rsets < S) ? L - rsets : S;
        automatic logic [FW-1:0] e = ni_wdata[gi];
        for (int unsigned s = 0; s < n; s++)
          check(e[BASE + s*P +: P] == exp_resp(rsets + s),
                $sformatf("core %0d flit %0d slot %0d: %b", gi, n_flits[gi], s, e));
        if (S == 1) check((e & FW'((1 << LSB[gi]) - 1)) == '0, "idle bits below the portion");
        check(ni_wlast[gi] == (rsets + n == L), "WLAST");
        n_flits[gi]++;
        rsets += n;
      end
    end
  end

  initial begin
    func_wdata = '0; func_wvalid = '0; func_wlast = '0;
    n_flits = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    test_en <= 1;
    @(posedge clk);
    start <= '1;
    @(posedge clk);
    start <= '0;
    @(posedge clk);
    while (done != '1) @(posedge clk);
    repeat (4) @(posedge clk);
    for (int i = 0; i < N; i++)
      check(n_flits[i] == EXP_FLITS[i], $sformatf("core %0d sent %0d response flits, expected %0d",
                                                  i, n_flits[i], EXP_FLITS[i]));
    check(g_core[0].rsets == L && g_core[1].rsets == L, "response sets lost");
    check(g_core[0].k == L && g_core[1].k == L, "stimuli flits consumed");
    $display("CUT-A response flits %0d, CUT-B response flits %0d", n_flits[0], n_flits[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
