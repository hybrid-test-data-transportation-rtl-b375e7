// tb_core_test_wrapper: self-checking testbench of the core test wrapper with
// a behavioural core (cut_scan_model). An 8-bit flit with a 3-bit portion at
// bit 2, chains of 5 cells and 3 test vectors.
//  1. No stalls: the test must take (N_TV+1)*CHAIN_LEN shift cycles plus
//     N_TV capture cycles, plus one start and one drain cycle.
//  2. Random gaps in the stimuli flits and random WREADY, twice in a row.
// In every run each response beat is compared with a response computed from
// the stimuli sets the wrapper consumed (the core's portion of each flit),
// idle bits must be 0, WLAST must close every test vector, and exactly
// CHAIN_LEN*N_TV beats and flits must pass.
module tb_core_test_wrapper
  import tb_hts_pkg::*;
;
  localparam int unsigned FW = 8, PW = 3, LSB = 2, L = 5, NTV = 3;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, stim_valid, stim_ready, scan_shift, scan_capture;
  logic [FW-1:0] stim_flit, m_wdata;
  logic [PW-1:0] scan_in, scan_out;
  logic m_wvalid, m_wlast, m_wready;
  int unsigned checks = 0, failures = 0, cycle = 0;

  core_test_wrapper #(.FLIT_W(FW), .PORTION_W(PW), .PORTION_LSB(LSB), .CHAIN_LEN(L), .N_TV(NTV))
    dut (.*);

  cut_scan_model #(.P(PW), .LEN(L)) u_cut (
    .clk, .rst_n, .shift(scan_shift), .capture(scan_capture), .si(scan_in), .so(scan_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
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

  // ---------- stimuli source and response reference ----------
  int unsigned   flit_k;          // next flit index offered
  logic [PW-1:0] sets [$];        // stimuli sets consumed, in order
  int unsigned   beats;           // response beats taken
  bit            rand_stall;

  assign stim_flit = FW'(stim_set(0, flit_k));

  // Response set k (0-based, within vector t) of chain c.
  function automatic logic [PW-1:0] exp_resp(int unsigned t, int unsigned k);
    logic [PW-1:0] r;
    for (int unsigned c = 0; c < PW; c++) begin
      logic [63:0] pat = '0;
      for (int unsigned b = 0; b < L; b++) pat[b] = sets[t*L + (L-1-b)][c];
      r[c] = cap_bit(pat, L, L-1-k, c);
    end
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (stim_valid && stim_ready) begin
      sets.push_back(stim_flit[LSB +: PW]);
      flit_k++;
    end
    if (m_wvalid && m_wready) begin
      automatic int unsigned t = beats / L, k = beats % L;
      automatic logic [FW-1:0] e = '0;
      e[LSB +: PW] = exp_resp(t, k);
      check(t < NTV, "too many response beats");
      check(m_wdata == e, $sformatf("beat %0d data %b expected %b", beats, m_wdata, e));
      check(m_wlast == (k == L-1), $sformatf("beat %0d WLAST %b", beats, m_wlast));
      beats++;
    end
    stim_valid <= rand_stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    m_wready   <= rand_stall ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  task automatic run_test(int unsigned expect_cycles);
    int unsigned t0;
    flit_k = 0;
    sets.delete();
    beats = 0;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    t0 = cycle;
    start <= 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    check(sets.size() == NTV * L, $sformatf("consumed %0d stimuli sets", sets.size()));
    check(beats == NTV * L, $sformatf("sent %0d response beats", beats));
    check(!busy, "busy after done");
    if (expect_cycles != 0)
      check(cycle - t0 == expect_cycles, $sformatf("test took %0d cycles, expected %0d",
                                                   cycle - t0, expect_cycles));
  endtask

  initial begin
    stim_valid = 1; m_wready = 1; rand_stall = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_test((NTV + 1) * L + NTV + 2);
    rand_stall = 1;
    run_test(0);
    run_test(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
