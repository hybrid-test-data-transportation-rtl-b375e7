// tb_test_response_accumulator: self-checking testbench of the response
// accumulator at its default size (5-bit flit, 2-bit portion, two sets per
// flit).
//  1. Replays the published example: beats 10, 11, 00, 01 and 10 with WLAST,
//     NI always ready. Expected flits 01110, 00100 and 00110 (the last with
//     WLAST), no stall of the master, and TWVALID one clock after the beat
//     that fills the stack register.
//  2. Random bursts with random WVALID and WREADY. A model of the stack
//     register predicts every flit; the master must be stalled exactly when a
//     full stack register is refused by the NI.
//  3. Test enable low: all four signals must pass straight through.
module tb_test_response_accumulator;
  localparam int unsigned FW = 5, PW = 2, SETS = FW / PW;

  logic clk = 0, rst_n = 0, test_en = 0;
  logic [FW-1:0] m_wdata, s_wdata;
  logic m_wvalid, m_wlast, m_wready, s_wvalid, s_wlast, s_wready;
  int unsigned checks = 0, failures = 0, cycle = 0;

  test_response_accumulator dut (.*);

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

  // ---------- reference model ----------
  logic [FW-1:0] mdl_stack;
  int unsigned   mdl_slot;
  logic [FW:0]   expq[$];   // {last, data}

  // Sample on the clock edge: beats accepted by the DUT, flits taken by NI.
  always @(posedge clk) if (rst_n && test_en) begin
    if (s_wvalid && s_wready) begin
      check(expq.size() > 0, "flit without expected data");
      if (expq.size() > 0) begin
        automatic logic [FW:0] e;
        e = expq.pop_front();

        check({s_wlast, s_wdata} == e,
              $sformatf("flit %b last %b, expected %b last %b", s_wdata, s_wlast, e[FW-1:0], e[FW]));
      end
    end
    if (m_wvalid && m_wready) begin
      mdl_stack[mdl_slot*PW +: PW] = m_wdata[PW-1:0];
      if (mdl_slot == SETS - 1 || m_wlast) begin
        expq.push_back({m_wlast, mdl_stack});
        mdl_slot = 0;
      end else mdl_slot++;
    end
  end

  // ---------- 1: published example ----------
  logic [1:0] ex_data [5] = '{2'b10, 2'b11, 2'b00, 2'b01, 2'b10};
  logic [FW-1:0] ex_flit [3] = '{5'b01110, 5'b00100, 5'b00110};
  int unsigned fill_cycle [3];
  int unsigned valid_cycle [3];
  int unsigned nflit = 0, nbeat = 0;

  // Edge at which the beats that fill a flit (beats 1, 3 and 4) are taken.
  always @(posedge clk) if (rst_n && test_en && m_wvalid && m_wready && nbeat < 5 && cycle < 40) begin
    if (nbeat == 1) fill_cycle[0] = cycle;
    if (nbeat == 3) fill_cycle[1] = cycle;
    if (nbeat == 4) fill_cycle[2] = cycle;
    nbeat++;
  end

  always @(posedge clk) if (rst_n && test_en && s_wvalid && s_wready && nflit < 3 && cycle < 40) begin
    check(s_wdata == ex_flit[nflit], $sformatf("example flit %0d = %b", nflit, s_wdata));
    check(s_wlast == (nflit == 2), "example WLAST");
    valid_cycle[nflit] = cycle;
    nflit++;
  end

  int unsigned stalls = 0, stall_checks = 0;

  initial begin
    mdl_stack = '0;
    mdl_slot  = 0;
    m_wdata = '0; m_wvalid = 0; m_wlast = 0; s_wready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1; test_en <= 1;
    @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      m_wdata  <= {3'b000, ex_data[i]};
      m_wvalid <= 1;
      m_wlast  <= (i == 4);
      @(posedge clk);
      check(m_wready, "master stalled in the example");
    end
    m_wvalid <= 0; m_wlast <= 0;
    repeat (4) @(posedge clk);
    check(nflit == 3, $sformatf("example gave %0d flits", nflit));
    // TWVALID is high the cycle after the filling beat, and NI is ready, so
    // each flit is taken exactly one cycle after its last set.
    for (int f = 0; f < 3; f++)
      check(valid_cycle[f] == fill_cycle[f] + 1,
            $sformatf("flit %0d valid at %0d, filled at %0d", f, valid_cycle[f], fill_cycle[f]));

    // ---------- 2: random traffic ----------
    for (int b = 0; b < 200; b++) begin
      automatic int unsigned len = 1 + $urandom_range(0, 6);
      for (int k = 0; k < len; k++) begin
        m_wdata  <= FW'($urandom);
        m_wlast  <= (k == len - 1);
        m_wvalid <= 1;
        do begin
          s_wready <= ($urandom_range(0, 2) != 0);
          @(posedge clk);
          // stall rule: master stalled iff a full flit is refused
          stall_checks++;
          if (!m_wready) stalls++;
          check(m_wready == !(s_wvalid && !s_wready), "TWREADY rule");
        end while (!m_wready);
        m_wvalid <= 0;
        m_wlast  <= 0;
        if ($urandom_range(0, 3) == 0) @(posedge clk);
      end
    end
    m_wvalid <= 0;
    s_wready <= 1;
    repeat (5) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d flits never delivered", expq.size()));
    check(stalls > 0, "master was never stalled");

    // ---------- 3: functional mode pass-through ----------
    test_en <= 0;
    @(posedge clk);
    for (int i = 0; i < 50; i++) begin
      m_wdata <= FW'($urandom); m_wvalid <= 1'($urandom); m_wlast <= 1'($urandom);
      s_wready <= 1'($urandom);
      #1;
      check(s_wdata == m_wdata && s_wvalid == m_wvalid && s_wlast == m_wlast && m_wready == s_wready,
            "pass-through");
      @(posedge clk);
    end

    $display("stalls seen %0d of %0d beats-cycles", stalls, stall_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
