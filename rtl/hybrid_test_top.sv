// hybrid_test_top: core-side test access for N_CUT cores tested in parallel
// over a network-on-chip that is reused as the test access mechanism.
//
// The FLIT_W-bit flit payload is partitioned among the cores: core i owns
// PORTION_W[i] bits starting at the sum of the widths of cores 0..i-1
// (core 0 at bit 0). The tester packs one stimuli set of every core into each
// flit and the network multicasts the same flits to all cores; for each core
// this block holds
//   - a core_test_wrapper, which samples the core's portion of each flit into
//     its scan chains and emits the response sets as AXI write beats, and
//   - a test_response_accumulator on the AXI write channel towards the
//     core's network interface, which stacks floor(FLIT_W/PORTION_W[i])
//     response sets into one flit before the interface packetizes it and
//     unicasts it to the tester.
// With test_en low each accumulator passes the core's functional AXI write
// channel (func_*) through to the network interface unchanged; with test_en
// high the wrapper drives the accumulator's master side instead.
//
// The network (routers, network interfaces) and the cores themselves are not
// part of this block: their connections are ports. Stimuli enter through
// stim_valid/stim_flit/stim_ready per core (one multicast copy per core);
// responses leave through ni_w* per core; the scan chains are reached through
// scan_shift/scan_capture/scan_in/scan_out (core i uses the low PORTION_W[i]
// bits of its scan_in/scan_out row; the other bits are 0 or ignored).
//
// Defaults: a 16-bit flit split 4/4/5/3 among four cores, as in the worked
// flit-rate example of the scheme. Chain length 10 and one test vector per
// core are this design's own defaults (taken from the small example of a
// 10-cell chain tested with one vector). The selection multiplexer between
// functional and wrapper beats on the master side is this design's own.
module hybrid_test_top
  import hts_pkg::*;
#(
  parameter int unsigned FLIT_W                = 16,
  parameter int unsigned N_CUT                 = 4,
  parameter int unsigned PORTION_W [N_CUT]     = '{4, 4, 5, 3},
  parameter int unsigned CHAIN_LEN [N_CUT]     = '{10, 10, 10, 10},
  parameter int unsigned N_TV      [N_CUT]     = '{1, 1, 1, 1}
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          test_en,
  input  logic [N_CUT-1:0]              start,
  output logic [N_CUT-1:0]              busy,
  output logic [N_CUT-1:0]              done,
  // multicast stimuli flits, one delivered copy per core
  input  logic [N_CUT-1:0]              stim_valid,
  input  logic [N_CUT-1:0][FLIT_W-1:0]  stim_flit,
  output logic [N_CUT-1:0]              stim_ready,
  // scan access to each core
  output logic [N_CUT-1:0]              scan_shift,
  output logic [N_CUT-1:0]              scan_capture,
  output logic [N_CUT-1:0][FLIT_W-1:0]  scan_in,
  input  logic [N_CUT-1:0][FLIT_W-1:0]  scan_out,
  // functional AXI write-data channel of each core (master side)
  input  logic [N_CUT-1:0][FLIT_W-1:0]  func_wdata,
  input  logic [N_CUT-1:0]              func_wvalid,
  input  logic [N_CUT-1:0]              func_wlast,
  output logic [N_CUT-1:0]              func_wready,
  // AXI write-data channel into each core's network interface (slave side)
  output logic [N_CUT-1:0][FLIT_W-1:0]  ni_wdata,
  output logic [N_CUT-1:0]              ni_wvalid,
  output logic [N_CUT-1:0]              ni_wlast,
  input  logic [N_CUT-1:0]              ni_wready
);
  // Bit offset of core i's portion: sum of the widths before it.
  function automatic int unsigned portion_lsb(int unsigned i);
    int unsigned acc = 0;
    for (int unsigned k = 0; k < i; k++) acc += PORTION_W[k];
    return acc;
  endfunction

  if (portion_lsb(N_CUT) > FLIT_W) begin : g_bad_cfg
    $error("hybrid_test_top: the portions do not fit in FLIT_W bits");
  end

  for (genvar i = 0; i < N_CUT; i++) begin : g_core
    localparam int unsigned P   = PORTION_W[i];
    localparam int unsigned LSB = portion_lsb(i);

    logic [FLIT_W-1:0] t_wdata, a_wdata;
    logic              t_wvalid, t_wlast, t_wready, a_wvalid, a_wlast, a_wready;
    logic [P-1:0]      si;

    core_test_wrapper #(
      .FLIT_W     (FLIT_W),
      .PORTION_W  (P),
      .PORTION_LSB(LSB),
      .CHAIN_LEN  (CHAIN_LEN[i]),
      .N_TV       (N_TV[i])
    ) u_wrap (
      .clk         (clk),
      .rst_n       (rst_n),
      .start       (start[i]),
      .busy        (busy[i]),
      .done        (done[i]),
      .stim_valid  (stim_valid[i]),
      .stim_flit   (stim_flit[i]),
      .stim_ready  (stim_ready[i]),
      .scan_shift  (scan_shift[i]),
      .scan_capture(scan_capture[i]),
      .scan_in     (si),
      .scan_out    (scan_out[i][P-1:0]),
      .m_wdata     (t_wdata),
      .m_wvalid    (t_wvalid),
      .m_wlast     (t_wlast),
      .m_wready    (t_wready)
    );

    always_comb begin
      scan_in[i]        = '0;
      scan_in[i][P-1:0] = si;
    end

    // Core-side AXI master: wrapper beats in test mode, functional otherwise.
    assign a_wdata        = test_en ? t_wdata  : func_wdata[i];
    assign a_wvalid       = test_en ? t_wvalid : func_wvalid[i];
    assign a_wlast        = test_en ? t_wlast  : func_wlast[i];
    assign func_wready[i] = !test_en && a_wready;
    assign t_wready       = test_en && a_wready;

    test_response_accumulator #(
      .FLIT_W     (FLIT_W),
      .PORTION_W  (P),
      .PORTION_LSB(LSB)
    ) u_acc (
      .clk     (clk),
      .rst_n   (rst_n),
      .test_en (test_en),
      .m_wdata (a_wdata),
      .m_wvalid(a_wvalid),
      .m_wlast (a_wlast),
      .m_wready(a_wready),
      .s_wdata (ni_wdata[i]),
      .s_wvalid(ni_wvalid[i]),
      .s_wlast (ni_wlast[i]),
      .s_wready(ni_wready[i])
    );
  end

endmodule
