// test_response_accumulator: the test interface that sits on the AXI write
// data channel between a core under test (the AXI master) and the slave port
// of its network interface (NI).
//
// In test mode the interface samples the core's allocated portion of WDATA
// (PORTION_W bits at PORTION_LSB) on every accepted beat and writes it into
// the next slot of a FLIT_W-bit stack register. Slot s occupies bits
// [s*PORTION_W +: PORTION_W], filled from bit 0 upward; bits above
// SETS*PORTION_W are idle and stay 0. The stack register is not cleared
// after it is sent, so a partly filled flit still carries the older sets in
// its upper slots (the receiver knows how many sets are valid).
// When SETS = floor(FLIT_W/PORTION_W) sets are stacked, or when the master
// marks a beat with WLAST, the stack register is offered to the NI with
// TWVALID, which stays high until the NI accepts it with WREADY. The master
// sees TWREADY, which is low only while a full stack register waits for the
// NI; it follows WREADY in that state, so a new set is accepted in the same
// cycle the old flit leaves and the interface sustains one set per cycle.
// With test_en low the output multiplexers pass WDATA, WVALID, WLAST and
// WREADY through unchanged. Stacking only pays off when the portion is at
// most half the flit; for a wider portion SETS is 1 and every set travels in
// a flit of its own, in its own portion, as it would without the interface.
//
// Timing: TWVALID rises one clock after the beat that fills the stack
// register (or carries WLAST). Reset is synchronous, active low.
//
// Follows the design: the stack register, the sampling of one portion per
// beat, the control unit watching WVALID, WLAST and WREADY, TWVALID held
// until WREADY, TWREADY held low until the NI takes the data, WLAST acting
// as an immediate flush, and the test-enable multiplexers. Own choices: the
// portion position, the slot order (chosen to reproduce the published
// waveform values), and WLAST towards the NI, which in test mode is a
// registered copy that travels with the flushed flit instead of a straight
// wire, so the NI never sees WLAST on a beat that does not close the burst.
module test_response_accumulator
  import hts_pkg::*;
#(
  parameter int unsigned FLIT_W      = 5,  // flit payload bits (= AXI WDATA width)
  parameter int unsigned PORTION_W   = 2,  // bits of the flit allocated to this core
  parameter int unsigned PORTION_LSB = 0   // position of that portion in WDATA
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_en,
  // AXI master side (core under test)
  input  logic [FLIT_W-1:0] m_wdata,
  input  logic              m_wvalid,
  input  logic              m_wlast,
  output logic              m_wready,
  // AXI slave side (network interface)
  output logic [FLIT_W-1:0] s_wdata,
  output logic              s_wvalid,
  output logic              s_wlast,
  input  logic              s_wready
);
  localparam int unsigned SETS   = sets_per_flit(FLIT_W, PORTION_W);
  localparam int unsigned SLOT_W = cnt_w(SETS);
  // First slot: bit 0 when sets are stacked, the portion itself otherwise.
  localparam int unsigned SLOT0  = (SETS == 1) ? PORTION_LSB : 0;

  // Stacking needs a portion of at most half a flit; a wider portion gives
  // SETS = 1, one set per flit, which is still legal (no accumulation).
  if (SETS < 1 || PORTION_LSB + PORTION_W > FLIT_W) begin : g_bad_cfg
    $error("test_response_accumulator: the portion must fit in WDATA");
  end

  logic [FLIT_W-1:0]    stack_q;   // TWDATA
  logic [SLOT_W-1:0]    slot_q;    // next slot to write
  logic                 full_q;    // stack register waits for the NI (TWVALID)
  logic                 last_q;    // the waiting flit closes a burst
  logic                 twready;
  logic                 accept;    // a set enters the stack register
  logic                 drain;     // the NI takes the stack register
  logic                 close;     // this beat completes a flit
  logic [PORTION_W-1:0] set_in;

  assign set_in  = m_wdata[PORTION_LSB +: PORTION_W];
  assign twready = !full_q || s_wready;
  assign accept  = test_en && m_wvalid && twready;
  assign drain   = test_en && full_q && s_wready;
  assign close   = (slot_q == SLOT_W'(SETS - 1)) || m_wlast;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stack_q <= '0;
      slot_q  <= '0;
      full_q  <= 1'b0;
      last_q  <= 1'b0;
    end else begin
      if (drain) begin
        full_q <= 1'b0;
        last_q <= 1'b0;
      end
      if (accept) begin
        for (int unsigned s = 0; s < SETS; s++) begin
          if (slot_q == SLOT_W'(s)) stack_q[SLOT0 + s*PORTION_W +: PORTION_W] <= set_in;
        end
        if (close) begin
          full_q <= 1'b1;
          last_q <= m_wlast;
          slot_q <= '0;
        end else begin
          slot_q <= slot_q + 1'b1;
        end
      end
    end
  end

  // Test-enable multiplexers: 1 selects the transitory signals.
  assign s_wdata  = test_en ? stack_q : m_wdata;
  assign s_wvalid = test_en ? full_q  : m_wvalid;
  assign s_wlast  = test_en ? last_q  : m_wlast;
  assign m_wready = test_en ? twready : s_wready;

  // AXI rule on the NI side: a valid flit is held, unchanged, until taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    test_en && s_wvalid && !s_wready |=> s_wvalid && $stable(s_wdata) && $stable(s_wlast));

endmodule
