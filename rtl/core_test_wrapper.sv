// core_test_wrapper: test-side wrapper of one core under test (CUT).
//
// Stimuli arrive as multicast flits from the network interface: every flit
// carries one stimuli set (one bit per wrapper scan chain) for each core that
// shares the flit, and this wrapper samples only its own PORTION_W bits at
// PORTION_LSB. Each sampled set is shifted into the core's PORTION_W scan
// chains in one shift cycle, and the set shifted out in the same cycle is the
// response set, which is placed on the same portion of an AXI write-data
// beat towards the network interface; all other WDATA bits are idle (0).
//
// Test sequence after a start pulse, for N_TV test vectors and wrapper chains
// balanced to CHAIN_LEN cells:
//   window 0      CHAIN_LEN shifts, load vector 0 (no responses sent)
//   capture       one cycle with scan_capture high
//   window w      CHAIN_LEN shifts, load vector w, unload response w-1
//   ...           (capture after every window that loaded a vector)
//   window N_TV   CHAIN_LEN shifts, unload response N_TV-1 (scan_in = 0)
// Every unloaded response is one AXI burst of CHAIN_LEN beats whose last
// beat carries WLAST, so CHAIN_LEN * N_TV response sets leave the wrapper.
//
// Interface: stimuli flits use a valid/ready handshake (stim_valid,
// stim_flit, stim_ready); responses use AXI write-data signals (m_wdata,
// m_wvalid, m_wlast, m_wready) held in an output register. A shift happens
// only when the flit it needs is present and the previous response beat has
// been or is being taken, so neither stimuli nor responses are ever lost and
// the core is simply stalled otherwise. Without stalls a test takes
// (N_TV+1)*CHAIN_LEN shift cycles plus N_TV capture cycles. done is high
// from the end of the last response until the next start.
//
// Follows the design: portion sampling of multicast stimuli flits, one set
// per scan chain per flit, responses in the allocated flit portion with idle
// bits elsewhere, CHAIN_LEN * N_TV response sets. Own choices: the start/done
// control, the overlap of unload with load, one burst per test vector, the
// bit order (set bit i drives chain i) and the synchronous active-low reset.
module core_test_wrapper
  import hts_pkg::*;
#(
  parameter int unsigned FLIT_W      = 5,   // flit payload bits
  parameter int unsigned PORTION_W   = 2,   // allocated bits = wrapper scan chains
  parameter int unsigned PORTION_LSB = 0,   // position of the portion in the flit
  parameter int unsigned CHAIN_LEN   = 10,  // longest wrapper scan chain
  parameter int unsigned N_TV        = 1    // test vectors
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // multicast stimuli flits from the network interface
  input  logic                 stim_valid,
  input  logic [FLIT_W-1:0]    stim_flit,
  output logic                 stim_ready,
  // scan access to the core
  output logic                 scan_shift,
  output logic                 scan_capture,
  output logic [PORTION_W-1:0] scan_in,
  input  logic [PORTION_W-1:0] scan_out,
  // responses, AXI write-data channel (master)
  output logic [FLIT_W-1:0]    m_wdata,
  output logic                 m_wvalid,
  output logic                 m_wlast,
  input  logic                 m_wready
);
  localparam int unsigned POS_W = cnt_w(CHAIN_LEN);
  localparam int unsigned WIN_W = cnt_w(N_TV + 1);

  if (PORTION_W == 0 || PORTION_LSB + PORTION_W > FLIT_W || CHAIN_LEN == 0 || N_TV == 0)
  begin : g_bad_cfg
    $error("core_test_wrapper: portion must lie inside the flit, CHAIN_LEN and N_TV nonzero");
  end

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_CAPTURE, S_DRAIN} state_e;

  state_e            state_q;
  logic [POS_W-1:0]  pos_q;    // shift position inside a window
  logic [WIN_W-1:0]  win_q;    // window index 0 .. N_TV
  logic              done_q;
  logic              need_stim, need_resp, resp_free, shift;
  logic              last_pos;

  assign need_stim = (state_q == S_SHIFT) && (win_q < WIN_W'(N_TV));
  assign need_resp = (state_q == S_SHIFT) && (win_q != '0);
  assign resp_free = !m_wvalid || m_wready;
  assign shift     = (state_q == S_SHIFT) && (!need_stim || stim_valid) && (!need_resp || resp_free);
  assign last_pos  = (pos_q == POS_W'(CHAIN_LEN - 1));

  assign stim_ready   = shift && need_stim;
  assign scan_shift   = shift;
  assign scan_capture = (state_q == S_CAPTURE);
  assign scan_in      = need_stim ? stim_flit[PORTION_LSB +: PORTION_W] : '0;
  assign busy         = (state_q != S_IDLE);
  assign done         = done_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      pos_q    <= '0;
      win_q    <= '0;
      done_q   <= 1'b0;
      m_wdata  <= '0;
      m_wvalid <= 1'b0;
      m_wlast  <= 1'b0;
    end else begin
      // response output register
      if (shift && need_resp) begin
        m_wdata                             <= '0;
        m_wdata[PORTION_LSB +: PORTION_W]   <= scan_out;
        m_wvalid                            <= 1'b1;
        m_wlast                             <= last_pos;
      end else if (m_wready) begin
        m_wvalid <= 1'b0;
        m_wlast  <= 1'b0;
      end

      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q <= S_SHIFT;
            pos_q   <= '0;
            win_q   <= '0;
            done_q  <= 1'b0;
          end
        end
        S_SHIFT: begin
          if (shift) begin
            if (last_pos) begin
              pos_q <= '0;
              if (win_q == WIN_W'(N_TV)) state_q <= S_DRAIN;
              else                       state_q <= S_CAPTURE;
            end else begin
              pos_q <= pos_q + 1'b1;
            end
          end
        end
        S_CAPTURE: begin
          win_q   <= win_q + 1'b1;
          state_q <= S_SHIFT;
        end
        S_DRAIN: begin
          if (!m_wvalid || m_wready) begin
            state_q <= S_IDLE;
            done_q  <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a response beat is held, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_wvalid && !m_wready |=> m_wvalid && $stable(m_wdata) && $stable(m_wlast));

endmodule
