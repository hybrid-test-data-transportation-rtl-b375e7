// hts_pkg: constants and helper functions shared by the hybrid test data
// transportation blocks.
//
// A flit of FLIT_W payload bits is split into portions, one per core (or
// group of cores) under test. A core whose portion is PORTION_W bits wide
// has PORTION_W wrapper scan chains, so one "test set" (one bit per chain)
// is PORTION_W bits. On the response side, floor(FLIT_W / PORTION_W) sets
// are stacked into a single flit before it is handed to the network
// interface; the functions below give that count, the resulting number
// of response flits per test vector, and the network clock ratio needed to
// carry the response packets of several cores without loss.
package hts_pkg;

  // Response sets that fit into one flit: floor(flit size / portion width).
  function automatic int unsigned sets_per_flit(int unsigned flit_w, int unsigned portion_w);
    return (portion_w == 0) ? 0 : flit_w / portion_w;
  endfunction

  // Response flits needed per test vector when every burst (one test vector)
  // is flushed on its last set: ceil(chain length / sets per flit).
  function automatic int unsigned resp_flits_per_tv(int unsigned chain_len, int unsigned flit_w,
                                                    int unsigned portion_w);
    int unsigned s;
    s = sets_per_flit(flit_w, portion_w);
    return (chain_len + s - 1) / s;
  endfunction

  // Network-to-tester clock ratio f_N/f_T that carries the stacked response
  // packets of n cores without loss. packet_size counts head and tail flits.
  //   A_n    = floor(flit / P_n)            cycles to fill one response flit
  //   IPRP_n = A_n * (packet_size - 2) + 2  cycles between packets of core n
  //   DoI    = max IPRP_n
  //   NRF    = sum ceil(DoI / IPRP_n * packet_size)
  //   ratio  = ceil(NRF / DoI)
  function automatic int unsigned clock_ratio(int unsigned flit_w, int unsigned packet_size,
                                              int unsigned n, int unsigned portion_w [64]);
    int unsigned iprp [64];
    int unsigned doi = 0, nrf = 0;
    for (int unsigned i = 0; i < n; i++) begin
      iprp[i] = sets_per_flit(flit_w, portion_w[i]) * (packet_size - 2) + 2;
      if (iprp[i] > doi) doi = iprp[i];
    end
    for (int unsigned i = 0; i < n; i++) nrf += (doi * packet_size + iprp[i] - 1) / iprp[i];
    return (doi == 0) ? 0 : (nrf + doi - 1) / doi;
  endfunction

  // Width of a counter that holds the values 0 .. n-1 (at least one bit).
  function automatic int unsigned cnt_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
