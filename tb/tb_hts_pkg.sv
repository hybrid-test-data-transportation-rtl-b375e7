// tb_hts_pkg: reference functions shared by the testbenches.
//
// cap_bit gives the value a behavioural core stores in cell b of scan chain
// c when it captures: the chain contents rotated by one place and inverted on
// every third cell. It stands in for the combinational logic of a real core,
// so that a response differs from the stimulus that produced it.
// stim_set gives the stimuli set a tester places for core `core` in flit k.
package tb_hts_pkg;

  function automatic logic cap_bit(logic [63:0] chain, int unsigned len, int unsigned b,
                                   int unsigned c);
    return chain[(b + len - 1) % len] ^ (((b + c) % 3) == 0);
  endfunction

  function automatic logic [15:0] stim_set(int unsigned core, int unsigned k);
    logic [31:0] h;
    h = (k + 1) * 32'h9E37_79B9 ^ (core + 7) * 32'h85EB_CA6B;
    h = h ^ (h >> 15);
    h = h * 32'hC2B2_AE35;
    return h[23:8];
  endfunction

endpackage
