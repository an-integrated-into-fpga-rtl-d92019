// tb_ref_pkg: reference models shared by the testbenches.
//
// ref_pattern is a bit-serial textbook Fibonacci LFSR (and fixed-pattern
// source) written independently of the RTL's parallel unrolling: each call
// of next_word() shifts out W bits one at a time, first bit in word bit 0.
// Polynomials: PRBS7 x^7+x^6+1, PRBS15 x^15+x^14+1, PRBS23 x^23+x^18+1,
// PRBS31 x^31+x^28+1; LF = 10 ones, 10 zeros; HF = 0,1,0,1,...
package tb_ref_pkg;

  class ref_pattern;
    int unsigned kind;      // 0..3 PRBS7/15/23/31, 4 LF, 5 HF
    bit [30:0]   sr;        // sr[k] = bit sent k+1 steps ago
    int unsigned pos;       // position in a fixed pattern

    function new(int unsigned k);
      kind = k;
      sr   = '1;
      pos  = 0;
    endfunction

    function bit next_bit();
      bit b;
      case (kind)
        0: b = sr[6]  ^ sr[5];
        1: b = sr[14] ^ sr[13];
        2: b = sr[22] ^ sr[17];
        3: b = sr[30] ^ sr[27];
        4: b = (pos % 20) < 10;
        default: b = pos[0];
      endcase
      pos++;
      sr = {sr[29:0], b};
      return b;
    endfunction

    function bit [255:0] next_word(int w);
      bit [255:0] r;
      r = '0;
      for (int i = 0; i < w; i++) r[i] = next_bit();
      return r;
    endfunction
  endclass

  function automatic int popcount(bit [255:0] v);
    int n = 0;
    for (int i = 0; i < 256; i++) n += v[i];
    return n;
  endfunction

endpackage
