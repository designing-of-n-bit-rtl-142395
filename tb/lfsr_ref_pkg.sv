// lfsr_ref_pkg: reference model and expected data for the LFSR testbenches.
//
// ref_next() computes the next state of an N-stage LFSR from the exponents
// of its generator polynomial (x^k is stage k, bit k-1 of the state), one
// tap at a time, without using the RTL's tap masks. The arrays hold the
// first states of each sequence after a zero start, as published for the
// 4, 8, 16 and 32 bit generators.
package lfsr_ref_pkg;

  typedef int unsigned exps_t[4];

  // Exponents of the generator polynomials (0 = unused slot).
  function automatic exps_t poly_exps(int unsigned n);
    case (n)
      4:       return '{4, 3, 0, 0};
      8:       return '{8, 6, 5, 4};
      16:      return '{16, 15, 13, 4};
      32:      return '{32, 22, 2, 1};
      64:      return '{64, 63, 61, 60};
      default: return '{0, 0, 0, 0};
    endcase
  endfunction

  function automatic logic [63:0] ref_next(logic [63:0] s, int unsigned n, bit use_xnor);
    exps_t       e;
    logic        p;
    logic [63:0] nxt;
    e = poly_exps(n);
    p = 1'b0;
    for (int i = 0; i < 4; i++)
      if (e[i] != 0) p = p ^ s[e[i]-1];
    if (use_xnor) p = !p;
    nxt = (s << 1) | 64'(p);
    if (n < 64) nxt = nxt & ((64'd1 << n) - 64'd1);
    return nxt;
  endfunction

  // Published states after a zero start (the zero start itself not listed
  // except for the 4-bit table, which begins with it).
  localparam int unsigned PAT4[16] = '{0, 1, 3, 7, 14, 13, 11, 6, 12, 9, 2, 5, 10, 4, 8, 0};
  localparam int unsigned PAT8[32] = '{
    1, 3, 7, 15, 30, 61, 122, 244, 232, 208, 161, 67, 135, 14, 28, 57,
    114, 229, 203, 151, 47, 95, 191, 127, 254, 253, 251, 247, 238, 220, 184, 113};
  localparam int unsigned PAT16[16] = '{
    1, 3, 7, 15, 30, 60, 120, 240, 481, 963, 1927, 3855, 7710, 15421, 30843, 61686};
  localparam int unsigned PAT32[16] = '{
    1, 2, 4, 9, 18, 36, 73, 146, 292, 585, 1170, 2340, 4681, 9362, 18724, 37449};

endpackage
