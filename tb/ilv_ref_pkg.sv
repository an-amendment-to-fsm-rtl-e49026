// Reference model for the interleaver testbenches.
//
// Evaluates the two-step interleaver permutation directly from its definition (d = 16 columns):
//   m_k = (N/d)*(k mod d) + floor(k/d)
//   j_k = s*floor(m_k/s) + (m_k + N - floor(d*m_k/N)) mod s,   s = max(1, Ncpc/2)
// j_k is the position in the output block of input bit k. The designs under test never compute
// this formula; they accumulate increments, so this gives an independent expected value.
package ilv_ref_pkg;

  function automatic int unsigned ref_j(int unsigned n, int unsigned ncpc, int unsigned k);
    int unsigned s, m;
    s = (ncpc / 2 > 1) ? ncpc / 2 : 1;
    m = (n / 16) * (k % 16) + k / 16;
    return s * (m / s) + (m + n - (16 * m) / n) % s;
  endfunction

  // WLAN: mod_type 0..3 = BPSK, QPSK, 16-QAM, 64-QAM.
  function automatic int unsigned wlan_n(int unsigned mt);
    case (mt)
      0: return 48;
      1: return 96;
      2: return 192;
      default: return 288;
    endcase
  endfunction

  function automatic int unsigned wlan_ncpc(int unsigned mt);
    case (mt)
      0: return 1;
      1: return 2;
      2: return 4;
      default: return 6;
    endcase
  endfunction

  // WiMAX: mod_type 0 = QPSK, 1 = 16-QAM, 2/3 = 64-QAM; id selects the depth.
  function automatic int unsigned wimax_n(int unsigned mt, int unsigned id);
    int unsigned qpsk[8] = '{96, 144, 192, 288, 384, 432, 480, 576};
    int unsigned q16[4]  = '{192, 288, 384, 576};
    int unsigned q64[4]  = '{288, 384, 432, 576};
    if (mt == 0) return qpsk[id % 8];
    if (mt == 1) return q16[id % 4];
    return q64[id % 4];
  endfunction

  function automatic int unsigned wimax_ncpc(int unsigned mt);
    if (mt == 0) return 2;
    if (mt == 1) return 4;
    return 6;
  endfunction

endpackage
