// intlv_ref_pkg: reference model for the testbenches. It evaluates the
// two-step IEEE 802.16e interleaver permutation directly from its formula,
// independently of the increment/accumulator structure of the design:
//   m_k = (N/16)*(k mod 16) + floor(k/16)
//   j_k = s*floor(m_k/s) + (m_k + N - floor(16*m_k/N)) mod s
// with N = Ncbps and s = 1 (BPSK, QPSK), 2 (16-QAM), 3 (64-QAM).
package intlv_ref_pkg;

  // Depth in coded bits for modulation type (0..3) and depth code.
  function automatic int ref_ncbps(int mod, int id);
    int qpsk [8] = '{96, 144, 192, 288, 384, 432, 480, 576};
    int q16  [4] = '{192, 288, 384, 576};
    int q64  [4] = '{288, 384, 432, 576};
    case (mod)
      0:       return 48;
      1:       return qpsk[id];
      2:       return q16[id % 4];
      default: return q64[id % 4];
    endcase
  endfunction

  function automatic int ref_s(int mod);
    case (mod)
      2:       return 2;
      3:       return 3;
      default: return 1;
    endcase
  endfunction

  // Interleaved (write) address of coded bit k.
  function automatic int ref_j(int mod, int id, int k);
    int n = ref_ncbps(mod, id);
    int s = ref_s(mod);
    int m = (n / 16) * (k % 16) + k / 16;
    return s * (m / s) + (m + n - (16 * m) / n) % s;
  endfunction

endpackage
