// dmc_pkg: shared sizes of the decimal matrix code (DMC) memory.
//
// A data word of K1*K2*M bits is viewed as K1 rows of K2 symbols, each
// symbol M bits wide. The defaults are the 32-bit example configuration:
// 2 rows x 4 symbols of 4 bits, protecting a memory of 32 words. Wider
// words keep K1 x K2 = 2 x 4 and grow M (M = 8 for 64-bit words, M = 16 for
// 128-bit words). The functions give the derived widths so that every module
// computes them the same way.
package dmc_pkg;

  localparam int unsigned DMC_M     = 4;   // bits per symbol
  localparam int unsigned DMC_K1    = 2;   // symbol rows per word
  localparam int unsigned DMC_K2    = 4;   // symbols per row (even)
  localparam int unsigned DMC_DEPTH = 32;  // words in the protected memory (32 words in the reliability study)

  // data bits per word
  function automatic int unsigned data_w(int unsigned m, int unsigned k1, int unsigned k2);
    return k1 * k2 * m;
  endfunction

  // horizontal redundant bits: one (M+1)-bit sum per symbol pair per row
  function automatic int unsigned h_w(int unsigned m, int unsigned k1, int unsigned k2);
    return k1 * (k2 / 2) * (m + 1);
  endfunction

  // vertical redundant bits: one parity bit per data column
  function automatic int unsigned v_w(int unsigned m, int unsigned k2);
    return k2 * m;
  endfunction

  // full codeword: {V, H, D}
  function automatic int unsigned code_w(int unsigned m, int unsigned k1, int unsigned k2);
    return data_w(m, k1, k2) + h_w(m, k1, k2) + v_w(m, k2);
  endfunction

endpackage
