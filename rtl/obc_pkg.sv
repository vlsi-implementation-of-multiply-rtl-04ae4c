// obc_pkg: shared constants, types and helper functions of the offset binary
// coding (OBC) distributed arithmetic (DA) multiply-accumulate cores.
//
// The defaults describe the configuration the paper builds: K = 4 terms
// (coefficients a0..a3, bit slice address b1..b4), 4-bit coefficients and a
// 16-bit result. DATA_W, the width of the data words that are fed bit-serially,
// is not given by the paper and is this design's choice: 8 bits keep the full
// four-term inner product of 4-bit coefficients inside 16 bits.
//
// FRAC is the number of fractional bits kept in every table value. The OBC
// table entries are halves, -1/2*(+-a0 +-a1 ...). By default (FRAC = 0) each
// half is rounded down, as in the paper's simulations. This loses nothing in
// the final result: every sum +-a0 +-a1 ... has the same parity (that of
// a0 + a1 + ...) at every address, so every slice, the offset slice included,
// is off by the same -1/2 or by nothing, and the slice weights
// 1 + (1 + 2 + ... + 2^(N-2)) - 2^(N-1) add up to zero. FRAC = 1 keeps the
// half bit instead, at the cost of one more bit in every table value.
package obc_pkg;

  localparam int unsigned OBC_K     = 4;   // number of terms (coefficients)
  localparam int unsigned OBC_A_W   = 4;   // coefficient width, signed
  localparam int unsigned OBC_DATA_W = 8;   // data word width N, signed
  localparam int unsigned OBC_OUT_W = 16;  // table output and result width
  localparam int unsigned OBC_FRAC  = 0;   // fractional bits of table values

  // The four LUT-section architectures that the paper compares.
  typedef enum logic [1:0] {
    ARCH_SINGLE_LUT = 2'd0,  // one table of 2^K rows
    ARCH_TWO_LUT    = 2'd1,  // two tables of 2^(K/2) rows and an adder
    ARCH_FOUR_LUT   = 2'd2,  // four tables of 2^(K/4) rows and an adder tree
    ARCH_LUT_LESS   = 2'd3   // 2:1 multiplexers of +-a/2 and an adder tree
  } obc_arch_e;

  localparam int unsigned N_ARCH = 4;

  // Signed sum v scaled by 2^frac / 2: v/2 rounded down when frac = 0,
  // v * 2^(frac-1) otherwise.
  function automatic int obc_half(input int v, input int unsigned frac);
    if (frac == 0) return v >>> 1;
    return v <<< (frac - 1);
  endfunction

  // OBC term of one coefficient: bit 1 selects +c, bit 0 selects -c
  // (the row order of the OBC tables: address 0...0 is -1/2*(a0+a1+...)).
  function automatic int obc_term(input int c, input logic bit_k);
    return bit_k ? c : -c;
  endfunction

endpackage
