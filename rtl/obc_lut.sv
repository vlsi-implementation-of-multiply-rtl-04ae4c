// obc_lut: one offset binary coding look-up table of 2^M rows.
//
// Row r holds Q(r) = -1/2 * sum_k (r_k ? -a_k : +a_k), where r_k is address
// bit M-1-k, so the most significant address bit (b1) goes with a0 and the
// least significant with a(M-1). Row 0...0 is -1/2*(a0+a1+...), row 1...1 is
// -1/2*(-a0-a1-...), exactly the table the paper prints for its single-LUT
// OBC core. With M = K this module is the whole LUT section of the single-LUT
// core; the two- and four-LUT cores use it as a bank with fewer address bits.
//
// Filling: all rows are computed in parallel from the coefficient inputs and
// stored on a one-cycle 'load' pulse (the precompute step of distributed
// arithmetic; how the table is filled is this design's choice). Reading is
// combinational: 'out' follows 'addr' in the same cycle. Reset clears the
// table. Values are signed, OUT_W bits, with FRAC fractional bits
// (FRAC = 0 rounds each half down, as the paper's simulations do).
//
// HALF_ROWS = 1 uses the antisymmetry the paper points out (the upper half of
// the table is the lower half with the sign reversed): only the 2^(M-1) rows
// with address MSB 0 are stored, and a row r with MSB 1 is read as the
// negated row ~r. With rounded halves (FRAC = 0) the negation of a rounded
// value is off by one when the coefficient sum is odd, so the mirrored row is
// ~Q(~r) + 1 - p, p being the stored parity of a0 + a1 + ...; with FRAC >= 1
// it is plain ~Q(~r) + 1. The default stores all rows, as the paper's
// single-LUT table does. HALF_ROWS needs M >= 2.
module obc_lut #(
  parameter int unsigned M     = obc_pkg::OBC_K,
  parameter int unsigned A_W   = obc_pkg::OBC_A_W,
  parameter int unsigned OUT_W = obc_pkg::OBC_OUT_W,
  parameter int unsigned FRAC  = obc_pkg::OBC_FRAC,
  parameter bit          HALF_ROWS = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [A_W-1:0]   a    [M],
  input  logic        [M-1:0]     addr,
  output logic signed [OUT_W-1:0] out
);
  import obc_pkg::*;

  localparam int unsigned ROWS   = 1 << M;
  localparam bit          MIRROR = HALF_ROWS && (M >= 2);
  localparam int unsigned STORED = MIRROR ? ROWS / 2 : ROWS;

  logic signed [OUT_W-1:0] rows_d [STORED];
  logic signed [OUT_W-1:0] rows_q [STORED];
  logic                    odd_d, odd_q;

  // Precompute the stored rows (address MSB 0 when mirrored) from the
  // current coefficients.
  always_comb begin
    odd_d = 1'b0;
    for (int unsigned k = 0; k < M; k++) odd_d ^= a[k][0];
    for (int unsigned r = 0; r < STORED; r++) begin
      int s;
      s = 0;
      for (int unsigned k = 0; k < M; k++) begin
        s += obc_term(int'(a[k]), r[M-1-k]);
      end
      rows_d[r] = OUT_W'(obc_half(s, FRAC));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < STORED; r++) rows_q[r] <= '0;
      odd_q <= 1'b0;
    end else if (load) begin
      rows_q <= rows_d;
      odd_q  <= odd_d;
    end
  end

  if (MIRROR) begin : g_mirror
    logic [M-2:0] idx;
    logic         neg;
    assign neg = addr[M-1];
    assign idx = neg ? ~addr[M-2:0] : addr[M-2:0];
    // -Q - p = ~Q + 1 - p, p = 1 only for rounded halves of an odd sum.
    assign out = neg ? ~rows_q[idx] + OUT_W'(!(odd_q && FRAC == 0)) : rows_q[idx];
  end else begin : g_full
    assign out = rows_q[addr];
  end

endmodule
