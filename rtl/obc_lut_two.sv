// obc_lut_two: LUT section of the two-LUT OBC core.
//
// The K-bit bit-slice address is split in two halves. The upper half
// (b1 b2 for K = 4) addresses a table of 2^(K/2) rows built from the first
// K/2 coefficients (a0, a1), the lower half (b3 b4) a table built from the
// last K/2 coefficients (a2, a3). An adder forms out = out1 + out2. The two
// tables together hold 2 * 2^(K/2) rows instead of 2^K, at the cost of the
// adder; this split and the row contents follow the paper.
//
// Interface and timing are those of obc_lut: rows are stored on 'load', the
// outputs follow 'addr' combinationally. out1 and out2 are the bank outputs.
// With FRAC = 0 each bank value is rounded down separately, as in the paper's
// simulation of this core.
module obc_lut_two #(
  parameter int unsigned K     = obc_pkg::OBC_K,
  parameter int unsigned A_W   = obc_pkg::OBC_A_W,
  parameter int unsigned OUT_W = obc_pkg::OBC_OUT_W,
  parameter int unsigned FRAC  = obc_pkg::OBC_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [A_W-1:0]   a    [K],
  input  logic        [K-1:0]     addr,
  output logic signed [OUT_W-1:0] out1,
  output logic signed [OUT_W-1:0] out2,
  output logic signed [OUT_W-1:0] out
);
  localparam int unsigned H = K / 2;

  logic signed [A_W-1:0] a_hi [H];  // a0 .. a(H-1)
  logic signed [A_W-1:0] a_lo [H];  // aH .. a(K-1)

  always_comb begin
    for (int unsigned k = 0; k < H; k++) begin
      a_hi[k] = a[k];
      a_lo[k] = a[H + k];
    end
  end

  obc_lut #(.M(H), .A_W(A_W), .OUT_W(OUT_W), .FRAC(FRAC)) u_lut_hi (
    .clk, .rst_n, .load, .a(a_hi), .addr(addr[K-1:H]), .out(out1)
  );

  obc_lut #(.M(H), .A_W(A_W), .OUT_W(OUT_W), .FRAC(FRAC)) u_lut_lo (
    .clk, .rst_n, .load, .a(a_lo), .addr(addr[H-1:0]), .out(out2)
  );

  assign out = out1 + out2;

endmodule
