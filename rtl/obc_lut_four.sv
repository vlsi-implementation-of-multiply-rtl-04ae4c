// obc_lut_four: LUT section of the four-LUT OBC core.
//
// The K coefficients are split into four banks of K/4. Each bank is an OBC
// table of 2^(K/4) rows addressed by its K/4 address bits; for K = 4 every
// bank holds the two values -1/2*a_k (bit 0) and -1/2*(-a_k) (bit 1). A
// two-level adder tree combines them: x = out1 + out2, y = out3 + out4,
// out = x + y. Banks, contents and tree follow the paper.
//
// Interface and timing are those of obc_lut: rows are stored on 'load', the
// outputs follow 'addr' combinationally. outk[i] is bank i+1 (out1..out4).
// With FRAC = 0 each bank value is rounded down separately, as in the
// paper's simulation of this core.
module obc_lut_four #(
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
  output logic signed [OUT_W-1:0] outk [4],
  output logic signed [OUT_W-1:0] x,
  output logic signed [OUT_W-1:0] y,
  output logic signed [OUT_W-1:0] out
);
  localparam int unsigned B = K / 4;  // address bits per bank

  for (genvar g = 0; g < 4; g++) begin : g_bank
    logic signed [A_W-1:0] a_b [B];

    always_comb begin
      for (int unsigned k = 0; k < B; k++) a_b[k] = a[g*B + k];
    end

    obc_lut #(.M(B), .A_W(A_W), .OUT_W(OUT_W), .FRAC(FRAC)) u_lut (
      .clk, .rst_n, .load, .a(a_b), .addr(addr[K-1-g*B -: B]), .out(outk[g])
    );
  end

  assign x   = outk[0] + outk[1];
  assign y   = outk[2] + outk[3];
  assign out = x + y;

endmodule
