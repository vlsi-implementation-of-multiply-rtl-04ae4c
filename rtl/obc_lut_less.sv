// obc_lut_less: LUT-less (adder based) LUT section of the OBC core.
//
// No table is stored. Each coefficient is kept in a register; for every term
// a 2:1 multiplexer picks +1/2*a_k when its address bit is 1 and -1/2*a_k
// when it is 0 (address bit K-1-k, so b1 drives a0). The K selected halves
// are summed: x adds the first K/2 terms, y the last K/2, out = x + y. For
// K = 4 this is out1+out2, out3+out4 and their sum, the structure and the
// multiplexer labels the paper gives for this core. Keeping the coefficients
// in registers (loaded with 'load') is this design's choice; it gives this
// core the same interface and timing as the table-based ones.
//
// Outputs follow 'addr' combinationally. With FRAC = 0 each half is rounded
// down separately, as in the paper's simulation of this core.
module obc_lut_less #(
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
  output logic signed [OUT_W-1:0] outk [K],
  output logic signed [OUT_W-1:0] x,
  output logic signed [OUT_W-1:0] y,
  output logic signed [OUT_W-1:0] out
);
  import obc_pkg::*;

  logic signed [A_W-1:0] coef_q [K];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < K; k++) coef_q[k] <= '0;
    end else if (load) begin
      coef_q <= a;
    end
  end

  // Multiplexers between the two halves +1/2*a_k and -1/2*a_k.
  always_comb begin
    for (int unsigned k = 0; k < K; k++) begin
      outk[k] = OUT_W'(obc_half(obc_term(int'(coef_q[k]), addr[K-1-k]), FRAC));
    end
  end

  // Adder tree.
  always_comb begin
    x = '0;
    y = '0;
    for (int unsigned k = 0; k < K / 2; k++) begin
      x += outk[k];
      y += outk[K/2 + k];
    end
  end

  assign out = x + y;

endmodule
