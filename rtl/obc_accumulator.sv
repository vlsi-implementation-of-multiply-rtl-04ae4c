// obc_accumulator: accumulator section of the OBC distributed arithmetic core.
//
// An adder and a register with a one-bit right shift per cycle, the classic
// bit-serial DA accumulator. The table value for bit slice j enters at the
// top of the register (weight 2^DATA_W) and the sum is shifted right, so
// after DATA_W steps slice j carries weight 2^j. Before the first step the
// register is initialised with the OBC offset term Q(0) at the top, which
// the shifts bring down to weight 1: after the last step the register holds
//   Q(0) + sum_{j<DATA_W-1} 2^j Q_j - 2^(DATA_W-1) Q_(DATA_W-1),
// the OBC form of the inner product. The sign slice (the last one) has a
// negative weight; it is subtracted by inverting the addend ('sub') and
// setting the adder's carry-in ('cin'). The controller drives cin = sub; the
// separate carry-in port mirrors the 'sum = out + cin' adder of the paper.
//
// Controls, all sampled on the rising clock edge, in priority order:
//   clr  - clear the register (the paper's clken = 1 -> z = 0)
//   init - register <= addend * 2^DATA_W, plus register * 2^DATA_W when
//          'keep' is high: the previous result is carried into the new
//          product, so the core can accumulate z = z + sum_k a_k*Y_k
//   en   - register <= (register + (sub ? ~A : A) + cin) >>> 1,
//          A = addend * 2^DATA_W
// z is the register with its FRAC fractional bits dropped; sum is the adder
// output before the shift. The register is wide enough that no bit of z is
// lost; when an accumulated result overflows OUT_W bits, z wraps around like
// any two's-complement sum.
module obc_accumulator #(
  parameter int unsigned OUT_W  = obc_pkg::OBC_OUT_W,
  parameter int unsigned DATA_W = obc_pkg::OBC_DATA_W,
  parameter int unsigned FRAC   = obc_pkg::OBC_FRAC,
  localparam int unsigned AW    = OUT_W + FRAC + DATA_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    init,
  input  logic                    keep,
  input  logic                    en,
  input  logic                    sub,
  input  logic                    cin,
  input  logic signed [OUT_W-1:0] addend,
  output logic signed [AW-1:0]    sum,
  output logic signed [OUT_W-1:0] z
);
  logic signed [AW-1:0] acc_q;
  logic signed [AW-1:0] aligned;
  logic signed [AW-1:0] operand;

  assign aligned = AW'(addend) <<< DATA_W;
  assign operand = sub ? ~aligned : aligned;
  assign sum     = acc_q + operand + AW'(cin);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) acc_q <= '0;
    else if (init)     acc_q <= keep ? aligned + (acc_q <<< DATA_W) : aligned;
    else if (en)       acc_q <= sum >>> 1;
  end

  assign z = acc_q[FRAC +: OUT_W];

endmodule
