// obc_mac_top: the four OBC distributed arithmetic MAC cores side by side.
//
// The paper builds the same inner-product MAC with four LUT-section
// architectures and compares them: a single 2^K-row OBC table, two tables
// with an adder, four tables with an adder tree, and a LUT-less section of
// multiplexers and adders. This top places one core of each kind on the same
// coefficient and data inputs, so any of them can be used and all can be
// compared. Outputs are indexed by obc_pkg::obc_arch_e:
//   0 single LUT, 1 two LUT, 2 four LUT, 3 LUT-less.
// Interface and timing are those of obc_da_mac: 'load' stores the
// coefficients, 'start' begins an inner product (added onto the previous
// result when 'accumulate' is high), done[i] pulses DATA_W cycles later with
// z[i] valid. All four cores have the same latency.
// SINGLE_HALF_ROWS = 1 lets the single-LUT core store only half of its table
// and mirror the other half, the further halving the paper mentions; the
// default stores the full table.
module obc_mac_top
  import obc_pkg::*;
#(
  parameter int unsigned K      = obc_pkg::OBC_K,
  parameter int unsigned A_W    = obc_pkg::OBC_A_W,
  parameter int unsigned DATA_W = obc_pkg::OBC_DATA_W,
  parameter int unsigned OUT_W  = obc_pkg::OBC_OUT_W,
  parameter int unsigned FRAC   = obc_pkg::OBC_FRAC,
  parameter bit          SINGLE_HALF_ROWS = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     load,
  input  logic signed [A_W-1:0]    a     [K],
  input  logic                     start,
  input  logic                     accumulate,
  input  logic signed [DATA_W-1:0] y     [K],
  output logic [N_ARCH-1:0]        busy,
  output logic [N_ARCH-1:0]        done,
  output logic signed [OUT_W-1:0]  z     [N_ARCH]
);
  for (genvar i = 0; i < N_ARCH; i++) begin : g_core
    obc_da_mac #(
      .ARCH(obc_arch_e'(i)), .K(K), .A_W(A_W), .DATA_W(DATA_W),
      .OUT_W(OUT_W), .FRAC(FRAC), .HALF_ROWS(SINGLE_HALF_ROWS)
    ) u_core (
      .clk, .rst_n, .clr, .load, .a, .start, .accumulate, .y,
      .busy(busy[i]), .done(done[i]), .z(z[i])
    );
  end

endmodule
