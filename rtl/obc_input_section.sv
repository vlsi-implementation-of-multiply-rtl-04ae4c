// obc_input_section: input data section of the OBC distributed arithmetic core.
//
// Holds the K data words Y_0..Y_(K-1) in parallel-in, serial-out shift
// registers. 'load' captures all words at once; every 'shift' moves each
// register one bit towards its least significant end. The current bit slice
// (one bit of every word, same weight) is the LUT address: addr[K-1] comes
// from Y_0 (b1), addr[0] from Y_(K-1). Bits leave least significant first
// (this design's choice; the paper only says that the bits of the inputs form
// the LUT addresses), so the sign bits form the last slice, DATA_W-1 shifts
// after the load.
//
// Timing: addr is the slice of bit 0 in the cycle after 'load', of bit j
// after j further shifts. 'load' has priority over 'shift'.
module obc_input_section #(
  parameter int unsigned K      = obc_pkg::OBC_K,
  parameter int unsigned DATA_W = obc_pkg::OBC_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              shift,
  input  logic [DATA_W-1:0] y    [K],
  output logic [K-1:0]      addr
);
  logic [DATA_W-1:0] sr_q [K];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < K; k++) sr_q[k] <= '0;
    end else if (load) begin
      sr_q <= y;
    end else if (shift) begin
      for (int unsigned k = 0; k < K; k++) sr_q[k] <= sr_q[k] >> 1;
    end
  end

  always_comb begin
    for (int unsigned k = 0; k < K; k++) addr[K-1-k] = sr_q[k][0];
  end

endmodule
