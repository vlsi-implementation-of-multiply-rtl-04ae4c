// obc_da_mac: one offset binary coding (OBC) distributed arithmetic (DA)
// multiply-accumulate core. It computes the inner product
//   z = sum_k a_k * Y_k        (k = 0..K-1)
// of K signed coefficients a_k and K signed DATA_W-bit data words Y_k without
// a multiplier: the data words are fed one bit slice per cycle, each slice
// addresses a LUT section that returns Q(slice) = -1/2 * sum_k (+-a_k), and
// the accumulator adds the values with weights 2^j (the sign slice with
// weight -2^(DATA_W-1)) on top of the constant offset Q(0...0).
//
// ARCH picks the LUT section, the four variants the paper compares:
// single 2^K-row table, two tables, four tables, or multiplexers and adders
// (LUT-less, the default). All four give the same result. HALF_ROWS = 1
// stores only half of the single table and mirrors the other half (see
// obc_lut); it has no effect on the other architectures.
//
// Interface and timing (this design's own handshake):
//   load  - one-cycle pulse: store coefficients a (the LUT precompute).
//           Not allowed while busy or together with start.
//   start - accepted when not busy: the data words y are captured and the
//           accumulator is set to Q(0) read from the LUT section at address 0.
//   accumulate - sampled with start: 1 adds the new inner product onto the
//           previous z (z = z + sum a*Y, the multiply-accumulate), 0 starts
//           from zero.
//   busy  - high during the DATA_W accumulate cycles that follow.
//   done  - one-cycle pulse DATA_W cycles after the start edge; z is valid
//           from then until the next start or clear.
//   clr   - synchronous clear of the result and the controller (the
//           paper's 'clken = 1 then z = 0 else accumulation').
// The result is exact for every FRAC: with FRAC = 0 (the default, halves
// rounded down as in the paper's simulations) the rounding errors of the
// slices cancel (see obc_pkg).
module obc_da_mac
  import obc_pkg::*;
#(
  parameter obc_arch_e   ARCH   = ARCH_LUT_LESS,
  parameter int unsigned K      = obc_pkg::OBC_K,
  parameter int unsigned A_W    = obc_pkg::OBC_A_W,
  parameter int unsigned DATA_W = obc_pkg::OBC_DATA_W,
  parameter int unsigned OUT_W  = obc_pkg::OBC_OUT_W,
  parameter int unsigned FRAC   = obc_pkg::OBC_FRAC,
  parameter bit          HALF_ROWS = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    load,
  input  logic signed [A_W-1:0]   a     [K],
  input  logic                    start,
  input  logic                    accumulate,
  input  logic signed [DATA_W-1:0] y    [K],
  output logic                    busy,
  output logic                    done,
  output logic signed [OUT_W-1:0] z
);
  localparam int unsigned CNT_W = $clog2(DATA_W);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e             state_q;
  logic [CNT_W-1:0]   bit_q;
  logic               go;
  logic               last;
  logic [K-1:0]       slice;
  logic [K-1:0]       lut_addr;
  logic signed [OUT_W-1:0] lut_out;
  logic [DATA_W-1:0]  y_bits [K];

  assign busy = (state_q == S_RUN);
  assign done = (state_q == S_DONE);
  assign go   = start && !busy;
  assign last = busy && (bit_q == CNT_W'(DATA_W - 1));

  // ---------------- controller ----------------
  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      state_q <= S_IDLE;
      bit_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: begin
          state_q <= go ? S_RUN : S_IDLE;
          bit_q   <= '0;
        end
        S_RUN: begin
          bit_q <= bit_q + 1'b1;
          if (last) state_q <= S_DONE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---------------- input data section ----------------
  always_comb begin
    for (int unsigned k = 0; k < K; k++) y_bits[k] = y[k];
  end

  obc_input_section #(.K(K), .DATA_W(DATA_W)) u_input (
    .clk, .rst_n, .load(go), .shift(busy), .y(y_bits), .addr(slice)
  );

  // Address 0 reads the offset term Q(0) while the core starts.
  assign lut_addr = busy ? slice : '0;

  // ---------------- LUT section ----------------
  if (ARCH == ARCH_SINGLE_LUT) begin : g_single
    obc_lut #(.M(K), .A_W(A_W), .OUT_W(OUT_W), .FRAC(FRAC), .HALF_ROWS(HALF_ROWS)) u_lut (
      .clk, .rst_n, .load, .a, .addr(lut_addr), .out(lut_out)
    );
  end else if (ARCH == ARCH_TWO_LUT) begin : g_two
    obc_lut_two #(.K(K), .A_W(A_W), .OUT_W(OUT_W), .FRAC(FRAC)) u_lut (
      .clk, .rst_n, .load, .a, .addr(lut_addr), .out1(), .out2(), .out(lut_out)
    );
  end else if (ARCH == ARCH_FOUR_LUT) begin : g_four
    obc_lut_four #(.K(K), .A_W(A_W), .OUT_W(OUT_W), .FRAC(FRAC)) u_lut (
      .clk, .rst_n, .load, .a, .addr(lut_addr), .outk(), .x(), .y(), .out(lut_out)
    );
  end else begin : g_lut_less
    obc_lut_less #(.K(K), .A_W(A_W), .OUT_W(OUT_W), .FRAC(FRAC)) u_lut (
      .clk, .rst_n, .load, .a, .addr(lut_addr), .outk(), .x(), .y(), .out(lut_out)
    );
  end

  // ---------------- accumulator section ----------------
  obc_accumulator #(.OUT_W(OUT_W), .DATA_W(DATA_W), .FRAC(FRAC)) u_acc (
    .clk, .rst_n, .clr,
    .init(go), .keep(accumulate), .en(busy), .sub(last), .cin(last),
    .addend(lut_out), .sum(), .z
  );

  // ---------------- rules of the interface ----------------
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(load && (start || busy)))
        else $error("obc_da_mac: load while busy or together with start");
    end
  end

endmodule
