// tb_obc_da_mac: self-checking testbench of obc_da_mac, one OBC DA MAC core.
//
// Instantiates the core once per LUT-section architecture (single, two,
// four, LUT-less), each with halves rounded down (FRAC = 0, the default) and
// with exact halves (FRAC = 1), plus a single-LUT core with a half table
// (HALF_ROWS = 1) at both FRAC values: ten cores on the same inputs. For corner
// and random coefficient/data sets it checks:
//  - every core returns exactly sum_k a_k * y_k;
//  - done comes DATA_W cycles after the start edge, busy is high in between;
//  - done is a single-cycle pulse and the result holds until the next start;
//  - with 'accumulate' high, products add up: z = z + sum a*y.
module tb_obc_da_mac;
  import obc_pkg::*;
  localparam int unsigned K = 4, A_W = 4, DATA_W = 8, OUT_W = 16;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, load = 1'b0, start = 1'b0, accumulate = 1'b0;
  logic signed [A_W-1:0] a [K];
  logic signed [DATA_W-1:0] y [K];
  localparam int unsigned NC = 10;
  logic [NC-1:0] busy, done;
  logic signed [OUT_W-1:0] z [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Core i < 8: architecture i % 4, FRAC = i / 4. Cores 8 and 9: single
  // LUT with half of its rows stored, FRAC = 0 and 1.
  for (genvar i = 0; i < NC; i++) begin : g_dut
    obc_da_mac #(.ARCH(obc_arch_e'(i < 8 ? i % 4 : 0)), .K(K), .A_W(A_W), .DATA_W(DATA_W),
                 .OUT_W(OUT_W), .FRAC(i < 8 ? i / 4 : i - 8), .HALF_ROWS(i >= 8)) dut (
      .clk, .rst_n, .clr, .load, .a, .start, .accumulate, .y,
      .busy(busy[i]), .done(done[i]), .z(z[i]));
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input int c [K], input int w [K]);
    int exact, cycles;
    for (int k = 0; k < K; k++) a[k] = A_W'(c[k]);
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    for (int k = 0; k < K; k++) y[k] = DATA_W'(w[k]);
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done[0]) begin
      checks++;
      if (busy !== '1) begin
        failures++;
        $display("FAIL busy=%b while running", busy);
      end
      @(negedge clk);
      cycles++;
    end
    check("latency (cycles from start edge to done)", cycles - 1, DATA_W);
    check("all cores done together", int'(done), (1 << NC) - 1);
    exact = 0;
    for (int k = 0; k < K; k++) exact += c[k] * w[k];
    for (int i = 0; i < NC; i++)
      check($sformatf("core %0d result", i), int'(z[i]), exact);
    @(negedge clk);
    check("done is one pulse", int'(done), 0);
    for (int i = 0; i < NC; i++) check("result holds", int'(z[i]), exact);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c [K], w [K];
    for (int k = 0; k < K; k++) begin a[k] = '0; y[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // The paper's coefficient set with simple data.
    c = '{2, 3, 4, 5};  w = '{1, 1, 1, 1};         run(c, w);
    c = '{2, 3, 4, 5};  w = '{0, 0, 1, 1};         run(c, w);
    // Extremes: most negative and most positive operands.
    c = '{-8, -8, -8, -8}; w = '{-128, -128, -128, -128}; run(c, w);
    c = '{7, 7, 7, 7};  w = '{-128, -128, -128, -128};    run(c, w);
    c = '{-8, 7, -8, 7}; w = '{127, -128, 127, -128};     run(c, w);
    c = '{0, 0, 0, 0};  w = '{5, -9, 100, -1};            run(c, w);

    repeat (300) begin
      for (int k = 0; k < K; k++) begin
        c[k] = int'($urandom_range(0, 15)) - 8;
        w[k] = int'($urandom_range(0, 255)) - 128;
      end
      run(c, w);
    end

    // Multiply-accumulate: a chain of products with accumulate = 1.
    begin
      int total;
      c = '{2, 3, 4, 5};  w = '{1, 1, 1, 1};
      run(c, w);            // fresh start, z = 14
      total = 14;
      repeat (20) begin
        int p;
        for (int k = 0; k < K; k++) w[k] = int'($urandom_range(0, 255)) - 128;
        p = 0;
        for (int k = 0; k < K; k++) p += c[k] * w[k];
        for (int k = 0; k < K; k++) y[k] = DATA_W'(w[k]);
        accumulate = 1'b1;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        accumulate = 1'b0;
        while (!done[0]) @(negedge clk);
        total += p;
        for (int i = 0; i < NC; i++) check("accumulated result", int'(z[i]), total);
      end
      // Extreme products until the running sum passes the 16-bit range: z
      // must wrap like a two's-complement register.
      c = '{-8, -8, -8, -8};
      for (int k = 0; k < K; k++) a[k] = A_W'(c[k]);
      @(negedge clk) load = 1'b1;
      @(negedge clk) load = 1'b0;
      total = 0;
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      repeat (10) begin
        for (int k = 0; k < K; k++) y[k] = -8'sd128;
        accumulate = 1'b1;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        accumulate = 1'b0;
        while (!done[0]) @(negedge clk);
        total += 4096;
      end
      for (int i = 0; i < NC; i++) check("wrapped accumulated result", int'(z[i]), total - 65536);
      // clr empties the accumulator.
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      for (int i = 0; i < NC; i++) check("clear", int'(z[i]), 0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
