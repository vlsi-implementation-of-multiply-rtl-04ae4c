// tb_obc_mac_top: end-to-end testbench of obc_mac_top at its default sizes
// (4 terms, 4-bit coefficients, 8-bit data, 16-bit results).
//
// Streams random inner products through the four cores side by side and
// checks each result against sum_k a_k * y_k and the latency of DATA_W
// cycles. It makes every mechanism of the design happen and counts it:
//   reload  - coefficients replaced between inner products ('load')
//   b2b     - a start accepted in the cycle done is high (back to back)
//   ignored - a start while busy, which must not disturb the running product
//   abort   - a clear in the middle of a product, which must zero the result
//   negsign - a data word with its sign bit set (sign slice subtracted)
//   negres  - a negative inner product
//   accum   - a product added onto the previous result (accumulate = 1),
//             checked against the 16-bit wrapped running sum
// A mechanism that never happened counts as a failure.
module tb_obc_mac_top;
  import obc_pkg::*;
  localparam int unsigned K = OBC_K, A_W = OBC_A_W, DATA_W = OBC_DATA_W, OUT_W = OBC_OUT_W;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, load = 1'b0, start = 1'b0, accumulate = 1'b0;
  logic signed [A_W-1:0] a [K];
  logic signed [DATA_W-1:0] y [K];
  logic [N_ARCH-1:0] busy, done;
  logic signed [OUT_W-1:0] z [N_ARCH];
  int checks = 0, failures = 0;
  int n_reload = 0, n_b2b = 0, n_ignored = 0, n_abort = 0, n_negsign = 0, n_negres = 0, n_accum = 0;

  always #5 clk = ~clk;

  obc_mac_top dut (.clk, .rst_n, .clr, .load, .a, .start, .accumulate, .y, .busy, .done, .z);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int c [K], w [K];

  task automatic new_coefs();
    for (int k = 0; k < K; k++) begin
      c[k] = int'($urandom_range(0, (1 << A_W) - 1)) - (1 << (A_W - 1));
      a[k] = A_W'(c[k]);
    end
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    n_reload++;
  endtask

  task automatic new_data();
    for (int k = 0; k < K; k++) begin
      w[k] = int'($urandom_range(0, (1 << DATA_W) - 1)) - (1 << (DATA_W - 1));
      if (w[k] < 0) n_negsign++;
    end
  endtask

  int total = 0;  // result the cores hold before the next product

  function automatic int exact();
    int s = 0;
    for (int k = 0; k < K; k++) s += c[k] * w[k];
    return s;
  endfunction

  // Runs from a start that is applied in the current cycle to the done cycle.
  // Optionally pokes 'start' with other data while busy.
  // Sign-extended OUT_W-bit wrap of v.
  function automatic int wrap(input int v);
    return int'(v[OUT_W-1] ? (v | (-1 << OUT_W)) : (v & ((1 << OUT_W) - 1)));
  endfunction

  task automatic finish_run(input bit poke, input bit acc);
    int cycles = 0, e;
    e = acc ? wrap(total + exact()) : exact();
    while (done !== '1) begin
      if (poke && cycles == 3) begin
        for (int k = 0; k < K; k++) y[k] = ~y[k];
        start = 1'b1;
        n_ignored++;
      end
      @(negedge clk);
      start = 1'b0;
      cycles++;
      if (cycles > 4 * DATA_W) break;
    end
    check("latency", cycles, DATA_W);
    for (int i = 0; i < N_ARCH; i++) check($sformatf("core %0d result", i), int'(z[i]), e);
    if (exact() < 0) n_negres++;
    if (acc) n_accum++;
    total = e;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < K; k++) begin a[k] = '0; y[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    new_coefs();
    for (int n = 0; n < 400; n++) begin
      bit acc_now;
      if (n % 7 == 3) new_coefs();
      new_data();
      for (int k = 0; k < K; k++) y[k] = DATA_W'(w[k]);
      acc_now = (n % 4 == 2);
      accumulate = acc_now;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      accumulate = 1'b0;
      if (n % 11 == 5) begin
        // Clear in the middle: result must be zero and cores idle.
        repeat (DATA_W / 2) @(negedge clk);
        clr = 1'b1;
        @(negedge clk);
        clr = 1'b0;
        n_abort++;
        total = 0;
        check("abort: not busy", int'(busy), 0);
        for (int i = 0; i < N_ARCH; i++) check("abort: zero result", int'(z[i]), 0);
        repeat (DATA_W) @(negedge clk);
        check("abort: no done", int'(done), 0);
        continue;
      end
      finish_run(n % 5 == 1, acc_now);
      if (n % 3 == 0) begin
        // Back to back: next start in the done cycle.
        new_data();
        for (int k = 0; k < K; k++) y[k] = DATA_W'(w[k]);
        accumulate = 1'b1;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        accumulate = 1'b0;
        n_b2b++;
        finish_run(1'b0, 1'b1);
      end
      @(negedge clk);
    end

    $display("mechanisms: reload=%0d b2b=%0d ignored=%0d abort=%0d negsign=%0d negres=%0d accum=%0d",
             n_reload, n_b2b, n_ignored, n_abort, n_negsign, n_negres, n_accum);
    checks++; if (n_accum   == 0) begin failures++; $display("FAIL accum never happened");   end
    checks++; if (n_reload  == 0) begin failures++; $display("FAIL reload never happened");  end
    checks++; if (n_b2b     == 0) begin failures++; $display("FAIL b2b never happened");     end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL ignored never happened"); end
    checks++; if (n_abort   == 0) begin failures++; $display("FAIL abort never happened");   end
    checks++; if (n_negsign == 0) begin failures++; $display("FAIL negsign never happened"); end
    checks++; if (n_negres  == 0) begin failures++; $display("FAIL negres never happened");  end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
