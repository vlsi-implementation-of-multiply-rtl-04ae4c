// tb_obc_accumulator: self-checking testbench of obc_accumulator.
//
// Part 1 runs whole bit-serial inner products through the accumulator: it is
// initialised with a random offset Q0, then DATA_W random table values Q_j
// are accumulated, the last one subtracted (sub = cin = 1). The result must be
//   Q0 + sum_{j<DATA_W-1} 2^j Q_j - 2^(DATA_W-1) Q_(DATA_W-1),
// computed directly, divided by 2^FRAC. Part 2 checks the adder output 'sum'
// with a free carry-in, including the sum = out + cin case with a cleared
// register (out = 2, cin = 1 -> 3 at the adder's input weight), and that
// 'clr' empties the register and wins over 'init' and 'en'. Part 3 chains
// products with 'keep' and checks that z is their running sum.
module tb_obc_accumulator;
  localparam int unsigned OUT_W = 16, DATA_W = 8, FRAC = 1;
  localparam int unsigned AW = OUT_W + FRAC + DATA_W + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, init = 1'b0, keep = 1'b0, en = 1'b0, sub = 1'b0, cin = 1'b0;
  logic signed [OUT_W-1:0] addend = '0;
  logic signed [AW-1:0] sum;
  logic signed [OUT_W-1:0] z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  obc_accumulator #(.OUT_W(OUT_W), .DATA_W(DATA_W), .FRAC(FRAC)) dut (
    .clk, .rst_n, .clr, .init, .keep, .en, .sub, .cin, .addend, .sum, .z);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint q0, q, exp2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("empty after reset", longint'(z), 0);

    // sum = out + cin with an empty register (the addend enters at weight 2^DATA_W).
    addend = 16'sd2; cin = 1'b1; sub = 1'b0; #1;
    check("sum = out + cin", longint'(sum), (longint'(2) << DATA_W) + 1);
    cin = 1'b0;

    // Part 1: whole inner products, values kept even so the result is exact.
    repeat (500) begin
      q0 = longint'($urandom_range(0, 64)) - 32;
      addend = OUT_W'(q0);
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      exp2 = q0;
      for (int j = 0; j < DATA_W; j++) begin
        q = longint'($urandom_range(0, 64)) - 32;
        addend = OUT_W'(q);
        en = 1'b1;
        sub = (j == DATA_W - 1);
        cin = sub;
        if (sub) exp2 -= q <<< j;
        else     exp2 += q <<< j;
        @(negedge clk);
      end
      en = 1'b0; sub = 1'b0; cin = 1'b0;
      // exp2 is the result scaled by 2^FRAC; z drops the fraction (round down).
      check("inner product", longint'(z), exp2 >>> FRAC);
    end

    // Part 2: clr empties the register and wins over init and en.
    addend = 16'sd100;
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    check("init", longint'(z), (longint'(100) << DATA_W) >>> FRAC);
    clr = 1'b1; init = 1'b1; en = 1'b1;
    @(negedge clk);
    clr = 1'b0; init = 1'b0; en = 1'b0;
    check("clr", longint'(z), 0);

    // Adder output with random register contents, sub and carry-in.
    repeat (500) begin
      longint r, a_in, s_exp;
      r = longint'($urandom_range(0, 400)) - 200;
      addend = OUT_W'(r);
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      a_in = longint'($urandom_range(0, 400)) - 200;
      addend = OUT_W'(a_in);
      sub = ($urandom_range(0, 1) == 1);
      cin = ($urandom_range(0, 1) == 1);
      #1;
      s_exp = (r <<< DATA_W) + (sub ? -(a_in <<< DATA_W) - 1 : (a_in <<< DATA_W)) + (cin ? 1 : 0);
      check("adder", longint'(sum), s_exp);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0; sub = 1'b0; cin = 1'b0;
      check("shift", longint'(z), (s_exp >>> 1) >>> FRAC);
    end

    // Part 3: running sums with keep.
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    begin
      longint total = 0;
      repeat (200) begin
        q0 = longint'($urandom_range(0, 64)) - 32;
        addend = OUT_W'(q0);
        init = 1'b1;
        keep = 1'b1;
        @(negedge clk);
        init = 1'b0;
        keep = 1'b0;
        exp2 = q0;
        for (int j = 0; j < DATA_W; j++) begin
          q = longint'($urandom_range(0, 64)) - 32;
          addend = OUT_W'(q);
          en = 1'b1;
          sub = (j == DATA_W - 1);
          cin = sub;
          if (sub) exp2 -= q <<< j;
          else     exp2 += q <<< j;
          @(negedge clk);
        end
        en = 1'b0; sub = 1'b0; cin = 1'b0;
        total += exp2;
        check("running sum", longint'(z), total >>> FRAC);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
