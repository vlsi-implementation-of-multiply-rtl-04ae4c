// tb_obc_lut_two: self-checking testbench of obc_lut_two, the two-LUT section.
//
// Checks the values of the paper's two-LUT simulation for a = 2,3,4,5
// (address 0011: out1 = -3, out2 = 4, out = 1; address 0010: out = -4) with
// halves rounded down (FRAC = 0), then random signed coefficient sets on all
// 16 addresses against a model, for FRAC = 0 and FRAC = 1.
module tb_obc_lut_two;
  localparam int unsigned A_W = 4, OUT_W = 16;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic signed [A_W-1:0] a [4];
  logic [3:0] addr;
  logic signed [OUT_W-1:0] o1_f0, o2_f0, out_f0, o1_f1, o2_f1, out_f1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  obc_lut_two #(.K(4), .A_W(A_W), .OUT_W(OUT_W), .FRAC(0)) dut_f0 (
    .clk, .rst_n, .load, .a, .addr, .out1(o1_f0), .out2(o2_f0), .out(out_f0));
  obc_lut_two #(.K(4), .A_W(A_W), .OUT_W(OUT_W), .FRAC(1)) dut_f1 (
    .clk, .rst_n, .load, .a, .addr, .out1(o1_f1), .out2(o2_f1), .out(out_f1));

  // sign of coefficient k at address r: bit 1 -> +, bit 0 -> - (b1 = MSB pairs with a0)
  function automatic int sgn(input int r, input int k);
    return ((r >> (3 - k)) & 1) ? 1 : -1;
  endfunction

  function automatic int floor_half(input int v);
    if (v < 0 && (v % 2) != 0) return v / 2 - 1;
    return v / 2;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic do_load(input int c [4]);
    for (int k = 0; k < 4; k++) a[k] = A_W'(c[k]);
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c [4];
    for (int k = 0; k < 4; k++) a[k] = '0;
    addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    c = '{2, 3, 4, 5};
    do_load(c);
    addr = 4'b0011; #1;
    check("ADDR=0011 out1", int'(o1_f0), -3);
    check("ADDR=0011 out2", int'(o2_f0), 4);
    check("ADDR=0011 out", int'(out_f0), 1);
    addr = 4'b0010; #1;
    check("ADDR=0010 out1", int'(o1_f0), -3);
    check("ADDR=0010 out2", int'(o2_f0), -1);
    check("ADDR=0010 out", int'(out_f0), -4);

    repeat (200) begin
      for (int k = 0; k < 4; k++) c[k] = int'($urandom_range(0, 15)) - 8;
      do_load(c);
      for (int r = 0; r < 16; r++) begin
        int h1, h2;
        addr = 4'(r); #1;
        h1 = sgn(r, 0) * c[0] + sgn(r, 1) * c[1];
        h2 = sgn(r, 2) * c[2] + sgn(r, 3) * c[3];
        check("FRAC=0 out1", int'(o1_f0), floor_half(h1));
        check("FRAC=0 out2", int'(o2_f0), floor_half(h2));
        check("FRAC=0 out", int'(out_f0), floor_half(h1) + floor_half(h2));
        check("FRAC=1 out1", int'(o1_f1), h1);
        check("FRAC=1 out2", int'(o2_f1), h2);
        check("FRAC=1 out", int'(out_f1), h1 + h2);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
