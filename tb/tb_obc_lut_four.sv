// tb_obc_lut_four: self-checking testbench of obc_lut_four, the four-LUT section.
//
// Checks the values of the paper's four-LUT simulation for a = 2,3,4,5 with
// halves rounded down (FRAC = 0): address 0011 gives out1..out4 = -1,-2,2,2,
// x = -3, y = 4, out = 1; address 0010 gives out4 = -3, y = -1, out = -4.
// Then random signed coefficient sets on all 16 addresses against a model,
// for FRAC = 0 and FRAC = 1, and a check that the coefficients are only taken
// on 'load'.
module tb_obc_lut_four;
  localparam int unsigned A_W = 4, OUT_W = 16;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic signed [A_W-1:0] a [4];
  logic [3:0] addr;
  logic signed [OUT_W-1:0] ok_f0 [4], ok_f1 [4];
  logic signed [OUT_W-1:0] x_f0, y_f0, out_f0, x_f1, y_f1, out_f1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  obc_lut_four #(.K(4), .A_W(A_W), .OUT_W(OUT_W), .FRAC(0)) dut_f0 (
    .clk, .rst_n, .load, .a, .addr, .outk(ok_f0), .x(x_f0), .y(y_f0), .out(out_f0));
  obc_lut_four #(.K(4), .A_W(A_W), .OUT_W(OUT_W), .FRAC(1)) dut_f1 (
    .clk, .rst_n, .load, .a, .addr, .outk(ok_f1), .x(x_f1), .y(y_f1), .out(out_f1));

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
    int e [4];
    for (int k = 0; k < 4; k++) a[k] = '0;
    addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    c = '{2, 3, 4, 5};
    do_load(c);
    addr = 4'b0011; #1;
    check("ADDR=0011 out1", int'(ok_f0[0]), -1);
    check("ADDR=0011 out2", int'(ok_f0[1]), -2);
    check("ADDR=0011 out3", int'(ok_f0[2]), 2);
    check("ADDR=0011 out4", int'(ok_f0[3]), 2);
    check("ADDR=0011 x", int'(x_f0), -3);
    check("ADDR=0011 y", int'(y_f0), 4);
    check("ADDR=0011 out", int'(out_f0), 1);
    addr = 4'b0010; #1;
    check("ADDR=0010 out4", int'(ok_f0[3]), -3);
    check("ADDR=0010 y", int'(y_f0), -1);
    check("ADDR=0010 out", int'(out_f0), -4);

    // Changing a without load leaves the outputs alone.
    for (int k = 0; k < 4; k++) a[k] = -4'sd8;
    addr = 4'b0011; #1;
    check("hold without load", int'(out_f0), 1);

    repeat (200) begin
      for (int k = 0; k < 4; k++) c[k] = int'($urandom_range(0, 15)) - 8;
      do_load(c);
      for (int r = 0; r < 16; r++) begin
        addr = 4'(r); #1;
        for (int k = 0; k < 4; k++) e[k] = sgn(r, k) * c[k];
        for (int k = 0; k < 4; k++) begin
          check("FRAC=0 outk", int'(ok_f0[k]), floor_half(e[k]));
          check("FRAC=1 outk", int'(ok_f1[k]), e[k]);
        end
        check("FRAC=0 x", int'(x_f0), floor_half(e[0]) + floor_half(e[1]));
        check("FRAC=0 y", int'(y_f0), floor_half(e[2]) + floor_half(e[3]));
        check("FRAC=0 out", int'(out_f0),
              floor_half(e[0]) + floor_half(e[1]) + floor_half(e[2]) + floor_half(e[3]));
        check("FRAC=1 x", int'(x_f1), e[0] + e[1]);
        check("FRAC=1 y", int'(y_f1), e[2] + e[3]);
        check("FRAC=1 out", int'(out_f1), e[0] + e[1] + e[2] + e[3]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
