// tb_obc_lut: self-checking testbench of obc_lut, the single OBC table.
//
// Instances: 4 address bits with FRAC = 0 (halves rounded down, the
// rounding of the paper's simulations) and with FRAC = 1 (exact halves),
// both again with HALF_ROWS = 1 (half the rows stored, the other half
// mirrored), and a 2-bit bank. First the coefficient set a = 2,3,4,5 of the
// paper's single-LUT simulation is checked (address 0011 gives 2, address
// 0010 gives -3), then random signed coefficient sets are checked on every
// row against a model that sums the negative coefficients separately. It also
// checks that the table is empty after reset and keeps its contents while
// the coefficient inputs change without 'load'.
module tb_obc_lut;
  localparam int unsigned A_W = 4, OUT_W = 16;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic signed [A_W-1:0] a  [4];
  logic signed [A_W-1:0] a2 [2];
  logic [3:0] addr;
  logic [1:0] addr2;
  logic signed [OUT_W-1:0] out_f0, out_f1, out_b, out_h0, out_h1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  obc_lut #(.M(4), .A_W(A_W), .OUT_W(OUT_W), .FRAC(0)) dut_f0 (
    .clk, .rst_n, .load, .a, .addr, .out(out_f0));
  obc_lut #(.M(4), .A_W(A_W), .OUT_W(OUT_W), .FRAC(1)) dut_f1 (
    .clk, .rst_n, .load, .a, .addr, .out(out_f1));
  obc_lut #(.M(4), .A_W(A_W), .OUT_W(OUT_W), .FRAC(0), .HALF_ROWS(1'b1)) dut_h0 (
    .clk, .rst_n, .load, .a, .addr, .out(out_h0));
  obc_lut #(.M(4), .A_W(A_W), .OUT_W(OUT_W), .FRAC(1), .HALF_ROWS(1'b1)) dut_h1 (
    .clk, .rst_n, .load, .a, .addr, .out(out_h1));
  obc_lut #(.M(2), .A_W(A_W), .OUT_W(OUT_W), .FRAC(1)) dut_b (
    .clk, .rst_n, .load, .a(a2), .addr(addr2), .out(out_b));

  // Independent model: 2*Q(row) = -(sum of all a) + 2*(sum of a whose bit is 1).
  function automatic int twice_q(input int c [4], input int m, input int row);
    int total = 0, ones = 0;
    for (int k = 0; k < m; k++) begin
      total += c[k];
      if ((row >> (m - 1 - k)) & 1) ones += c[k];
    end
    return 2 * ones - total;
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
    a2[0] = A_W'(c[0]);
    a2[1] = A_W'(c[1]);
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
    a2[0] = '0; a2[1] = '0; addr = '0; addr2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Empty after reset.
    for (int r = 0; r < 16; r++) begin
      addr = 4'(r); #1;
      check("empty after reset", int'(out_f1), 0);
    end

    // The paper's single-LUT example, a = 2,3,4,5.
    c = '{2, 3, 4, 5};
    do_load(c);
    addr = 4'b0011; #1;
    check("a=2,3,4,5 ADDR=0011 FRAC=0", int'(out_f0), 2);
    check("a=2,3,4,5 ADDR=0011 FRAC=1", int'(out_f1), 4);
    addr = 4'b0010; #1;
    check("a=2,3,4,5 ADDR=0010 FRAC=0", int'(out_f0), -3);
    addr = 4'b0000; #1;
    check("a=2,3,4,5 ADDR=0000 FRAC=0", int'(out_f0), -7);
    addr = 4'b1111; #1;
    check("a=2,3,4,5 ADDR=1111 FRAC=0", int'(out_f0), 7);
    check("a=2,3,4,5 ADDR=1111 half rows", int'(out_h0), 7);
    addr = 4'b1100; #1;
    check("a=2,3,4,5 ADDR=1100 half rows", int'(out_h0), -2);

    // Contents stay while a changes without load.
    for (int k = 0; k < 4; k++) a[k] = -4'sd8;
    addr = 4'b0011; #1;
    check("hold without load", int'(out_f0), 2);

    // Random coefficient sets, every row.
    repeat (200) begin
      for (int k = 0; k < 4; k++) c[k] = int'($urandom_range(0, 15)) - 8;
      do_load(c);
      for (int r = 0; r < 16; r++) begin
        addr = 4'(r); #1;
        check($sformatf("row %0d FRAC=0", r), int'(out_f0), floor_half(twice_q(c, 4, r)));
        check($sformatf("row %0d FRAC=1", r), int'(out_f1), twice_q(c, 4, r));
        check($sformatf("half-rows row %0d FRAC=0", r), int'(out_h0), floor_half(twice_q(c, 4, r)));
        check($sformatf("half-rows row %0d FRAC=1", r), int'(out_h1), twice_q(c, 4, r));
      end
      for (int r = 0; r < 4; r++) begin
        addr2 = 2'(r); #1;
        check($sformatf("bank row %0d", r), int'(out_b), twice_q(c, 2, r));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
