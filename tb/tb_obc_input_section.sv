// tb_obc_input_section: self-checking testbench of obc_input_section.
//
// Loads random data words and checks, for every bit position j, that the
// address presented after j shifts is bit j of every word, with Y_0 on the
// most significant address bit. Also checks that the registers hold when
// 'shift' is low and that 'load' wins over 'shift'.
module tb_obc_input_section;
  localparam int unsigned K = 4, DATA_W = 8;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [DATA_W-1:0] y [K];
  logic [K-1:0] addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  obc_input_section #(.K(K), .DATA_W(DATA_W)) dut (.clk, .rst_n, .load, .shift, .y, .addr);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected slice j: bit j of Y_k placed at address bit K-1-k.
  function automatic int slice(input int w [K], input int j);
    int s = 0;
    for (int k = 0; k < K; k++) s = s * 2 + ((w[k] >> j) & 1);
    return s;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w [K];
    for (int k = 0; k < K; k++) y[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("empty after reset", int'(addr), 0);

    repeat (300) begin
      for (int k = 0; k < K; k++) begin
        w[k] = int'($urandom_range(0, (1 << DATA_W) - 1));
        y[k] = DATA_W'(w[k]);
      end
      load = 1'b1;
      shift = ($urandom_range(0, 1) == 1);  // load has priority
      @(negedge clk);
      load = 1'b0;
      shift = 1'b0;
      for (int j = 0; j < DATA_W; j++) begin
        check($sformatf("slice %0d", j), int'(addr), slice(w, j));
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);  // no shift: must hold
          check($sformatf("hold %0d", j), int'(addr), slice(w, j));
        end
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
