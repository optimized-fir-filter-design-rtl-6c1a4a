// tb_mcm_fir: end-to-end self-checking test of the 5-tap MCMAT FIR filter at
// its default parameters.
//  1. Reset: the delay line must read zero, and the output for a zero input
//     must then be 5 (each truncated product of a zero sample is 1 because of
//     the rounding constants).
//  2. Step: the input is held at 0xFF until the delay line is full, then
//     switched to 0x01. The delay line must take the new sample one tap per
//     clock cycle (xn_d1 one cycle after xn, ..., xn_d4 four cycles after),
//     and y_n must step through 253, 237, 175, 83, 21, 5: each step removes
//     one tap's T(h,0xFF) and adds its T(h,0x01) = 1.
//  3. Random samples: y_n is compared every cycle with a reference filter
//     built from the integer model of the truncated product and a delay line
//     of its own.
// The test counts resets and completed delay-line shifts, and fails if either
// never happened. With the default coefficients the sum of the five products
// is at most 253, so the output never wraps; the test checks that bound too.
module tb_mcm_fir;
  import mcmat_ref_pkg::*;
  localparam int H[5] = '{16, 63, 93, 63, 16};

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] xn = '0, y_n, xn_d1, xn_d2, xn_d3, xn_d4;
  int checks = 0, failures = 0, cycles = 0;
  int n_reset = 0, n_shift = 0, y_max = 0;
  int unsigned hist[5] = '{0, 0, 0, 0, 0};  // reference delay line, hist[0] = x[n]

  mcm_fir dut (
    .clk(clk), .rst_n(rst_n), .xn(xn), .y_n(y_n),
    .xn_d1(xn_d1), .xn_d2(xn_d2), .xn_d3(xn_d3), .xn_d4(xn_d4)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cycles, what, got, exp);
    end
  endtask

  // Delay-line register k (x[n-k]) as an integer.
  function automatic int tap(int k);
    case (k)
      1:       return int'(xn_d1);
      2:       return int'(xn_d2);
      3:       return int'(xn_d3);
      default: return int'(xn_d4);
    endcase
  endfunction

  // Reference output for the current contents of hist[].
  function automatic int ref_y();
    int unsigned t = 0;
    for (int k = 0; k < 5; k++) t += tmult_ref(H[k], hist[k]);
    return int'(t % 256);
  endfunction

  // Drive a new sample just after a rising edge and check the output.
  task automatic step(input logic [7:0] x);
    int e;
    @(posedge clk);
    for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
    n_shift++;
    #1;
    xn = x;
    hist[0] = 32'(x);
    #1;
    e = ref_y();
    cmp("y_n", int'(y_n), e);
    if (int'(y_n) > y_max) y_max = int'(y_n);
  endtask

  localparam int EXP_Y[6] = '{253, 237, 175, 83, 21, 5};

  initial begin
    // 1. reset
    repeat (2) @(posedge clk);
    #1;
    cmp("xn_d1 after reset", int'(xn_d1), 0);
    cmp("xn_d4 after reset", int'(xn_d4), 0);
    cmp("y_n after reset", int'(y_n), 5);
    n_reset++;
    rst_n = 1'b1;

    // 2. step from 0xFF to 0x01
    for (int n = 0; n < 6; n++) step(8'hFF);
    cmp("y_n all 0xFF", int'(y_n), EXP_Y[0]);
    for (int n = 1; n <= 5; n++) begin
      step(8'h01);
      cmp($sformatf("y_n step %0d", n), int'(y_n), EXP_Y[n]);
      // the 0x01 sample entered n-1 edges ago and sits in tap n-1
      if (n >= 2) cmp($sformatf("xn_d%0d", n - 1),
                      tap(n - 1), 1);
      if (n <= 4) cmp($sformatf("xn_d%0d still old", n),
                      tap(n), 255);
    end

    // 3. random samples
    for (int n = 0; n < 5000; n++) step(8'($urandom));

    // reset in the middle of operation
    @(posedge clk); #1;
    rst_n = 1'b0; #1;
    cmp("xn_d1 after second reset", int'(xn_d1), 0);
    cmp("xn_d3 after second reset", int'(xn_d3), 0);
    n_reset++;
    rst_n = 1'b1;
    hist = '{0, 0, 0, 0, 0};
    hist[0] = 32'(xn);
    for (int n = 0; n < 100; n++) step(8'($urandom));

    $display("resets=%0d shifts=%0d largest output=%0d", n_reset, n_shift, y_max);
    checks += 3;
    if (n_reset < 2) begin failures++; $display("FAIL reset not exercised"); end
    if (y_max > 253) begin failures++; $display("FAIL output above 253"); end
    if (n_shift == 0) begin failures++; $display("FAIL delay line never shifted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
