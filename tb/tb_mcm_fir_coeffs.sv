// tb_mcm_fir_coeffs: self-checking test of the FIR filter with a non-default,
// asymmetric coefficient set h = {200, 5, 77, 130, 31}.
//  1. Impulse: after reset the input is 0, then a single 0xFF sample. The
//     output must be 204, 10, 81, 134, 35, 5 on consecutive cycles: tap k
//     contributes T(h(k),0xFF) in the k-th cycle and 1 otherwise, so the
//     sequence also proves that COEFFS[k] multiplies x[n-k].
//  2. Random samples: the output is compared every cycle with a reference
//     filter (integer model of the truncated product and its own delay line).
//     With these coefficients the sum of products can exceed 255; the output
//     must then wrap modulo 256, and such wraps are counted and required.
module tb_mcm_fir_coeffs;
  import mcmat_pkg::*;
  import mcmat_ref_pkg::*;
  localparam taps_t COEFFS = '{8'd200, 8'd5, 8'd77, 8'd130, 8'd31};
  localparam int EXP_IMP[6] = '{204, 10, 81, 134, 35, 5};

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] xn = '0, y_n, xn_d1, xn_d2, xn_d3, xn_d4;
  int checks = 0, failures = 0, n_wrap = 0;
  int unsigned hist[5] = '{0, 0, 0, 0, 0};

  mcm_fir #(.COEFFS(COEFFS)) dut (
    .clk(clk), .rst_n(rst_n), .xn(xn), .y_n(y_n),
    .xn_d1(xn_d1), .xn_d2(xn_d2), .xn_d3(xn_d3), .xn_d4(xn_d4)
  );

  always #5 clk = ~clk;

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
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step(input logic [7:0] x);
    int unsigned t = 0;
    @(posedge clk);
    for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
    #1;
    xn = x;
    hist[0] = 32'(x);
    #1;
    for (int k = 0; k < 5; k++) t += tmult_ref(32'(COEFFS[k]), hist[k]);
    if (t > 255) n_wrap++;
    cmp("y_n", int'(y_n), int'(t % 256));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5; n++) step(8'h00);
    for (int n = 0; n < 6; n++) begin
      step(n == 0 ? 8'hFF : 8'h00);
      cmp($sformatf("impulse response [%0d]", n), int'(y_n), EXP_IMP[n]);
    end
    for (int n = 0; n < 3000; n++) step(8'($urandom));
    $display("wrapped outputs: %0d", n_wrap);
    checks++;
    if (n_wrap == 0) begin
      failures++;
      $display("FAIL output wrap never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
