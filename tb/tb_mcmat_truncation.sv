// tb_mcmat_truncation: self-checking test of the five-product MCMAT unit.
// Reference vectors: all ten operands 0xFF give five products 0xFE and a
// result 0xF6 (5 * 0xFE wrapped to 8 bits); all operands 0x01 give products
// 0x01 and a result 0x05. Random vectors are then checked against the integer
// reference: each product from mcmat_ref_pkg::tmult_ref, the result their sum
// modulo 256. Sums that wrap past 8 bits are counted and must occur.
module tb_mcmat_truncation;
  import mcmat_ref_pkg::*;
  logic [9:0][7:0] v;   // a, b, cf, d, e, f, g, h, k, l
  logic [7:0] o, o0, o1, o2, o3, result;
  int checks = 0, failures = 0, wraps = 0;

  mcmat_truncation dut (
    .a(v[0]), .b(v[1]), .cf(v[2]), .d(v[3]), .e(v[4]), .f(v[5]),
    .g(v[6]), .h(v[7]), .k(v[8]), .l(v[9]),
    .o(o), .o0(o0), .o1(o1), .o2(o2), .o3(o3), .result(result)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input logic [7:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (operands %h)", what, got, exp, v);
    end
  endtask

  task automatic check_random;
    logic [4:0][7:0] ep;
    int unsigned total = 0;
    #1;
    for (int i = 0; i < 5; i++) begin
      ep[i] = 8'(tmult_ref(v[2*i], v[2*i+1]));
      total += ep[i];
    end
    if (total > 255) wraps++;
    cmp("o", o, ep[0]);   cmp("o0", o0, ep[1]); cmp("o1", o1, ep[2]);
    cmp("o2", o2, ep[3]); cmp("o3", o3, ep[4]);
    cmp("result", result, 8'(total));
  endtask

  initial begin
    v = {10{8'h01}}; #1;
    cmp("o (all 01)", o, 8'h01);
    cmp("result (all 01)", result, 8'b00000101);
    v = {10{8'hFF}}; #1;
    cmp("o (all FF)", o, 8'b11111110);   cmp("o0 (all FF)", o0, 8'b11111110);
    cmp("o1 (all FF)", o1, 8'b11111110); cmp("o2 (all FF)", o2, 8'b11111110);
    cmp("o3 (all FF)", o3, 8'b11111110);
    cmp("result (all FF)", result, 8'b11110110);
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < 10; i++) v[i] = 8'($urandom);
      check_random();
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrapping sum was exercised");
    end
    $display("wrapping sums: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
