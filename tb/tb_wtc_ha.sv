// tb_wtc_ha: exhaustive self-checking test of the wtc_ha adder cell.
// Every input combination is applied and the outputs are compared with the
// arithmetic count of ones in the inputs (carry = count >= 2, sum = count odd).
module tb_wtc_ha;
  logic a, b, co, s;
  int checks = 0, failures = 0;

  wtc_ha dut (.a(a), .b(b), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 2); v++) begin
      int ones;
      {a, b} = v[1:0];
      ones = $countones(v[1:0]);
      #1;
      checks++;
      if (co !== (ones >= 2)) begin
        failures++;
        $display("FAIL inputs=%b co=%b", v[1:0], co);
      end
      checks++;
      if (s !== ones[0]) begin
        failures++;
        $display("FAIL inputs=%b s=%b", v[1:0], s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
