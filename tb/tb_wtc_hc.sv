// tb_wtc_hc: exhaustive self-checking test of the wtc_hc adder cell.
// Every input combination is applied and the outputs are compared with the
// arithmetic count of ones in the inputs (carry = count >= 2).
module tb_wtc_hc;
  logic a, b, co;
  int checks = 0, failures = 0;

  wtc_hc dut (.a(a), .b(b), .co(co));

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

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
