// tb_wtc_fc: exhaustive self-checking test of the wtc_fc adder cell.
// Every input combination is applied and the outputs are compared with the
// arithmetic count of ones in the inputs (carry = count >= 2).
module tb_wtc_fc;
  logic a, b, ci, co;
  int checks = 0, failures = 0;

  wtc_fc dut (.a(a), .b(b), .ci(ci), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 3); v++) begin
      int ones;
      {a, b, ci} = v[2:0];
      ones = $countones(v[2:0]);
      #1;
      checks++;
      if (co !== (ones >= 2)) begin
        failures++;
        $display("FAIL inputs=%b co=%b", v[2:0], co);
      end

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
