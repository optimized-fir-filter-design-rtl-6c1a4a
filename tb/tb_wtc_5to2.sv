// tb_wtc_5to2: self-checking test of the 5:2 Wallace tree compressor.
// Two instances are tested, the default 8-bit one and a 12-bit one. For
// corner vectors (all zeros, all ones, single ones) and random vectors, the
// sum of the two output rows must equal the sum of the five operands modulo
// 2^W, computed with integer arithmetic. The test also counts vectors whose
// true sum overflows W bits and requires some of them.
module tb_wtc_5to2;
  logic [4:0][7:0]  op8;
  logic [7:0]       s8, c8;
  logic [4:0][11:0] op12;
  logic [11:0]      s12, c12;
  int checks = 0, failures = 0, overflows = 0;

  wtc_5to2 #(.W(8))  dut8  (.op(op8),  .sum(s8),  .carry(c8));
  wtc_5to2 #(.W(12)) dut12 (.op(op12), .sum(s12), .carry(c12));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check;
    int unsigned t8 = 0, t12 = 0;
    #1;
    for (int i = 0; i < 5; i++) begin
      t8  += op8[i];
      t12 += op12[i];
    end
    if (t8 > 255) overflows++;
    checks += 2;
    if (8'(s8 + c8) !== 8'(t8)) begin
      failures++;
      $display("FAIL W=8 ops=%h rows %h+%h expected %h", op8, s8, c8, 8'(t8));
    end
    if (12'(s12 + c12) !== 12'(t12)) begin
      failures++;
      $display("FAIL W=12 ops=%h rows %h+%h expected %h", op12, s12, c12, 12'(t12));
    end
  endtask

  initial begin
    op8 = '0; op12 = '0; check();
    op8 = '1; op12 = '1; check();
    for (int i = 0; i < 5; i++)
      for (int k = 0; k < 12; k++) begin
        op8 = '0; op12 = '0;
        op12[i][k] = 1'b1;
        if (k < 8) op8[i][k] = 1'b1;
        check();
      end
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < 5; i++) begin
        op8[i]  = 8'($urandom);
        op12[i] = 12'($urandom);
      end
      check();
    end
    checks++;
    if (overflows == 0) begin
      failures++;
      $display("FAIL no overflowing sum was exercised");
    end
    $display("overflowing 8-bit sums: %0d", overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
