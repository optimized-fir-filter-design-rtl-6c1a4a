// tb_mcmat_tmult: exhaustive self-checking test of the 8x8 truncated
// multiplier.
// All 65536 operand pairs are applied. Each result is compared with the
// integer reference model (mcmat_ref_pkg) and with the error bound of the
// design, -129/256 <= p - a*b/256 <= 384/256 ulp, computed from the exact
// product. The two reference points 0xFF*0xFF -> 0xFE and 0x01*0x01 -> 0x01
// are checked on their own, and so are the products used by the filter
// coefficients (16, 63, 93 times 0xFF). Two more instances, one without the
// column-9 constant and one with a smaller deletion region (DEL_COL = 4), are
// compared with the reference model over all pairs as well.
module tb_mcmat_tmult;
  import mcmat_ref_pkg::*;
  logic [7:0] a, b, p, p_nc, p_d4;
  int checks = 0, failures = 0;

  mcmat_tmult dut (.a(a), .b(b), .p(p));
  mcmat_tmult #(.CONST_COL9(1'b0)) dut_nc (.a(a), .b(b), .p(p_nc));
  mcmat_tmult #(.DEL_COL(4))       dut_d4 (.a(a), .b(b), .p(p_d4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_p(input logic [7:0] ea, eb, ep);
    a = ea; b = eb; #1;
    checks++;
    if (p !== ep) begin
      failures++;
      $display("FAIL %0d*%0d: p=%0d expected %0d", ea, eb, p, ep);
    end
  endtask

  initial begin
    int err;
    expect_p(8'hFF, 8'hFF, 8'hFE);
    expect_p(8'h01, 8'h01, 8'h01);
    expect_p(8'd16, 8'hFF, 8'd17);
    expect_p(8'd63, 8'hFF, 8'd63);
    expect_p(8'd93, 8'hFF, 8'd93);
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a = 8'(ia); b = 8'(ib); #1;
        checks++;
        if (int'(p) != int'(tmult_ref(ia, ib))) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d*%0d: p=%0d model %0d", ia, ib, p, tmult_ref(ia, ib));
        end
        checks += 2;
        if (int'(p_nc) != int'(tmult_ref(ia, ib, 6, 1'b0))) begin
          failures++;
          if (failures < 10) $display("FAIL no-constant %0d*%0d: p=%0d", ia, ib, p_nc);
        end
        if (int'(p_d4) != int'(tmult_ref(ia, ib, 4, 1'b1))) begin
          failures++;
          if (failures < 10) $display("FAIL DEL_COL=4 %0d*%0d: p=%0d", ia, ib, p_d4);
        end
        err = 256 * int'(p) - ia * ib;
        checks++;
        if (err < -129 || err > 384) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d*%0d: p=%0d error %0d/256 ulp out of bounds", ia, ib, p, err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
