// tb_branch_unit: self-checking test of the ID-stage branch hardware.
// Random operands (half of them equal), PCs and immediates; checks the
// "=?" output, the sign bit and target = PC+2 + 2*imm.
module tb_branch_unit;
  logic [15:0] rs_val, rt_val, pc_plus2, imm, target;
  logic eq, sign;
  int checks = 0, failures = 0;

  branch_unit dut (.rs_val, .rt_val, .pc_plus2, .imm, .eq, .sign, .target);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int off; logic [15:0] et;
      rs_val = 16'($urandom);
      rt_val = ($urandom % 2) ? rs_val : 16'($urandom);
      pc_plus2 = 16'($urandom) & 16'hfffe;
      off = int'($urandom % 64) - 32;
      imm = 16'(off);
      #1;
      et = 16'(int'(pc_plus2) + 2 * off);
      checks++;
      if (eq !== (rs_val == rt_val) || sign !== rs_val[15] || target !== et) begin
        failures++;
        $display("FAIL rs=%h rt=%h eq=%b sign=%b target=%h exp %h", rs_val, rt_val, eq, sign, target, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
