// tb_control_unit: self-checking test of the control unit.
// Every opcode, FUNCT, "=?" result and sign bit; MB, F, MW, MD, LD, the
// load flag and PCJ are compared with the behaviour of each instruction.
module tb_control_unit;
  import cpu_pkg::*;
  instr_info_t info;
  logic [3:0] op;
  logic [2:0] funct;
  logic eq, sign, pcj;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.info, .op, .funct, .eq, .sign, .ctrl, .pcj);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++)
      for (int fn = 0; fn < 8; fn++)
        for (int e = 0; e < 2; e++)
          for (int s = 0; s < 2; s++) begin
            logic emb, emw, emd, eld, ej; logic [2:0] ef;
            op = 4'(o); funct = 3'(fn); eq = e[0]; sign = s[0];
            info = '0;
            info.rtype  = (o == 0);
            info.addi   = (o == 5);
            info.load   = (o == 2);
            info.store  = (o == 4);
            info.branch = (o >= 8 && o <= 11);
            #1;
            emb = (o == 5) || (o == 2) || (o == 4);
            ef  = (o == 0) ? 3'(fn) : 3'b000;
            emw = (o == 4);
            emd = (o == 2);
            eld = (o == 0) || (o == 5) || (o == 2);
            case (o)
              8:  ej = e[0];
              9:  ej = !e[0];
              10: ej = !s[0];
              11: ej = s[0];
              default: ej = 0;
            endcase
            checks++;
            if (ctrl.mb !== emb || ctrl.f !== ef || ctrl.mw !== emw || ctrl.md !== emd ||
                ctrl.ld !== eld || ctrl.load !== emd || pcj !== ej) begin
              failures++;
              $display("FAIL op=%0d fn=%0d eq=%0d sign=%0d ctrl=%p pcj=%b", o, fn, e, s, ctrl, pcj);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
