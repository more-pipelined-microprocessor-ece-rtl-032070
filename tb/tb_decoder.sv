// tb_decoder: self-checking test of the instruction decoder and SE.
// Random instructions of every opcode; fields, destination, sign-extended
// immediate and the instruction class are compared with a table written
// here from the instruction formats.
module tb_decoder;
  import cpu_pkg::*;
  logic [15:0] instr, imm;
  reg_t sa, sb, dr;
  logic [2:0] funct;
  logic [3:0] op;
  instr_info_t info;
  int checks = 0, failures = 0;

  decoder dut (.instr, .sa, .sb, .dr, .imm, .funct, .op, .info);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      logic [3:0] o; logic [6:0] cls; logic [2:0] edr; logic [15:0] eimm;
      instr = 16'($urandom);
      #1;
      o = instr[15:12];
      // {rtype, addi, load, store, branch, uses_sa, uses_sb}
      case (o)
        4'b0000: cls = 7'b1000011;
        4'b0101: cls = 7'b0100010;
        4'b0010: cls = 7'b0010010;
        4'b0100: cls = 7'b0001011;
        4'b1000, 4'b1001: cls = 7'b0000111;
        4'b1010, 4'b1011: cls = 7'b0000110;
        default: cls = 7'b0000000;
      endcase
      edr  = (o == 4'b0000) ? instr[5:3] : instr[8:6];
      eimm = 16'($signed(instr[5:0]));
      checks++;
      if (sa !== instr[11:9] || sb !== instr[8:6] || dr !== edr || imm !== eimm ||
          funct !== instr[2:0] || op !== o || info !== cls) begin
        failures++;
        $display("FAIL instr=%h sa=%0d sb=%0d dr=%0d/%0d imm=%h/%h info=%b/%b", instr, sa, sb, dr, edr, imm, eimm, info, cls);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
