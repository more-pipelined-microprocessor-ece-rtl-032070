// decoder: the ID-stage instruction decoder with its sign extender (SE).
//
// Splits the 16-bit instruction into the register-file selects and the
// immediate and classifies it for the control unit and the hazard unit.
//   SA = RS[11:9], SB = RT[8:6] for every format;
//   DR = RD[5:3] for register-to-register instructions, RT for immediate ones
//        (LW RT,IMM(RS) and ADDI RT,RS,IMM write RT);
//   SE(imm) = IMM[5:0] sign-extended to 16 bits.
// uses_sa/uses_sb say which registers the instruction really reads, so that
// the hazard unit stalls only on true dependences: BGEZ/BLTZ read RS only,
// ADDI and LW read RS only, SW reads RS (base) and RT (data), BEQ/BNE and
// R-type read both. Purely combinational. Field positions follow the ISA;
// the non-branch opcodes are this design's choice (see cpu_pkg).
module decoder
  import cpu_pkg::*;
(
  input  word_t       instr,
  output reg_t        sa,
  output reg_t        sb,
  output reg_t        dr,
  output word_t       imm,
  output logic [2:0]  funct,
  output logic [3:0]  op,
  output instr_info_t info
);

  assign op    = instr[15:12];
  assign sa    = instr[11:9];
  assign sb    = instr[8:6];
  assign funct = instr[2:0];
  assign imm   = {{(DW-6){instr[5]}}, instr[5:0]};

  always_comb begin
    info = '0;
    unique case (op)
      OP_RTYPE: begin info.rtype  = 1'b1; info.uses_sa = 1'b1; info.uses_sb = 1'b1; end
      OP_ADDI:  begin info.addi   = 1'b1; info.uses_sa = 1'b1; end
      OP_LW:    begin info.load   = 1'b1; info.uses_sa = 1'b1; end
      OP_SW:    begin info.store  = 1'b1; info.uses_sa = 1'b1; info.uses_sb = 1'b1; end
      OP_BEQ, OP_BNE:
                begin info.branch = 1'b1; info.uses_sa = 1'b1; info.uses_sb = 1'b1; end
      OP_BGEZ, OP_BLTZ:
                begin info.branch = 1'b1; info.uses_sa = 1'b1; end
      default: ;
    endcase
    dr = info.rtype ? instr[5:3] : instr[8:6];
  end

endmodule
