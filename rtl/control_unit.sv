// control_unit: the CU of the pipeline, working on the instruction in ID.
//
// Produces the control signals of every later stage, which then travel down
// the pipeline registers with the instruction:
//   EX : MB (1 = ALU operand B is SE(imm)), F (ALU function)
//   MEM: MW (write Data RAM), MD (1 = write back the Data RAM output)
//   WB : LD (write the register file)
// and, for IF, PCJ: taken branch, from the "=?" result and the sign bit:
//   BEQ  eq,  BNE !eq,  BGEZ !sign,  BLTZ sign.
// R-type instructions use FUNCT as F; ADDI, LW and SW add. Purely
// combinational. The signal names and the stage they belong to follow the
// source; their encodings are this design's choice.
module control_unit
  import cpu_pkg::*;
(
  input  instr_info_t info,
  input  logic [3:0]  op,
  input  logic [2:0]  funct,
  input  logic        eq,
  input  logic        sign,
  output ctrl_t       ctrl,
  output logic        pcj
);

  always_comb begin
    ctrl      = CTRL_NOP;
    ctrl.mb   = info.addi | info.load | info.store;
    ctrl.f    = info.rtype ? alu_f_e'(funct) : F_ADD;
    ctrl.mw   = info.store;
    ctrl.md   = info.load;
    ctrl.ld   = info.rtype | info.addi | info.load;
    ctrl.load = info.load;

    pcj = 1'b0;
    if (info.branch) begin
      unique case (op)
        OP_BEQ:  pcj = eq;
        OP_BNE:  pcj = !eq;
        OP_BGEZ: pcj = !sign;
        OP_BLTZ: pcj = sign;
        default: pcj = 1'b0;
      endcase
    end
  end

endmodule
