// branch_unit: the branch hardware moved into ID.
//
// Contains the "=?" comparator, which tests the two (forwarded) register
// operands for equality, the sign bit of R[rs], and the branch target adder.
// The target is PC+2 of the branch (carried in IF/ID) plus the sign-extended
// immediate shifted left by one, i.e. (PC+2) + sext({imm,1'b0}). The equal
// and sign outputs go to the control unit, which decides PCJ. Purely
// combinational. Taking PC+2 as the adder's base follows the datapath
// drawing, where the adder is fed from the +2 output through IF/ID.
module branch_unit
  import cpu_pkg::*;
(
  input  word_t rs_val,
  input  word_t rt_val,
  input  word_t pc_plus2,
  input  word_t imm,       // SE(imm)
  output logic  eq,        // R[rs] == R[rt]
  output logic  sign,      // sign bit of R[rs]
  output word_t target
);

  assign eq     = (rs_val == rt_val);
  assign sign   = rs_val[DW-1];
  assign target = pc_plus2 + {imm[DW-2:0], 1'b0};

endmodule
