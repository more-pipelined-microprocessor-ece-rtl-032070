// tb_isa_pkg: testbench helpers for the pipelined CPU.
//
// An assembler (one function per instruction, returning its 16-bit
// encoding) and an instruction-set reference model. The model executes one
// instruction at a time with no pipeline: it keeps PC and next-PC, so the
// instruction after a branch (the delay slot) always executes and a taken
// branch redirects the one after it. It writes its result into iss_reg and
// iss_mem, for comparison with the CPU's state after the same program.
package tb_isa_pkg;

  localparam int MEMW = 256;

  typedef logic [15:0] w16;

  // ---------------------------------------------------------------- assembler
  function automatic w16 r_type(int funct, int rd, int rs, int rt);
    return {4'b0000, 3'(rs), 3'(rt), 3'(rd), 3'(funct)};
  endfunction
  function automatic w16 i_type(logic [3:0] op, int rt, int rs, int imm);
    return {op, 3'(rs), 3'(rt), 6'(imm)};
  endfunction

  function automatic w16 ADD (int rd, int rs, int rt); return r_type(0, rd, rs, rt); endfunction
  function automatic w16 SUB (int rd, int rs, int rt); return r_type(1, rd, rs, rt); endfunction
  function automatic w16 SRA (int rd, int rs);         return r_type(2, rd, rs, 0);  endfunction
  function automatic w16 SRL (int rd, int rs);         return r_type(3, rd, rs, 0);  endfunction
  function automatic w16 SLL (int rd, int rs);         return r_type(4, rd, rs, 0);  endfunction
  function automatic w16 AND (int rd, int rs, int rt); return r_type(5, rd, rs, rt); endfunction
  function automatic w16 OR  (int rd, int rs, int rt); return r_type(6, rd, rs, rt); endfunction
  function automatic w16 ADDI(int rt, int rs, int imm); return i_type(4'b0101, rt, rs, imm); endfunction
  function automatic w16 LW  (int rt, int imm, int rs); return i_type(4'b0010, rt, rs, imm); endfunction
  function automatic w16 SW  (int rt, int imm, int rs); return i_type(4'b0100, rt, rs, imm); endfunction
  // Branch offsets are in instructions, relative to the branch's PC+2.
  function automatic w16 BEQ (int rt, int rs, int off); return i_type(4'b1000, rt, rs, off); endfunction
  function automatic w16 BNE (int rt, int rs, int off); return i_type(4'b1001, rt, rs, off); endfunction
  function automatic w16 BGEZ(int rs, int off);         return i_type(4'b1010, 0, rs, off);  endfunction
  function automatic w16 BLTZ(int rs, int off);         return i_type(4'b1011, 0, rs, off);  endfunction
  function automatic w16 NOP();                         return 16'h0000;                     endfunction

  // ---------------------------------------------------------------- reference model
  w16 iss_reg [8];
  w16 iss_mem [MEMW];
  int iss_count;   // instructions executed

  function automatic w16 sext6(logic [5:0] v);
    return {{10{v[5]}}, v};
  endfunction

  // Runs prog from address 0 until the PC reaches halt_pc (a byte address).
  function automatic void iss_run(input w16 prog [MEMW], input int halt_pc, input int max_steps);
    int pc, npc, nnpc;
    w16 ins, a, b, imm, ea;
    logic [3:0] op;
    int rs, rt, rd, fn;
    logic taken;
    foreach (iss_reg[i]) iss_reg[i] = '0;
    foreach (iss_mem[i]) iss_mem[i] = '0;
    pc = 0; npc = 2; iss_count = 0;
    while (pc != halt_pc && iss_count < max_steps) begin
      ins = prog[(pc >> 1) % MEMW];
      op = ins[15:12]; rs = ins[11:9]; rt = ins[8:6]; rd = ins[5:3]; fn = ins[2:0];
      a = iss_reg[rs]; b = iss_reg[rt]; imm = sext6(ins[5:0]);
      nnpc = (npc + 2) & 16'hffff;
      taken = 1'b0;
      case (op)
        4'b0000: begin
          w16 y;
          case (fn)
            0: y = a + b;
            1: y = a - b;
            2: y = w16'($signed(a) >>> 1);
            3: y = a >> 1;
            4: y = a << 1;
            5: y = a & b;
            6: y = a | b;
            default: y = a;
          endcase
          if (rd != 0) iss_reg[rd] = y;
        end
        4'b0101: if (rt != 0) iss_reg[rt] = a + imm;
        4'b0010: begin ea = a + imm; if (rt != 0) iss_reg[rt] = iss_mem[ea[8:1]]; end
        4'b0100: begin ea = a + imm; iss_mem[ea[8:1]] = b; end
        4'b1000: taken = (a == b);
        4'b1001: taken = (a != b);
        4'b1010: taken = !a[15];
        4'b1011: taken = a[15];
        default: ;
      endcase
      if (taken) nnpc = (pc + 2 + int'(imm << 1)) & 16'hffff;
      pc = npc; npc = nnpc;
      iss_count++;
    end
  endfunction

endpackage
