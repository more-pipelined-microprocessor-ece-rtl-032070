// pipelined_cpu: a 16-bit five-stage pipelined processor.
//
// Stages IF, ID, EX, MEM, WB separated by the pipeline registers IF/ID,
// ID/EX, EX/MEM and MEM/WB. Eight 16-bit registers, 16-bit instructions,
// a byte-addressed PC advancing by 2.
//
//   IF : PC -> Inst RAM -> IF/ID (with PC+2).
//   ID : decoder + SE, register file read, ID forwarding muxes, "=?"
//        comparator and sign bit, branch target adder, control unit. A
//        conditional branch is decided here, so exactly one instruction
//        follows it into the pipeline; the ISA defines that slot as a branch
//        delay slot, and it always executes (nothing is flushed).
//   EX : EX forwarding muxes, MB mux, ALU (flags V C Z N brought out).
//   MEM: Data RAM read/write, MD mux.
//   WB : register file write (LD, DR, D_in).
//
// Forwarding: the ALU result in EX/MEM and the write-back value in MEM/WB are
// forwarded to both operands in EX and to the branch operands in ID. The
// register file does not pass a same-cycle write through to its read ports;
// the MEM/WB path covers that case. The Hazard Detection Unit stalls one
// cycle (hold PC and IF/ID, clear ID/EX) when a value cannot be forwarded in
// time: a load followed by a user of its result, and a branch after an ALU
// instruction or a load whose result it compares. There is no load delay
// slot.
//
// The stage split, the datapath and control signal names (PCJ, PCL, MB, F,
// MW, MD, LD, IF/IDL, Clear) follow the source. Memory sizes, the program
// load and debug ports, the non-branch opcodes and reset behaviour are this
// design's choice.
module pipelined_cpu
  import cpu_pkg::*;
#(
  parameter int IMEM_WORDS = 256,
  parameter int DMEM_WORDS = 256,
  localparam int IAW = $clog2(IMEM_WORDS),
  localparam int DAW = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  // instruction RAM load port
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  word_t          prog_data,
  // observation
  input  reg_t           dbg_reg_addr,
  output word_t          dbg_reg_data,
  input  logic [DAW-1:0] dbg_mem_addr,
  output word_t          dbg_mem_data,
  output word_t          pc,
  output logic [3:0]     alu_flags   // {V, C, Z, N} of the instruction in EX
);

  // ---------------------------------------------------------------- IF
  logic  pcl, ifidl, id_ex_clear, stall;
  logic  pcj;
  word_t br_target, pc_plus2, if_instr;

  pc_unit u_pc (
    .clk, .rst, .pcl, .pcj, .target(br_target), .pc, .pc_plus2
  );

  inst_ram #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .instr(if_instr),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  if_id_t if_id_d, if_id;
  assign if_id_d = '{instr: if_instr, pc_plus2: pc_plus2};

  pipe_reg #(.T(if_id_t), .CLR_VAL('0)) u_if_id (
    .clk, .rst, .load(ifidl), .clear(1'b0), .d(if_id_d), .q(if_id)
  );

  // ---------------------------------------------------------------- ID
  reg_t        id_sa, id_sb, id_dr;
  word_t       id_imm;
  logic [2:0]  id_funct;
  logic [3:0]  id_op;
  instr_info_t id_info;

  decoder u_dec (
    .instr(if_id.instr), .sa(id_sa), .sb(id_sb), .dr(id_dr), .imm(id_imm),
    .funct(id_funct), .op(id_op), .info(id_info)
  );

  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  word_t rf_a, rf_b;
  regfile u_rf (
    .clk, .rst, .ld(mem_wb.ld), .sa(id_sa), .sb(id_sb), .dr(mem_wb.dr),
    .d_in(mem_wb.d), .a(rf_a), .b(rf_b),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  fwd_e fwd_id_a, fwd_id_b, fwd_ex_a, fwd_ex_b;

  forwarding_unit u_fwd (
    .id_sa, .id_sb, .ex_sa(id_ex.sa), .ex_sb(id_ex.sb),
    .mem_ld(ex_mem.ctrl.ld), .mem_load(ex_mem.ctrl.load), .mem_dr(ex_mem.dr),
    .wb_ld(mem_wb.ld), .wb_dr(mem_wb.dr),
    .fwd_id_a, .fwd_id_b, .fwd_ex_a, .fwd_ex_b
  );

  function automatic word_t fwd_mux(input fwd_e s, input word_t plain,
                                    input word_t from_mem, input word_t from_wb);
    unique case (s)
      FWD_MEM: return from_mem;
      FWD_WB:  return from_wb;
      default: return plain;
    endcase
  endfunction

  word_t id_a, id_b;
  assign id_a = fwd_mux(fwd_id_a, rf_a, ex_mem.alu_y, mem_wb.d);
  assign id_b = fwd_mux(fwd_id_b, rf_b, ex_mem.alu_y, mem_wb.d);

  logic br_eq, br_sign;
  branch_unit u_br (
    .rs_val(id_a), .rt_val(id_b), .pc_plus2(if_id.pc_plus2), .imm(id_imm),
    .eq(br_eq), .sign(br_sign), .target(br_target)
  );

  ctrl_t id_ctrl;
  control_unit u_cu (
    .info(id_info), .op(id_op), .funct(id_funct), .eq(br_eq), .sign(br_sign),
    .ctrl(id_ctrl), .pcj
  );

  hazard_unit u_hdu (
    .id_sa, .id_sb, .id_info,
    .ex_load(id_ex.ctrl.load), .ex_ld(id_ex.ctrl.ld), .ex_dr(id_ex.dr),
    .mem_load(ex_mem.ctrl.load), .mem_dr(ex_mem.dr),
    .pcl, .ifidl, .clear(id_ex_clear), .stall
  );

  localparam id_ex_t ID_EX_NOP = '{ctrl: CTRL_NOP, default: '0};

  id_ex_t id_ex_d;
  assign id_ex_d = '{ctrl: id_ctrl, a: id_a, b: id_b, imm: id_imm,
                     sa: id_sa, sb: id_sb, dr: id_dr};

  pipe_reg #(.T(id_ex_t), .CLR_VAL(ID_EX_NOP)) u_id_ex (
    .clk, .rst, .load(1'b1), .clear(id_ex_clear), .d(id_ex_d), .q(id_ex)
  );

  // ---------------------------------------------------------------- EX
  word_t ex_a, ex_b, ex_opb, ex_y;
  logic  ex_v, ex_c, ex_z, ex_n;

  assign ex_a   = fwd_mux(fwd_ex_a, id_ex.a, ex_mem.alu_y, mem_wb.d);
  assign ex_b   = fwd_mux(fwd_ex_b, id_ex.b, ex_mem.alu_y, mem_wb.d);
  assign ex_opb = id_ex.ctrl.mb ? id_ex.imm : ex_b;   // MB mux

  alu u_alu (
    .a(ex_a), .b(ex_opb), .f(id_ex.ctrl.f), .y(ex_y),
    .v(ex_v), .c(ex_c), .z(ex_z), .n(ex_n)
  );
  assign alu_flags = {ex_v, ex_c, ex_z, ex_n};

  ex_mem_t ex_mem_d;
  assign ex_mem_d = '{ctrl: id_ex.ctrl, alu_y: ex_y, store_data: ex_b, dr: id_ex.dr};

  localparam ex_mem_t EX_MEM_NOP = '{ctrl: CTRL_NOP, default: '0};

  pipe_reg #(.T(ex_mem_t), .CLR_VAL(EX_MEM_NOP)) u_ex_mem (
    .clk, .rst, .load(1'b1), .clear(1'b0), .d(ex_mem_d), .q(ex_mem)
  );

  // ---------------------------------------------------------------- MEM
  word_t mem_dout;

  data_ram #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .rst, .addr(ex_mem.alu_y), .d_in(ex_mem.store_data), .mw(ex_mem.ctrl.mw),
    .d_out(mem_dout), .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  mem_wb_t mem_wb_d;
  assign mem_wb_d = '{ld: ex_mem.ctrl.ld,
                      d:  ex_mem.ctrl.md ? mem_dout : ex_mem.alu_y,   // MD mux
                      dr: ex_mem.dr};

  pipe_reg #(.T(mem_wb_t), .CLR_VAL('0)) u_mem_wb (
    .clk, .rst, .load(1'b1), .clear(1'b0), .d(mem_wb_d), .q(mem_wb)
  );

  // ---------------------------------------------------------------- WB
  // The register file write port is driven from MEM/WB above.

  // A stall holds PC and IF/ID for one cycle and leaves a bubble in ID/EX.
  assert property (@(posedge clk) disable iff (rst)
                   stall |=> (pc == $past(pc)) && (if_id == $past(if_id)));
  assert property (@(posedge clk) disable iff (rst)
                   stall |=> !id_ex.ctrl.ld && !id_ex.ctrl.mw);
  // A load's data is never taken from EX/MEM: it does not exist there.
  assert property (@(posedge clk) disable iff (rst)
                   ex_mem.ctrl.load |-> fwd_ex_a != FWD_MEM && fwd_ex_b != FWD_MEM
                                     && fwd_id_a != FWD_MEM && fwd_id_b != FWD_MEM);

endmodule
