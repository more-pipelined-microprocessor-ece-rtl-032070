// cpu_pkg: types and constants shared by the 16-bit five-stage pipelined CPU.
//
// Instructions are 16 bits wide in two formats:
//   register-to-register: OP[15:12] RS[11:9] RT[8:6] RD[5:3] FUNCT[2:0]
//   immediate:            OP[15:12] RS[11:9] RT[8:6] IMM[5:0]
// The field positions and the branch opcodes (BEQ 1000, BNE 1001, BGEZ 1010,
// BLTZ 1011) follow the ISA this CPU implements. The opcodes of R-type, LW,
// SW and ADDI and the FUNCT codes are this design's own choice; every opcode
// not listed here executes as a NOP.
package cpu_pkg;

  localparam int DW = 16;  // data, PC and instruction width
  localparam int RW = 3;   // register address width (8 registers)

  typedef logic [DW-1:0] word_t;
  typedef logic [RW-1:0] reg_t;

  typedef enum logic [3:0] {
    OP_RTYPE = 4'b0000,
    OP_LW    = 4'b0010,
    OP_SW    = 4'b0100,
    OP_ADDI  = 4'b0101,
    OP_BEQ   = 4'b1000,
    OP_BNE   = 4'b1001,
    OP_BGEZ  = 4'b1010,
    OP_BLTZ  = 4'b1011
  } opcode_e;

  // ALU function select (F). R-type instructions use FUNCT directly as F.
  typedef enum logic [2:0] {
    F_ADD = 3'b000,
    F_SUB = 3'b001,
    F_SRA = 3'b010,
    F_SRL = 3'b011,
    F_SLL = 3'b100,
    F_AND = 3'b101,
    F_OR  = 3'b110,
    F_NOP = 3'b111   // passes A; not produced by any instruction
  } alu_f_e;

  // Classification of the instruction in ID, produced by the decoder.
  typedef struct packed {
    logic rtype;    // register-to-register ALU instruction
    logic addi;     // immediate ALU instruction
    logic load;     // LW
    logic store;    // SW
    logic branch;   // BEQ/BNE/BGEZ/BLTZ
    logic uses_sa;  // reads R[RS]
    logic uses_sb;  // reads R[RT]
  } instr_info_t;

  // Control signals generated in ID and carried down the pipeline.
  typedef struct packed {
    logic   mb;     // EX : 1 selects SE(imm) as ALU operand B
    alu_f_e f;      // EX : ALU function
    logic   mw;     // MEM: write Data RAM
    logic   md;     // MEM: 1 selects Data RAM output for write-back
    logic   ld;     // WB : write register file
    logic   load;   // instruction is a load (EX.Load for the hazard unit)
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{mb: 1'b0, f: F_ADD, mw: 1'b0, md: 1'b0, ld: 1'b0, load: 1'b0};

  // Forwarding mux selects.
  typedef enum logic [1:0] {
    FWD_NONE = 2'd0,  // register file / ID-EX value
    FWD_MEM  = 2'd1,  // ALU result held in EX/MEM
    FWD_WB   = 2'd2   // write-back value held in MEM/WB
  } fwd_e;

  // Pipeline register contents.
  typedef struct packed {
    word_t instr;
    word_t pc_plus2;
  } if_id_t;

  typedef struct packed {
    ctrl_t ctrl;
    word_t a;
    word_t b;
    word_t imm;
    reg_t  sa;
    reg_t  sb;
    reg_t  dr;
  } id_ex_t;

  typedef struct packed {
    ctrl_t ctrl;
    word_t alu_y;
    word_t store_data;
    reg_t  dr;
  } ex_mem_t;

  typedef struct packed {
    logic  ld;
    word_t d;
    reg_t  dr;
  } mem_wb_t;

endpackage
