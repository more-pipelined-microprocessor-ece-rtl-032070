// pipeline_top: the five-stage pipelined CPU, with a bimodal branch outcome
// predictor and a branch target buffer beside it.
//
// The CPU resolves branches in ID and executes the branch delay slot, so it
// needs no prediction; the predictor and the BTB are the dynamic-prediction
// alternative for fetching past a branch, provided here as separate units
// with their own lookup (fetch_pc) and update ports rather than wired into
// the fetch stage. All three share the clock and the synchronous reset.
module pipeline_top
  import cpu_pkg::*;
#(
  parameter int IMEM_WORDS  = 256,
  parameter int DMEM_WORDS  = 256,
  parameter int BP_ENTRIES  = 256,
  parameter int BTB_ENTRIES = 256,
  localparam int IAW = $clog2(IMEM_WORDS),
  localparam int DAW = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  // CPU
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  word_t          prog_data,
  input  reg_t           dbg_reg_addr,
  output word_t          dbg_reg_data,
  input  logic [DAW-1:0] dbg_mem_addr,
  output word_t          dbg_mem_data,
  output word_t          pc,
  output logic [3:0]     alu_flags,
  // bimodal branch outcome predictor
  input  word_t          bp_fetch_pc,
  output logic           bp_predict_taken,
  output logic [1:0]     bp_fetch_state,
  input  logic           bp_update_en,
  input  word_t          bp_update_pc,
  input  logic           bp_update_taken,
  // branch target buffer
  input  word_t          btb_fetch_pc,
  output logic           btb_hit,
  output word_t          btb_target,
  input  logic           btb_update_en,
  input  word_t          btb_update_pc,
  input  word_t          btb_update_target
);

  pipelined_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_cpu (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data,
    .pc, .alu_flags
  );

  bimodal_predictor #(.ENTRIES(BP_ENTRIES), .PCW(DW)) u_bp (
    .clk, .rst, .fetch_pc(bp_fetch_pc), .predict_taken(bp_predict_taken),
    .fetch_state(bp_fetch_state), .update_en(bp_update_en),
    .update_pc(bp_update_pc), .update_taken(bp_update_taken)
  );

  btb #(.ENTRIES(BTB_ENTRIES), .PCW(DW)) u_btb (
    .clk, .rst, .fetch_pc(btb_fetch_pc), .hit(btb_hit), .target(btb_target),
    .update_en(btb_update_en), .update_pc(btb_update_pc),
    .update_target(btb_update_target)
  );

endmodule
