// pc_unit: the fetch-stage program counter.
//
// Holds the PC, computes PC+2 (instructions are two bytes) and selects the
// next PC with the PCJ mux: PC+2 normally, the branch target when the branch
// in ID is taken. The PC is written at the clock edge only when PCL is high;
// the hazard unit drops PCL to hold the instruction in IF during a stall.
// PC+2 is combinational and goes both to the PCJ mux and to IF/ID.
// Reset to address 0 and the PCJ encoding (1 = target) are this design's
// choice.
module pc_unit
  import cpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  pcl,       // load PC
  input  logic  pcj,       // 1: next PC is the branch target
  input  word_t target,    // branch target from ID
  output word_t pc,
  output word_t pc_plus2
);

  assign pc_plus2 = pc + word_t'(2);

  always_ff @(posedge clk) begin
    if (rst)      pc <= '0;
    else if (pcl) pc <= pcj ? target : pc_plus2;
  end

endmodule
