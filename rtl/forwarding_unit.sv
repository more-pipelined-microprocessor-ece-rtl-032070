// forwarding_unit: generates the select signals of the forwarding muxes.
//
// Two pairs of muxes take a register value that has been computed but not
// yet written to the register file:
//   ID muxes (after the register file; feed the "=?" comparator and ID/EX)
//   EX muxes (after ID/EX; feed the ALU and the store data path)
// Each selects, for a source register S, the newest producer still in the
// pipeline: EX/MEM (the ALU result of the instruction in MEM) if it writes S,
// else MEM/WB (the value being written back) if it writes S, else the plain
// value. R0 is never forwarded. A load in MEM has no data yet, so it is never
// forwarded from EX/MEM; the hazard unit stalls its users until the data is
// in MEM/WB. Purely combinational.
module forwarding_unit
  import cpu_pkg::*;
(
  input  reg_t id_sa,
  input  reg_t id_sb,
  input  reg_t ex_sa,
  input  reg_t ex_sb,
  input  logic mem_ld,    // instruction in MEM writes a register
  input  logic mem_load,  // ... and it is a load
  input  reg_t mem_dr,
  input  logic wb_ld,     // instruction in WB writes a register
  input  reg_t wb_dr,
  output fwd_e fwd_id_a,
  output fwd_e fwd_id_b,
  output fwd_e fwd_ex_a,
  output fwd_e fwd_ex_b
);

  function automatic fwd_e sel(input reg_t s, input logic m_ld, input reg_t m_dr,
                               input logic w_ld, input reg_t w_dr);
    if (s == '0)                  return FWD_NONE;
    else if (m_ld && m_dr == s)   return FWD_MEM;
    else if (w_ld && w_dr == s)   return FWD_WB;
    else                          return FWD_NONE;
  endfunction

  // A load in MEM cannot supply its result through EX/MEM.
  logic mem_alu_ld;
  assign mem_alu_ld = mem_ld && !mem_load;

  assign fwd_id_a = sel(id_sa, mem_alu_ld, mem_dr, wb_ld, wb_dr);
  assign fwd_id_b = sel(id_sb, mem_alu_ld, mem_dr, wb_ld, wb_dr);
  assign fwd_ex_a = sel(ex_sa, mem_alu_ld, mem_dr, wb_ld, wb_dr);
  assign fwd_ex_b = sel(ex_sb, mem_alu_ld, mem_dr, wb_ld, wb_dr);

endmodule
