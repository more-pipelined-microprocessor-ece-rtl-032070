// hazard_unit: the Hazard Detection Unit.
//
// Finds the data hazards that forwarding cannot cover and stalls for one
// cycle: PCL = 0 and IF/IDL = 0 hold the instructions in IF and ID, and
// Clear turns ID/EX into a NOP (a bubble). The conditions, each checked only
// against the registers the instruction in ID really reads and never for R0:
//   1. a load in EX whose destination the ID instruction reads (load followed
//      by R-type, I-type ALU, load, store (base or data) or branch): the data
//      exists only at the end of MEM;
//   2. a branch in ID reading the destination of an ALU instruction in EX:
//      the branch compares in ID, before the ALU result exists;
//   3. a branch in ID reading the destination of a load in MEM.
// A load followed by a branch therefore stalls twice. Condition 1 and the
// three outputs follow the source; extending its rule to conditions 2 and 3
// and to every instruction class is this design's own reading. Purely
// combinational.
module hazard_unit
  import cpu_pkg::*;
(
  input  reg_t        id_sa,
  input  reg_t        id_sb,
  input  instr_info_t id_info,
  input  logic        ex_load,   // EX.Load
  input  logic        ex_ld,     // instruction in EX writes a register
  input  reg_t        ex_dr,     // EX.DR
  input  logic        mem_load,  // instruction in MEM is a load
  input  reg_t        mem_dr,
  output logic        pcl,
  output logic        ifidl,
  output logic        clear,
  output logic        stall
);

  function automatic logic reads(input reg_t r, input reg_t sa, input reg_t sb,
                                 input instr_info_t info);
    return (r != '0) && ((info.uses_sa && r == sa) || (info.uses_sb && r == sb));
  endfunction

  always_comb begin
    stall = (ex_load && reads(ex_dr, id_sa, id_sb, id_info))
         || (id_info.branch && ex_ld && reads(ex_dr, id_sa, id_sb, id_info))
         || (id_info.branch && mem_load && reads(mem_dr, id_sa, id_sb, id_info));
    pcl   = !stall;
    ifidl = !stall;
    clear = stall;
  end

endmodule
