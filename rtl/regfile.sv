// regfile: the eight-register file read in ID and written in WB.
//
// Two combinational read ports (SA, SB) and one write port (DR, D_in)
// written at the clock edge when LD is high. A read does not see a write
// made in the same cycle: the pipeline forwards the WB value through its
// muxes instead. R0 reads as zero and ignores writes, so the all-zero
// instruction is a NOP; that and the reset to zero are this design's
// choice. A third read port is for testbenches.
module regfile
  import cpu_pkg::*;
#(
  parameter int NREGS = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ld,
  input  reg_t  sa,
  input  reg_t  sb,
  input  reg_t  dr,
  input  word_t d_in,
  output word_t a,
  output word_t b,
  input  reg_t  dbg_addr,
  output word_t dbg_data
);

  word_t r [NREGS];

  assign a        = (sa == '0) ? '0 : r[sa];
  assign b        = (sb == '0) ? '0 : r[sb];
  assign dbg_data = (dbg_addr == '0) ? '0 : r[dbg_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else if (ld && dr != '0) begin
      r[dr] <= d_in;
    end
  end

endmodule
