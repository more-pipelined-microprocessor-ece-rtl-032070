// inst_ram: instruction memory read in IF.
//
// WORDS 16-bit instructions, addressed by the byte address in the PC (bit 0
// ignored, bits above the array size wrap). The read is combinational so the
// instruction reaches IF/ID in the same cycle as the PC. A synchronous write
// port loads the program before (or while) the CPU runs. Organisation, size
// and load port are this design's choice: the source names the block only.
module inst_ram
  import cpu_pkg::*;
#(
  parameter int WORDS = 256,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  word_t         addr,
  output word_t         instr,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata
);

  word_t mem [WORDS];

  assign instr = mem[addr[AW:1]];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
