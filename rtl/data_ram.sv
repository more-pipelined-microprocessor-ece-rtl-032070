// data_ram: data memory accessed in MEM.
//
// WORDS 16-bit words addressed by the byte address computed by the ALU
// (bit 0 ignored). Reads are combinational, so a load's data is ready for
// the MD mux and MEM/WB in the same cycle; a store writes D_IN at the clock
// edge when MW is high. A second read port lets a testbench inspect memory.
// Reset clears the array. Organisation, size and reset are this design's
// choice: the source names the block, D_IN and MW only.
module data_ram
  import cpu_pkg::*;
#(
  parameter int WORDS = 256,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  input  word_t         addr,
  input  word_t         d_in,
  input  logic          mw,
  output word_t         d_out,
  input  logic [AW-1:0] dbg_addr,
  output word_t         dbg_data
);

  word_t mem [WORDS];

  assign d_out    = mem[addr[AW:1]];
  assign dbg_data = mem[dbg_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
    end else if (mw) begin
      mem[addr[AW:1]] <= d_in;
    end
  end

endmodule
