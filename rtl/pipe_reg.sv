// pipe_reg: one pipeline register (IF/ID, ID/EX, EX/MEM or MEM/WB).
//
// Holds a value of type T. At the clock edge it takes CLR_VAL when reset or
// clear is high (clear inserts a bubble: the NOP value), otherwise D when
// load is high, otherwise keeps its contents. IF/ID uses load (IF/IDL) to
// hold an instruction during a stall; ID/EX uses clear. Clear taking
// priority over load is this design's choice.
module pipe_reg #(
  parameter type T = logic [15:0],
  parameter T CLR_VAL = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  logic clear,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst || clear) q <= CLR_VAL;
    else if (load)    q <= d;
  end

endmodule
