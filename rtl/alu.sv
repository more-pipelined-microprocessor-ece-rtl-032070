// alu: the EX-stage arithmetic/logic unit.
//
// Computes Y = A op B for the function F and the flags V (signed overflow),
// C (carry), Z (Y is zero) and N (sign of Y).
//   ADD A+B, SUB A-B (as A + ~B + 1, C is its carry out),
//   SRA/SRL/SLL shift A by one bit (C is the bit shifted out),
//   AND, OR (C = V = 0).
// Purely combinational. The function set is the one the source's
// instructions use; the encodings, one-bit shifts and flag rules are this
// design's choice.
module alu
  import cpu_pkg::*;
(
  input  word_t  a,
  input  word_t  b,
  input  alu_f_e f,
  output word_t  y,
  output logic   v,
  output logic   c,
  output logic   z,
  output logic   n
);

  logic [DW:0] sum;

  always_comb begin
    sum = '0;
    y   = a;
    c   = 1'b0;
    v   = 1'b0;
    unique case (f)
      F_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        y = sum[DW-1:0]; c = sum[DW];
        v = (a[DW-1] == b[DW-1]) && (y[DW-1] != a[DW-1]);
      end
      F_SUB: begin
        sum = {1'b0, a} + {1'b0, ~b} + (DW+1)'(1);
        y = sum[DW-1:0]; c = sum[DW];
        v = (a[DW-1] != b[DW-1]) && (y[DW-1] != a[DW-1]);
      end
      F_SRA: begin y = {a[DW-1], a[DW-1:1]}; c = a[0]; end
      F_SRL: begin y = {1'b0, a[DW-1:1]};    c = a[0]; end
      F_SLL: begin y = {a[DW-2:0], 1'b0};    c = a[DW-1]; end
      F_AND: y = a & b;
      F_OR:  y = a | b;
      default: y = a;
    endcase
    z = (y == '0);
    n = y[DW-1];
  end

endmodule
