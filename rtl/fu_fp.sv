// fu_fp: floating-point function unit of the PLA ("*/+/-" in the tile
// template).
//
// Single-precision multiply, add and subtract (the adder is generalised
// into an adder/subtractor), plus the identity operation used to move an
// operand along the ring. Built from fp_mul and fp_add; combinational, with
// the result written into the FU's rotating register file at the next clock
// edge when we is high. Opcodes it does not implement write nothing.
module fu_fp
  import puma_pkg::*;
(
  input  logic              en,
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic              we,
  output logic [DATA_W-1:0] y
);
  logic [DATA_W-1:0] sum, prod;

  fp_add u_add (.a(a), .b(b), .sub(op == OP_FSUB), .y(sum));
  fp_mul u_mul (.a(a), .b(b), .y(prod));

  always_comb begin
    we = en;
    unique case (op)
      OP_MOV:          y = a;
      OP_FADD, OP_FSUB: y = sum;
      OP_FMUL:         y = prod;
      default: begin y = '0; we = 1'b0; end
    endcase
  end
endmodule
