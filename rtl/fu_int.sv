// fu_int: integer function unit of the PLA ("+/-" in the tile template).
//
// Generalised from a plain adder so that other loops can be mapped onto
// it: add and subtract, a left-shift unit widened into a left/right rotator
// (rotate amount b[4:0]), and the identity operation, so the unit can act as
// a move that forwards an operand one ring stop along. Combinational; en is
// the stage predicate from the loop controller and we tells the PLA to
// write y into this FU's rotating register file at the clock edge. Opcodes
// the unit does not implement write nothing.
module fu_int
  import puma_pkg::*;
(
  input  logic              en,
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic              we,
  output logic [DATA_W-1:0] y
);
  logic [4:0] sh;
  always_comb begin
    sh = b[4:0];
    we = en;
    unique case (op)
      OP_MOV:  y = a;
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_ROTL: y = (a << sh) | (a >> (6'd32 - {1'b0, sh}));
      OP_ROTR: y = (a >> sh) | (a << (6'd32 - {1'b0, sh}));
      default: begin y = '0; we = 1'b0; end
    endcase
  end
endmodule
