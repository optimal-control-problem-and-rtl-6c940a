// fu_mem: load/store function unit of the PLA ("MEM" in the tile template).
//
// Loads compute their address as a + b (base plus index) and write the
// loaded word into the FU's rotating register file; stores write b to
// address a. Because the unit already has the adder for indirect addresses,
// it is generalised to an integer adder/subtractor as well, and like every
// FU it has the identity (move) operation. The memory port goes to the
// tile's local memory, which reads combinationally, so a load has the same
// one-cycle latency as every other FU. Addresses are word addresses,
// truncated to the memory size; that and the two address modes are this
// implementation's choices.
module fu_mem
  import puma_pkg::*;
#(
  parameter int AW = LMEM_AW
) (
  input  logic              en,
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic              we,
  output logic [DATA_W-1:0] y,
  // local memory port
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);
  logic [DATA_W-1:0] sum;
  always_comb begin
    sum       = a + b;
    we        = en;
    mem_we    = 1'b0;
    mem_addr  = AW'(sum);
    mem_wdata = b;
    unique case (op)
      OP_MOV: y = a;
      OP_ADD: y = sum;
      OP_SUB: y = a - b;
      OP_LD:  y = mem_rdata;
      OP_ST: begin
        y        = '0;
        we       = 1'b0;
        mem_we   = en;
        mem_addr = AW'(a);
      end
      default: begin y = '0; we = 1'b0; end
    endcase
  end
endmodule
