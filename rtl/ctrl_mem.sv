// ctrl_mem: PLA control memory.
//
// In the programmable loop accelerator the finite state machine of a
// single-function accelerator (II states, one per slot of the modulo
// schedule's kernel) is replaced by this memory, so the loop can be changed.
// Row s holds the very long instruction word for kernel slot s: one
// fu_ctrl_t per function unit (opcode, schedule stage, destination register,
// two operand sources, operand swap). The loop controller presents the
// current slot, a modulo counter over II, and every FU gets its field in the
// same cycle (combinational read).
//
// Loading is one FU field at a time: (wslot, wfu, wdata). Reset fills the
// memory with NOPs. Depth CM_DEPTH bounds the largest II; its value is this
// implementation's choice.
module ctrl_mem
  import puma_pkg::*;
#(
  parameter int NUM_FU = NUM_FU_DEFAULT,
  parameter int DEPTH  = CM_DEPTH,
  localparam int SW    = $clog2(DEPTH),
  localparam int FW    = (NUM_FU > 1) ? $clog2(NUM_FU) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [SW-1:0]        wslot,
  input  logic [FW-1:0]        wfu,
  input  fu_ctrl_t             wdata,
  input  logic [SW-1:0]        slot,
  output fu_ctrl_t [NUM_FU-1:0] word
);
  fu_ctrl_t mem [DEPTH][NUM_FU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < DEPTH; s++)
        for (int f = 0; f < NUM_FU; f++) mem[s][f] <= '0;   // OP_NOP
    end else if (we && int'(wfu) < NUM_FU) begin
      mem[wslot][wfu] <= wdata;
    end
  end

  always_comb begin
    for (int f = 0; f < NUM_FU; f++) word[f] = mem[slot][f];
  end
endmodule
