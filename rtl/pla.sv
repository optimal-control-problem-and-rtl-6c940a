// pla: programmable loop accelerator, the compute part of one PUMA tile.
//
// The PLA runs one modulo-scheduled loop at a time. Its kernel, II cycles
// long, sits in the control memory, one row per slot; the BR unit steps a
// modulo counter over the rows and counts kernel passes, and each FU gets
// its field of the current row: an opcode, the schedule stage it belongs
// to, a destination register and two operand sources. An FU executes only
// when its stage is live in the current pass (prologue and epilogue come
// from the same kernel), reads its operands through the ring network from
// its own rotating register file (RR) or those of FUs up to two positions
// away, or from the CRF (live-ins) or the literal file (constants), and
// writes its result into its own RR one cycle later. The RRs rotate once
// per pass, so each iteration in flight sees its own registers.
//
// The FU mix and its order on the ring are the parameter FU_TYPE (exactly
// one BR and one MEM unit; the MEM unit owns the local-memory port). The
// default is eight FUs: BR, four FP (*/+/-), two integer (+/-) and one
// load/store unit, placed so that types alternate around the ring; the
// architecture lets loop synthesis choose these, and this mix is this
// implementation's choice.
//
// Interface: a configuration write port (cfg_sel says what is written:
// control memory, CRF, literal file or the loop registers II, trip count,
// number of stages), start / busy / done, and the local-memory port of the
// MEM unit. All FU latencies are one cycle; the loop takes
// (trip + stages - 1) * II cycles from the cycle after start.
module pla
  import puma_pkg::*;
#(
  parameter int       NUM_FU = NUM_FU_DEFAULT,
  parameter fu_type_e FU_TYPE [NUM_FU] = DEFAULT_FU_TYPE,
  parameter int       LMEM_AW_P = LMEM_AW,
  localparam int      SW = $clog2(CM_DEPTH),
  localparam int      FW = (NUM_FU > 1) ? $clog2(NUM_FU) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_we,
  input  cmd_e              cfg_sel,   // CMD_WR_CM, CMD_WR_CRF, CMD_WR_LIT, CMD_WR_CFG
  input  logic [ADDR_W-1:0] cfg_addr,  // CM: {slot[15:8], fu[7:0]}; CFG: 0 II, 1 trip, 2 stages
  input  logic [DATA_W-1:0] cfg_data,
  // loop control
  input  logic              start,
  output logic              busy,
  output logic              done,
  // local memory port of the MEM unit
  output logic              mem_we,
  output logic [LMEM_AW_P-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);
  function automatic int count_type(input fu_type_e t);
    int n = 0;
    for (int i = 0; i < NUM_FU; i++) if (FU_TYPE[i] == t) n++;
    return n;
  endfunction
  function automatic int first_of(input fu_type_e t);
    for (int i = 0; i < NUM_FU; i++) if (FU_TYPE[i] == t) return i;
    return 0;
  endfunction
  localparam int BR_IDX  = first_of(FU_BR);
  localparam int MEM_IDX = first_of(FU_MEM);

  initial begin
    assert (count_type(FU_BR) == 1)  else $error("pla: exactly one BR unit required");
    assert (count_type(FU_MEM) == 1) else $error("pla: exactly one MEM unit required");
  end

  // ---------------------------------------------------------------- loop registers
  logic [SW:0]          ii_q;
  logic [TRIP_W-1:0]    trip_q;
  logic [STAGE_W:0]     nstages_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ii_q      <= (SW + 1)'(1);
      trip_q    <= '0;
      nstages_q <= (STAGE_W + 1)'(1);
    end else if (cfg_we && cfg_sel == CMD_WR_CFG) begin
      unique case (cfg_addr[1:0])
        2'd0:    ii_q      <= (SW + 1)'(cfg_data);
        2'd1:    trip_q    <= TRIP_W'(cfg_data);
        default: nstages_q <= (STAGE_W + 1)'(cfg_data);
      endcase
    end
  end

  // ---------------------------------------------------------------- control memory
  fu_ctrl_t [NUM_FU-1:0] word;
  logic [SW-1:0]         slot;

  ctrl_mem #(.NUM_FU(NUM_FU), .DEPTH(CM_DEPTH)) u_cm (
    .clk, .rst_n,
    .we    (cfg_we && cfg_sel == CMD_WR_CM),
    .wslot (cfg_addr[8 +: SW]),
    .wfu   (cfg_addr[FW-1:0]),
    .wdata (fu_ctrl_t'(cfg_data[FU_CTRL_W-1:0])),
    .slot  (slot),
    .word  (word)
  );

  // ---------------------------------------------------------------- CRF, literal file
  logic [2*NUM_FU-1:0][SRC_IDX_W-1:0] crf_raddr, lit_raddr;
  logic [2*NUM_FU-1:0][DATA_W-1:0]    crf_rdata, lit_rdata;

  pla_regfile #(.W(DATA_W), .DEPTH(1 << SRC_IDX_W), .NRD(2 * NUM_FU)) u_crf (
    .clk, .rst_n,
    .we(cfg_we && cfg_sel == CMD_WR_CRF), .waddr(cfg_addr[SRC_IDX_W-1:0]), .wdata(cfg_data),
    .raddr(crf_raddr), .rdata(crf_rdata));

  pla_regfile #(.W(DATA_W), .DEPTH(1 << SRC_IDX_W), .NRD(2 * NUM_FU)) u_lit (
    .clk, .rst_n,
    .we(cfg_we && cfg_sel == CMD_WR_LIT), .waddr(cfg_addr[SRC_IDX_W-1:0]), .wdata(cfg_data),
    .raddr(lit_raddr), .rdata(lit_rdata));

  // ---------------------------------------------------------------- ring
  logic [NUM_FU-1:0][9:0][RR_IDX_W-1:0] rr_raddr;
  logic [NUM_FU-1:0][9:0][DATA_W-1:0]   rr_rdata;
  logic [NUM_FU-1:0][DATA_W-1:0]        opa, opb;

  pla_ring #(.NUM_FU(NUM_FU)) u_ring (
    .ctrl(word), .rr_raddr, .rr_rdata, .crf_raddr, .crf_rdata, .lit_raddr, .lit_rdata, .opa, .opb);

  // ---------------------------------------------------------------- FUs and RRs
  logic [NUM_FU-1:0]                  stage_en, fu_we;
  logic [NUM_FU-1:0][DATA_W-1:0]      fu_y;
  logic [NUM_FU-1:0][STAGE_W-1:0]     stages;
  logic [RR_IDX_W-1:0]                rrb;

  always_comb for (int f = 0; f < NUM_FU; f++) stages[f] = word[f].stage;

  for (genvar f = 0; f < NUM_FU; f++) begin : g_fu
    rot_regfile #(.W(DATA_W), .DEPTH(RR_DEPTH), .NRD(10)) u_rr (
      .clk, .rst_n, .rrb,
      .we(fu_we[f]), .waddr(word[f].dst), .wdata(fu_y[f]),
      .raddr(rr_raddr[f]), .rdata(rr_rdata[f]));

    if (FU_TYPE[f] == FU_BR) begin : g_br
      fu_br #(.NUM_FU(NUM_FU), .SW(SW), .RW(RR_IDX_W)) u_br (
        .clk, .rst_n, .start,
        .ii(ii_q), .trip(trip_q), .nstages(nstages_q),
        .stage(stages), .stage_en(stage_en), .slot(slot), .rrb(rrb), .busy(busy), .done(done),
        .op(word[f].op), .a(opa[f]), .own_stage(word[f].stage), .we(fu_we[f]), .y(fu_y[f]));
    end else if (FU_TYPE[f] == FU_INT) begin : g_int
      fu_int u_int (.en(stage_en[f]), .op(word[f].op), .a(opa[f]), .b(opb[f]),
                    .we(fu_we[f]), .y(fu_y[f]));
    end else if (FU_TYPE[f] == FU_FP) begin : g_fp
      fu_fp u_fp (.en(stage_en[f]), .op(word[f].op), .a(opa[f]), .b(opb[f]),
                  .we(fu_we[f]), .y(fu_y[f]));
    end else begin : g_mem
      fu_mem #(.AW(LMEM_AW_P)) u_mem (.en(stage_en[f]), .op(word[f].op), .a(opa[f]), .b(opb[f]),
                    .we(fu_we[f]), .y(fu_y[f]),
                    .mem_we, .mem_addr, .mem_wdata, .mem_rdata);
    end
  end

  // the control memory may not be rewritten under a running loop
  assert property (@(posedge clk) disable iff (!rst_n) !(busy && cfg_we && cfg_sel == CMD_WR_CM));
endmodule
