// fu_br: branch / loop-control unit of the PLA ("BR", with Start and Done).
//
// It sequences a modulo-scheduled loop. On start it runs the kernel of the
// schedule, II cycles long, over and over: slot counts 0..II-1 (the modulo
// counter that addresses the control memory) and kpass counts kernel
// passes. A loop of TRIP iterations whose schedule has NSTAGES stages needs
// TRIP + NSTAGES - 1 passes, the first NSTAGES-1 being the prologue and the
// last NSTAGES-1 the epilogue. An operation of stage s issued in pass k
// belongs to iteration k - s; it is enabled (stage_en) only when
// 0 <= k - s < TRIP, which is how the one kernel also plays prologue and
// epilogue. At the end of every pass the rotating register base rrb is
// decremented. done pulses for one cycle after the last pass; busy is high
// while the loop runs.
//
// The unit also executes OP_ITER (write k - s, the iteration number, into
// its rotating register file, for addresses and induction variables) and
// OP_MOV. Stage predication, the iteration-number operation and the
// encodings are this implementation's choices; the modulo counter over II
// and the Start/Done handshake follow the architecture description.
// Timing: busy rises the cycle after start; the loop occupies exactly
// (TRIP + NSTAGES - 1) * II cycles; done is high in the cycle after the last
// one. A trip count of zero finishes at once.
module fu_br
  import puma_pkg::*;
#(
  parameter int NUM_FU = NUM_FU_DEFAULT,
  parameter int SW     = $clog2(CM_DEPTH),
  parameter int RW     = RR_IDX_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [SW:0]             ii,       // 1..CM_DEPTH
  input  logic [TRIP_W-1:0]       trip,
  input  logic [STAGE_W:0]        nstages,  // 1..2**STAGE_W
  input  logic [NUM_FU-1:0][STAGE_W-1:0] stage,
  output logic [NUM_FU-1:0]       stage_en,
  output logic [SW-1:0]           slot,
  output logic [RW-1:0]           rrb,
  output logic                    busy,
  output logic                    done,
  // the unit's own operation
  input  op_e                     op,
  input  logic [DATA_W-1:0]       a,
  input  logic [STAGE_W-1:0]      own_stage,
  output logic                    we,
  output logic [DATA_W-1:0]       y
);
  logic [TRIP_W+STAGE_W:0] kpass, last_pass;
  logic                    last_slot;

  assign last_pass = (TRIP_W + STAGE_W + 1)'(trip) + (TRIP_W + STAGE_W + 1)'(nstages) - 1'b1 - 1'b1;
  assign last_slot = ({1'b0, slot} == ii - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      slot  <= '0;
      kpass <= '0;
      rrb   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        slot  <= '0;
        kpass <= '0;
        if (trip == '0) done <= 1'b1;
        else            busy <= 1'b1;
      end else if (busy) begin
        if (last_slot) begin
          slot <= '0;
          rrb  <= rrb - 1'b1;
          if (kpass == last_pass) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            kpass <= kpass + 1'b1;
          end
        end else begin
          slot <= slot + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int f = 0; f < NUM_FU; f++)
      stage_en[f] = busy && (kpass >= (TRIP_W + STAGE_W + 1)'(stage[f]))
                    && ((kpass - (TRIP_W + STAGE_W + 1)'(stage[f])) < (TRIP_W + STAGE_W + 1)'(trip));
  end

  // own operation: predicated like every other FU (its stage_en is computed
  // from own_stage)
  logic own_en;
  assign own_en = busy && (kpass >= (TRIP_W + STAGE_W + 1)'(own_stage))
                  && ((kpass - (TRIP_W + STAGE_W + 1)'(own_stage)) < (TRIP_W + STAGE_W + 1)'(trip));

  always_comb begin
    we = own_en;
    unique case (op)
      OP_MOV:  y = a;
      OP_ITER: y = DATA_W'(kpass - (TRIP_W + STAGE_W + 1)'(own_stage));
      default: begin y = '0; we = 1'b0; end
    endcase
  end

  // rule of the Start/Done handshake: done and busy are never high together
  assert property (@(posedge clk) disable iff (!rst_n) !(done && busy));
endmodule
