// pla_ring: operand network of one PLA.
//
// The PLA replaces the single-operand bus of the baseline design with six
// rings: two rings in opposite directions with a ring stop at every FU, two
// with stops at the odd FUs and two with stops at the even FUs. Seen from
// FU i this means it can read the rotating register file (RR) of itself and
// of FU i+1, i-1, i+2 and i-2 (indices modulo NUM_FU), one hop per cycle;
// an operand that must travel further is forwarded by move operations, so
// any two FUs are at most ceil(NUM_FU/4) hops apart. Besides the ring, each
// FU input can take a live-in from the central register file (CRF), a
// constant from the literal file, or zero. After the two input muxes an
// operand-swap stage may exchange A and B.
//
// This module is the wiring and the muxes. Every RR has 10 read ports, one
// per (ring reach, operand) pair: port 2k+o of RR j serves operand o of the
// FU that reaches j with ring code k. The CRF and the literal file have two
// read ports per FU. Purely combinational. NUM_FU must be even so that the
// distance-2 rings connect FUs of one parity, as the odd/even ring sets do.
module pla_ring
  import puma_pkg::*;
#(
  parameter int NUM_FU = NUM_FU_DEFAULT
) (
  input  fu_ctrl_t [NUM_FU-1:0]                ctrl,
  // rotating register files
  output logic [NUM_FU-1:0][9:0][RR_IDX_W-1:0]  rr_raddr,
  input  logic [NUM_FU-1:0][9:0][DATA_W-1:0]    rr_rdata,
  // CRF and literal file
  output logic [2*NUM_FU-1:0][SRC_IDX_W-1:0]    crf_raddr,
  input  logic [2*NUM_FU-1:0][DATA_W-1:0]       crf_rdata,
  output logic [2*NUM_FU-1:0][SRC_IDX_W-1:0]    lit_raddr,
  input  logic [2*NUM_FU-1:0][DATA_W-1:0]       lit_rdata,
  // operands delivered to the FUs
  output logic [NUM_FU-1:0][DATA_W-1:0]         opa,
  output logic [NUM_FU-1:0][DATA_W-1:0]         opb
);
  // ring code k -> distance from the consumer to the producing FU
  function automatic int offset(input int k);
    case (k)
      0: return 0;
      1: return 1;
      2: return -1;
      3: return 2;
      default: return -2;
    endcase
  endfunction

  initial assert (NUM_FU % 2 == 0) else $error("pla_ring: NUM_FU must be even");

  for (genvar j = 0; j < NUM_FU; j++) begin : g_rr
    for (genvar k = 0; k < 5; k++) begin : g_k
      // consumer c reaches producer j with code k when c + offset(k) == j
      localparam int C = ((j - offset(k)) % NUM_FU + NUM_FU) % NUM_FU;
      assign rr_raddr[j][2*k]   = RR_IDX_W'(ctrl[C].a.idx);
      assign rr_raddr[j][2*k+1] = RR_IDX_W'(ctrl[C].b.idx);
    end
  end

  for (genvar i = 0; i < NUM_FU; i++) begin : g_fu
    logic [4:0][DATA_W-1:0] ring_a, ring_b;
    logic [DATA_W-1:0] a_mux, b_mux;

    assign crf_raddr[2*i]   = ctrl[i].a.idx;
    assign crf_raddr[2*i+1] = ctrl[i].b.idx;
    assign lit_raddr[2*i]   = ctrl[i].a.idx;
    assign lit_raddr[2*i+1] = ctrl[i].b.idx;

    for (genvar k = 0; k < 5; k++) begin : g_k
      localparam int J = ((i + offset(k)) % NUM_FU + NUM_FU) % NUM_FU;
      assign ring_a[k] = rr_rdata[J][2*k];
      assign ring_b[k] = rr_rdata[J][2*k+1];
    end

    always_comb begin
      unique case (ctrl[i].a.sel)
        SRC_CRF:  a_mux = crf_rdata[2*i];
        SRC_LIT:  a_mux = lit_rdata[2*i];
        SRC_ZERO: a_mux = '0;
        default:  a_mux = ring_a[ctrl[i].a.sel];
      endcase
      unique case (ctrl[i].b.sel)
        SRC_CRF:  b_mux = crf_rdata[2*i+1];
        SRC_LIT:  b_mux = lit_rdata[2*i+1];
        SRC_ZERO: b_mux = '0;
        default:  b_mux = ring_b[ctrl[i].b.sel];
      endcase
      opa[i] = ctrl[i].swap ? b_mux : a_mux;
      opb[i] = ctrl[i].swap ? a_mux : b_mux;
    end
  end
endmodule
