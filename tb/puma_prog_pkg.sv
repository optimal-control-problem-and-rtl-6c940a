// puma_prog_pkg: test programs for the PLA, shared by the PLA and system
// testbenches. Written for the default ring order
//   FU0 BR, FU1 FP, FU2 INT, FU3 FP, FU4 MEM, FU5 FP, FU6 INT, FU7 FP.
//
// Kernel "affine": y[i] = a * x[i] - c, with x at CRF[0], y at CRF[1],
// a = CRF[2] (live-ins) and c = LIT[0] (constant), modulo scheduled at II = 2
// in three stages (one load and one store share the single MEM unit):
//   t0  s0 slot0  FU0 ITER            -> i
//   t1  s0 slot1  FU2 ADD  i(M2), CRF0 -> x address   (ring distance 2)
//   t1  s0 slot1  FU6 ADD  i(P2), CRF1 -> y address   (distance 2 across 0)
//   t2  s1 slot0  FU4 LD   xaddr(M2)   -> x[i]        (rotated register, +1)
//   t3  s1 slot1  FU3 FMUL x(P1), CRF2 -> a*x         (distance 1)
//   t4  s2 slot0  FU5 FSUB LIT0, ax(M2) with swap -> a*x - c
//   t5  s2 slot1  FU4 ST   yaddr(P2, rotated +2), value(P1)
// A value written in stage s and read in stage s+d is read at logical
// register dst+d because the files rotate once per kernel pass.
//
// Kernel "rotmix": z[i] = rotl(x[i], LIT[1]) + rotr(x[i], LIT[2]), integer,
// at II = 3 in three stages. The loaded x is carried one ring stop further by
// a move on FU3 before FU2 rotates it, and the MEM unit, generalised to an
// integer adder, forms the sum in its free slot:
//   t0 s0 slot0 FU0 ITER; t1 s0 slot1 FU2/FU6 ADD addresses; t2 s0 slot2 FU4 LD
//   t3 s1 slot0 FU3 MOV x, FU6 ROTR x; t5 s1 slot2 FU2 ROTL moved x
//   t6 s2 slot0 FU4 ADD xl + xr; t7 s2 slot1 FU4 ST
//
// Kernel "laplace": the 5-point Laplacian of an image stored row by row,
// y[i] = ((x[p-1] + x[p+1]) + (x[p-W] + x[p+W])) - 4*x[p] with p = CRF[0] + i,
// y at CRF[1] + i. The offsets -1, +1, -W, +W and the constant 4.0 come from
// LIT[0..4]. Five loads and a store fill all six slots of the MEM unit, so
// the loop runs at II = 6 in three stages:
//   t0 s0 slot0 FU0 ITER; t1 s0 slot1 FU2 ADD p, FU6 ADD y address
//   t2..t5 s0 slots 2-5 FU4 LD x[p-1], x[p+1], x[p-W], x[p+W]; t6 s1 slot0 FU4 LD x[p]
//   t4 FU3 FADD horizontal pair; t6 FU5 FADD vertical pair; t7 FU5 FMUL 4*x[p]
//   t7 FU3 FADD both pairs; t8 FU5 FSUB; t13 s2 slot1 FU4 ST
//
// Kernel "gauss": a 5-tap convolution along an image row,
// y[i] = (w1*(x[p-1] + x[p+1]) + w2*x[p]) + w0*(x[p-2] + x[p+2]) with
// p = CRF[0] + i, y at CRF[1] + i, offsets -2, +2, -1, +1 in LIT[0..3] and
// the weights w0, w1, w2 in LIT[4..6]. Same slot plan as "laplace" (II = 6,
// three stages), with three multiplies and four additions:
//   t2..t5 FU4 LD x[p-2], x[p+2], x[p-1], x[p+1]; t6 FU4 LD x[p]
//   t4 FU3 FADD outer pair; t5 FU3 FMUL by w0; t6 FU5 FADD inner pair
//   t7 FU5 FMUL by w1, FU3 FMUL x[p] by w2; t8 FU5 FADD; t9 FU5 FADD; t13 ST
package puma_prog_pkg;
  import puma_pkg::*;

  typedef struct {
    int       slot;
    int       fu;
    fu_ctrl_t w;
  } prog_op_t;

  function automatic fu_ctrl_t mk(input op_e op, input int stage, input int dst,
                                  input src_sel_e as, input int ai,
                                  input src_sel_e bs, input int bi, input bit swap = 0);
    fu_ctrl_t w;
    w.op = op; w.stage = STAGE_W'(stage); w.dst = RR_IDX_W'(dst);
    w.a.sel = as; w.a.idx = SRC_IDX_W'(ai);
    w.b.sel = bs; w.b.idx = SRC_IDX_W'(bi);
    w.swap = swap;
    return w;
  endfunction

  localparam int AFFINE_II = 2, AFFINE_STAGES = 3, AFFINE_LEN = 7;
  function automatic prog_op_t affine_op(input int n);
    prog_op_t p;
    case (n)
      0: p = '{0, 0, mk(OP_ITER, 0, 0, SRC_ZERO, 0, SRC_ZERO, 0)};
      1: p = '{1, 2, mk(OP_ADD,  0, 0, SRC_M2, 0, SRC_CRF, 0)};
      2: p = '{1, 6, mk(OP_ADD,  0, 0, SRC_P2, 0, SRC_CRF, 1)};
      3: p = '{0, 4, mk(OP_LD,   1, 0, SRC_M2, 1, SRC_ZERO, 0)};
      4: p = '{1, 3, mk(OP_FMUL, 1, 0, SRC_P1, 0, SRC_CRF, 2)};
      5: p = '{0, 5, mk(OP_FSUB, 2, 0, SRC_LIT, 0, SRC_M2, 1, 1)};
      default: p = '{1, 4, mk(OP_ST, 2, 0, SRC_P2, 2, SRC_P1, 0)};
    endcase
    return p;
  endfunction

  localparam int ROTMIX_II = 3, ROTMIX_STAGES = 3, ROTMIX_LEN = 9;
  function automatic prog_op_t rotmix_op(input int n);
    prog_op_t p;
    case (n)
      0: p = '{0, 0, mk(OP_ITER, 0, 0, SRC_ZERO, 0, SRC_ZERO, 0)};
      1: p = '{1, 2, mk(OP_ADD,  0, 0, SRC_M2, 0, SRC_CRF, 0)};   // t1 x address
      2: p = '{1, 6, mk(OP_ADD,  0, 0, SRC_P2, 0, SRC_CRF, 1)};   // t1 z address
      3: p = '{2, 4, mk(OP_LD,   0, 0, SRC_M2, 0, SRC_ZERO, 0)};  // t2 x
      4: p = '{0, 3, mk(OP_MOV,  1, 0, SRC_P1, 1, SRC_ZERO, 0)};  // t3 x one stop on
      5: p = '{0, 6, mk(OP_ROTR, 1, 4, SRC_M2, 1, SRC_LIT, 2)};   // t3 xr
      6: p = '{2, 2, mk(OP_ROTL, 1, 3, SRC_P1, 0, SRC_LIT, 1)};   // t5 xl (moved x)
      7: p = '{0, 4, mk(OP_ADD,  2, 3, SRC_M2, 4, SRC_P2, 5)};    // t6 xl + xr
      8: p = '{1, 4, mk(OP_ST,   2, 0, SRC_P2, 2, SRC_SELF, 3)};  // t7 z[i]
      default: p = '{0, 1, mk(OP_NOP, 0, 0, SRC_ZERO, 0, SRC_ZERO, 0)};
    endcase
    return p;
  endfunction

  localparam int LAPLACE_II = 6, LAPLACE_STAGES = 3, LAPLACE_LEN = 14;
  function automatic prog_op_t laplace_op(input int n);
    prog_op_t p;
    case (n)
      0:  p = '{0, 0, mk(OP_ITER, 0, 0, SRC_ZERO, 0, SRC_ZERO, 0)};
      1:  p = '{1, 2, mk(OP_ADD,  0, 0, SRC_M2, 0, SRC_CRF, 0)};   // t1 p
      2:  p = '{1, 6, mk(OP_ADD,  0, 0, SRC_P2, 0, SRC_CRF, 1)};   // t1 y address
      3:  p = '{2, 4, mk(OP_LD,   0, 0, SRC_M2, 0, SRC_LIT, 0)};   // t2 x[p-1]
      4:  p = '{3, 4, mk(OP_LD,   0, 1, SRC_M2, 0, SRC_LIT, 1)};   // t3 x[p+1]
      5:  p = '{4, 4, mk(OP_LD,   0, 2, SRC_M2, 0, SRC_LIT, 2)};   // t4 x[p-W]
      6:  p = '{5, 4, mk(OP_LD,   0, 3, SRC_M2, 0, SRC_LIT, 3)};   // t5 x[p+W]
      7:  p = '{0, 4, mk(OP_LD,   1, 5, SRC_M2, 1, SRC_ZERO, 0)};  // t6 x[p]
      8:  p = '{4, 3, mk(OP_FADD, 0, 0, SRC_P1, 0, SRC_P1, 1)};    // t4 horizontal pair
      9:  p = '{0, 5, mk(OP_FADD, 1, 0, SRC_M1, 3, SRC_M1, 4)};    // t6 vertical pair
      10: p = '{1, 5, mk(OP_FMUL, 1, 1, SRC_M1, 5, SRC_LIT, 4)};   // t7 4*x[p]
      11: p = '{1, 3, mk(OP_FADD, 1, 2, SRC_SELF, 1, SRC_P2, 0)};  // t7 sum of pairs
      12: p = '{2, 5, mk(OP_FSUB, 1, 2, SRC_M2, 2, SRC_SELF, 1)};  // t8 result
      default: p = '{1, 4, mk(OP_ST, 2, 0, SRC_P2, 2, SRC_P1, 3)}; // t13 y[i]
    endcase
    return p;
  endfunction

  localparam int GAUSS_II = 6, GAUSS_STAGES = 3, GAUSS_LEN = 16;
  function automatic prog_op_t gauss_op(input int n);
    prog_op_t p;
    case (n)
      0:  p = '{0, 0, mk(OP_ITER, 0, 0, SRC_ZERO, 0, SRC_ZERO, 0)};
      1:  p = '{1, 2, mk(OP_ADD,  0, 0, SRC_M2, 0, SRC_CRF, 0)};   // t1 p
      2:  p = '{1, 6, mk(OP_ADD,  0, 0, SRC_P2, 0, SRC_CRF, 1)};   // t1 y address
      3:  p = '{2, 4, mk(OP_LD,   0, 0, SRC_M2, 0, SRC_LIT, 0)};   // t2 x[p-2]
      4:  p = '{3, 4, mk(OP_LD,   0, 1, SRC_M2, 0, SRC_LIT, 1)};   // t3 x[p+2]
      5:  p = '{4, 4, mk(OP_LD,   0, 2, SRC_M2, 0, SRC_LIT, 2)};   // t4 x[p-1]
      6:  p = '{5, 4, mk(OP_LD,   0, 3, SRC_M2, 0, SRC_LIT, 3)};   // t5 x[p+1]
      7:  p = '{0, 4, mk(OP_LD,   1, 5, SRC_M2, 1, SRC_ZERO, 0)};  // t6 x[p]
      8:  p = '{4, 3, mk(OP_FADD, 0, 0, SRC_P1, 0, SRC_P1, 1)};    // t4 outer pair
      9:  p = '{5, 3, mk(OP_FMUL, 0, 1, SRC_SELF, 0, SRC_LIT, 4)}; // t5 w0 * outer
      10: p = '{0, 5, mk(OP_FADD, 1, 0, SRC_M1, 3, SRC_M1, 4)};    // t6 inner pair
      11: p = '{1, 5, mk(OP_FMUL, 1, 1, SRC_SELF, 0, SRC_LIT, 5)}; // t7 w1 * inner
      12: p = '{1, 3, mk(OP_FMUL, 1, 3, SRC_P1, 5, SRC_LIT, 6)};   // t7 w2 * x[p]
      13: p = '{2, 5, mk(OP_FADD, 1, 2, SRC_SELF, 1, SRC_M2, 3)};  // t8 inner + centre
      14: p = '{3, 5, mk(OP_FADD, 1, 3, SRC_SELF, 2, SRC_M2, 2)};  // t9 + outer
      default: p = '{1, 4, mk(OP_ST, 2, 0, SRC_P2, 2, SRC_P1, 4)}; // t13 y[i]
    endcase
    return p;
  endfunction
endpackage
