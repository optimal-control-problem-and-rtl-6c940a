// tb_pla_ring: gives every RR read port a value that encodes (RR, port,
// address), then for random control words checks that each FU operand comes
// from the RR at the right ring distance (0, +1, -1, +2, -2 modulo the FU
// count) with the right register index, or from the CRF, the literal file
// or zero, and that operand swap exchanges A and B.
module tb_pla_ring;
  import puma_pkg::*;
  localparam int NF = 8;
  fu_ctrl_t [NF-1:0] ctrl;
  logic [NF-1:0][9:0][RR_IDX_W-1:0] rr_raddr;
  logic [NF-1:0][9:0][DATA_W-1:0] rr_rdata;
  logic [2*NF-1:0][SRC_IDX_W-1:0] crf_raddr, lit_raddr;
  logic [2*NF-1:0][DATA_W-1:0] crf_rdata, lit_rdata;
  logic [NF-1:0][DATA_W-1:0] opa, opb;
  int checks = 0, failures = 0;

  pla_ring #(.NUM_FU(NF)) dut (.*);

  // register-file models: value tells where it came from
  always_comb begin
    for (int j = 0; j < NF; j++)
      for (int p = 0; p < 10; p++) rr_rdata[j][p] = {8'h11, 8'(j), 8'(p), 8'(rr_raddr[j][p])};
    for (int p = 0; p < 2 * NF; p++) begin
      crf_rdata[p] = {8'hC0, 16'h0, 8'(crf_raddr[p])};
      lit_rdata[p] = {8'hE0, 16'h0, 8'(lit_raddr[p])};
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_val(input int i, input src_t s, input int o);
    int off, j, k;
    case (s.sel)
      SRC_CRF:  return {8'hC0, 16'h0, 8'(s.idx)};
      SRC_LIT:  return {8'hE0, 16'h0, 8'(s.idx)};
      SRC_ZERO: return '0;
      default: begin
        k = int'(s.sel);
        off = (k == 0) ? 0 : (k == 1) ? 1 : (k == 2) ? -1 : (k == 3) ? 2 : -2;
        j = (i + off + NF) % NF;
        return {8'h11, 8'(j), 8'(2 * k + o), 8'(s.idx[RR_IDX_W-1:0])};
      end
    endcase
  endfunction

  initial begin
    logic [31:0] ea, eb;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NF; i++) ctrl[i] = fu_ctrl_t'($urandom);
      #1;
      for (int i = 0; i < NF; i++) begin
        ea = expect_val(i, ctrl[i].a, 0);
        eb = expect_val(i, ctrl[i].b, 1);
        if (ctrl[i].swap) begin ea ^= eb; eb ^= ea; ea ^= eb; end
        checks++;
        if (opa[i] !== ea || opb[i] !== eb) begin
          failures++;
          if (failures < 10) $display("FAIL fu %0d sel %0d/%0d swap %b: %h %h vs %h %h", i,
                                      ctrl[i].a.sel, ctrl[i].b.sel, ctrl[i].swap, opa[i], opb[i], ea, eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
