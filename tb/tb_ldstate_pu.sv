// tb_ldstate_pu: self-checking test of the LdState permutation units.
// A butterfly unit (C1, C2) and an inverse butterfly unit (C4, C5) are
// tested side by side: reset state, LdState loading both internal registers,
// permutation with the stored stages plus Rc3, MovePUtoGR reading each
// internal register back, state kept across other operations, and the
// document's four-instruction sequence (LdState.bfly, BFLY, LdState.ibfly,
// IBFLY) performing random arbitrary 64-bit permutations, then the same
// permutation again with only BFLY and IBFLY.
module tb_ldstate_pu;
  import perm_pkg::*;
  import perm_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  pu_op_e op_b, op_i;
  logic   sel_b, sel_i;
  w64_t   a_b, b_b, a_i, b_i, res_b, res_i;
  w64_t   c1, c2, c4, c5;         // expected internal state
  int     checks = 0, failures = 0;
  int     n_ld = 0, n_mv = 0, n_perm = 0;

  ldstate_pu #(.N(64), .INVERSE(1'b0)) dut_b (
    .clk(clk), .rst_n(rst_n), .op_i(op_b), .mv_sel_i(sel_b), .a_i(a_b), .b_i(b_b), .res_o(res_b));
  ldstate_pu #(.N(64), .INVERSE(1'b1)) dut_i (
    .clk(clk), .rst_n(rst_n), .op_i(op_i), .mv_sel_i(sel_i), .a_i(a_i), .b_i(b_i), .res_o(res_i));

  task automatic expect_eq(w64_t got, w64_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // drive one operation on each unit for one cycle; check results before the edge
  task automatic step(pu_op_e ob, w64_t ab, w64_t bb, logic sb,
                      pu_op_e oi, w64_t ai, w64_t bi, logic si);
    @(negedge clk);
    op_b = ob; a_b = ab; b_b = bb; sel_b = sb;
    op_i = oi; a_i = ai; b_i = bi; sel_i = si;
    #1;
    case (ob)
      PU_PERM: begin expect_eq(res_b, ref_bfly(ab, {bb, c2, c1}), "BFLY"); n_perm++; end
      PU_MV:   begin expect_eq(res_b, sb ? c2 : c1, "MovePUtoGR bfly"); n_mv++; end
      PU_NONE: expect_eq(res_b, '0, "idle bfly");
      default: ;
    endcase
    case (oi)
      PU_PERM: begin expect_eq(res_i, ref_ibfly(ai, {bi, c5, c4}), "IBFLY"); n_perm++; end
      PU_MV:   begin expect_eq(res_i, si ? c5 : c4, "MovePUtoGR ibfly"); n_mv++; end
      PU_NONE: expect_eq(res_i, '0, "idle ibfly");
      default: ;
    endcase
    if (ob == PU_LD) begin c1 = ab; c2 = bb; n_ld++; end
    if (oi == PU_LD) begin c4 = ai; c5 = bi; n_ld++; end
  endtask

  initial begin
    perm_t src;
    cfg3_t bc, ic;
    w64_t  r1, r2, exp;
    pu_op_e ops [4] = '{PU_NONE, PU_LD, PU_PERM, PU_MV};
    op_b = PU_NONE; op_i = PU_NONE; a_b = '0; b_b = '0; a_i = '0; b_i = '0;
    sel_b = 1'b0; sel_i = 1'b0;
    c1 = '0; c2 = '0; c4 = '0; c5 = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // after reset: state is zero
    step(PU_MV, '0, '0, 1'b0, PU_MV, '0, '0, 1'b1);
    step(PU_MV, '0, '0, 1'b1, PU_MV, '0, '0, 1'b0);
    step(PU_PERM, rand64(), rand64(), 1'b0, PU_PERM, rand64(), rand64(), 1'b0);
    // random operation mix
    for (int n = 0; n < 400; n++)
      step(ops[$urandom_range(3, 0)], rand64(), rand64(), 1'($urandom),
           ops[$urandom_range(3, 0)], rand64(), rand64(), 1'($urandom));
    // arbitrary permutations with the LdState sequence
    for (int n = 0; n < 20; n++) begin
      random_perm(src);
      benes_route(src, bc, ic);
      r1  = rand64();
      exp = apply_perm(r1, src);
      step(PU_LD,   bc[0], bc[1], 1'b0, PU_NONE, '0, '0, 1'b0);  // LdState.bfly R11,R12
      step(PU_PERM, r1,    bc[2], 1'b0, PU_NONE, '0, '0, 1'b0);  // BFLY R1,R1,R13
      r2 = res_b;
      step(PU_NONE, '0, '0, 1'b0, PU_LD,   ic[0], ic[1], 1'b0);  // LdState.ibfly R14,R15
      step(PU_NONE, '0, '0, 1'b0, PU_PERM, r2,    ic[2], 1'b0);  // IBFLY R1,R1,R16
      expect_eq(res_i, exp, "4-instruction arbitrary permutation");
      // the same permutation again: two instructions, state kept
      r1  = rand64();
      exp = apply_perm(r1, src);
      step(PU_PERM, r1, bc[2], 1'b0, PU_NONE, '0, '0, 1'b0);
      r2 = res_b;
      step(PU_NONE, '0, '0, 1'b0, PU_PERM, r2, ic[2], 1'b0);
      expect_eq(res_i, exp, "2-instruction repeated permutation");
    end
    checks++;
    if (n_ld == 0 || n_mv == 0 || n_perm == 0) failures++;
    $display("LdState=%0d MovePUtoGR=%0d permutations=%0d", n_ld, n_mv, n_perm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
