// tb_ls_datapath: self-checking test of the two-read-port LdState datapath.
// A sequential model (32 registers plus the four internal PU registers)
// predicts every write-back. Covered: ALU operations with back-to-back
// dependences (bypass), LdState followed at once by a permutation that uses
// the new state, MovePUtoGR of each internal register, memory writes with
// write-back winning a same-edge conflict, the four-instruction arbitrary
// permutation (LdState.bfly, BFLY, LdState.ibfly, IBFLY) on routed random
// permutations, and the two-instruction repeat with the state kept.
module tb_ls_datapath;
  import perm_pkg::*;
  import perm_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  ls_instr_t instr;
  logic      mem_we;
  ridx_t     mem_waddr;
  word_t     mem_wdata;
  logic      wb_valid;
  ridx_t     wb_rd;
  word_t     wb_data;

  regs_t rf;                        // model registers
  w64_t  c1, c2, c4, c5;            // model internal PU state
  logic  last_we;
  ridx_t last_rd;
  int    checks = 0, failures = 0;
  int    n_alu = 0, n_ld = 0, n_perm = 0, n_mv = 0, n_byp = 0, n_conflict = 0;

  ls_datapath dut (
    .clk(clk), .rst_n(rst_n), .instr_i(instr),
    .mem_we_i(mem_we), .mem_waddr_i(mem_waddr), .mem_wdata_i(mem_wdata),
    .wb_valid_o(wb_valid), .wb_rd_o(wb_rd), .wb_data_o(wb_data));

  task automatic expect_eq(w64_t got, w64_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic ls_instr_t li(ls_kind_e k, op_e aop, logic inv, logic sel,
                                   int rd, int rs1, int rs2);
    ls_instr_t x;
    x.kind = k; x.alu_op = to_alu_op(aop); x.inv = inv; x.sel = sel;
    x.rd = ridx_t'(rd); x.rs1 = ridx_t'(rs1); x.rs2 = ridx_t'(rs2);
    return x;
  endfunction

  // issue one instruction; its write-back is checked after the edge
  task automatic issue(ls_instr_t x, op_e aop);
    logic we;
    w64_t res, a, b;
    @(negedge clk);
    instr = x; mem_we = 1'b0;
    a = rf[x.rs1]; b = rf[x.rs2];
    if (last_we && (last_rd == x.rs1 || last_rd == x.rs2)) n_byp++;
    we = 1'b0; res = '0;
    case (x.kind)
      LS_ALU: begin we = 1'b1; res = ref_alu(aop, a, b); n_alu++; end
      LS_PERM: begin
        we = 1'b1; n_perm++;
        res = x.inv ? ref_ibfly(a, {b, c5, c4}) : ref_bfly(a, {b, c2, c1});
      end
      LS_MOVE: begin
        we = 1'b1; n_mv++;
        res = x.inv ? (x.sel ? c5 : c4) : (x.sel ? c2 : c1);
      end
      LS_LDSTATE: begin
        n_ld++;
        if (x.inv) begin c4 = a; c5 = b; end else begin c1 = a; c2 = b; end
      end
      default: ;
    endcase
    @(posedge clk);
    #1;
    checks++;
    if (wb_valid !== we) begin
      failures++;
      $display("FAIL write-back valid %b exp %b (kind %s)", wb_valid, we, x.kind.name());
    end
    if (we) begin
      expect_eq(64'(wb_rd), 64'(x.rd), "write-back register");
      expect_eq(wb_data, res, $sformatf("result of %s", x.kind.name()));
      rf[x.rd] = res;
    end
    last_we = we; last_rd = x.rd;
  endtask

  // memory write during an idle cycle; a write-back to the same register at
  // the same edge wins
  task automatic mem_load(int r, w64_t v);
    @(negedge clk);
    instr = li(LS_NOP, OP_ADD, 1'b0, 1'b0, 0, 0, 0);
    mem_we = 1'b1; mem_waddr = ridx_t'(r); mem_wdata = v;
    if (last_we && last_rd == ridx_t'(r)) n_conflict++;
    else rf[r] = v;
    @(posedge clk);
    #1 mem_we = 1'b0;
    last_we = 1'b0;
  endtask

  task automatic check_regs();
    // read every register out through an OR with a cleared register
    mem_load(31, '0);
    for (int r = 0; r < 31; r++)
      issue(li(LS_ALU, OP_OR, 1'b0, 1'b0, 31, r, 31), OP_OR);
  endtask

  initial begin
    perm_t     src;
    cfg3_t     bc, ic;
    ls_kind_e  kinds [5];
    op_e       aop;
    int        k;
    kinds = '{LS_NOP, LS_ALU, LS_LDSTATE, LS_PERM, LS_MOVE};
    instr = li(LS_NOP, OP_ADD, 1'b0, 1'b0, 0, 0, 0);
    mem_we = 1'b0; mem_waddr = '0; mem_wdata = '0;
    for (int r = 0; r < 32; r++) rf[r] = '0;
    c1 = '0; c2 = '0; c4 = '0; c5 = '0;
    last_we = 1'b0; last_rd = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // reset state: internal registers read back as zero
    for (int s = 0; s < 4; s++)
      issue(li(LS_MOVE, OP_ADD, 1'(s / 2), 1'(s % 2), s + 1, 0, 0), OP_ADD);
    for (int r = 0; r < 32; r++) mem_load(r, rand64());
    // conflict: write-back and memory write the same register at one edge
    issue(li(LS_ALU, OP_XOR, 1'b0, 1'b0, 9, 1, 2), OP_XOR);
    mem_load(9, rand64());
    issue(li(LS_ALU, OP_ADD, 1'b0, 1'b0, 10, 9, 0), OP_ADD);
    // random mix
    for (int n = 0; n < 600; n++) begin
      k = $urandom_range(4, 0);
      aop = op_e'($urandom_range(int'(OP_ROR), int'(OP_ADD)));
      if ($urandom_range(15, 0) == 0) mem_load($urandom_range(31, 0), rand64());
      issue(li(kinds[k], aop, 1'($urandom), 1'($urandom), $urandom_range(31, 0),
               $urandom_range(31, 0), $urandom_range(31, 0)), aop);
    end
    // arbitrary permutations: r1 <- perm(r1), config in r11..r16
    for (int n = 0; n < 20; n++) begin
      w64_t x, exp;
      random_perm(src);
      benes_route(src, bc, ic);
      x = rand64();
      mem_load(1, x);
      mem_load(11, bc[0]); mem_load(12, bc[1]); mem_load(13, bc[2]);
      mem_load(14, ic[0]); mem_load(15, ic[1]); mem_load(16, ic[2]);
      issue(li(LS_LDSTATE, OP_ADD, 1'b0, 1'b0, 0, 11, 12), OP_ADD);
      issue(li(LS_PERM,    OP_ADD, 1'b0, 1'b0, 1, 1, 13), OP_ADD);
      issue(li(LS_LDSTATE, OP_ADD, 1'b1, 1'b0, 0, 14, 15), OP_ADD);
      issue(li(LS_PERM,    OP_ADD, 1'b1, 1'b0, 1, 1, 16), OP_ADD);
      expect_eq(rf[1], apply_perm(x, src), "4-instruction arbitrary permutation");
      // the same permutation on new data: only BFLY and IBFLY
      x = rand64();
      mem_load(2, x);
      issue(li(LS_PERM, OP_ADD, 1'b0, 1'b0, 2, 2, 13), OP_ADD);
      issue(li(LS_PERM, OP_ADD, 1'b1, 1'b0, 2, 2, 16), OP_ADD);
      expect_eq(rf[2], apply_perm(x, src), "2-instruction repeated permutation");
    end
    // context save: MovePUtoGR copies all four internal registers out
    for (int s = 0; s < 4; s++)
      issue(li(LS_MOVE, OP_ADD, 1'(s / 2), 1'(s % 2), 20 + s, 0, 0), OP_ADD);
    expect_eq(rf[20], bc[0], "saved C1");
    expect_eq(rf[21], bc[1], "saved C2");
    expect_eq(rf[22], ic[0], "saved C4");
    expect_eq(rf[23], ic[1], "saved C5");
    check_regs();
    checks++;
    if (n_alu == 0 || n_ld == 0 || n_perm == 0 || n_mv == 0 || n_byp == 0 || n_conflict == 0)
      failures++;
    $display("alu=%0d ldstate=%0d perm=%0d move=%0d bypass=%0d conflict=%0d",
             n_alu, n_ld, n_perm, n_mv, n_byp, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
