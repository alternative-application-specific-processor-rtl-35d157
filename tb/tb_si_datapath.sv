// tb_si_datapath: self-checking test of the single-issue datapath with one
// ALU and (4,1) permutation units. Registers are loaded through the memory
// port; then four-source operations are issued one per cycle and each
// write-back is compared with an architectural model. Covers every ALU
// operation, dependent operations through the bypass on each of the four
// buses, routed arbitrary permutations (BFLY then IBFLY, two cycles), and a
// random mix; registers are read back at the end.
module tb_si_datapath;
  import perm_pkg::*;
  import perm_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  op4_t  op;
  logic  mem_we;
  ridx_t mem_waddr;
  word_t mem_wdata;
  logic  wb_valid;
  ridx_t wb_rd;
  word_t wb_data;

  regs_t shadow;
  int    checks = 0, failures = 0, cycle = 0, issue_cycle = 0;
  int    n_bypass = 0, n_bfly = 0, n_ibfly = 0;
  logic  last_we = 1'b0;
  ridx_t last_rd = '0;

  si_datapath dut (
    .clk(clk), .rst_n(rst_n), .op_i(op),
    .mem_we_i(mem_we), .mem_waddr_i(mem_waddr), .mem_wdata_i(mem_wdata),
    .wb_valid_o(wb_valid), .wb_rd_o(wb_rd), .wb_data_o(wb_data));

  always @(posedge clk) cycle <= cycle + 1;

  function automatic op4_t mk4(op_e o, int rd, int s0, int s1, int s2, int s3);
    op4_t x;
    x.op = o; x.rd = ridx_t'(rd);
    x.rs = {ridx_t'(s3), ridx_t'(s2), ridx_t'(s1), ridx_t'(s0)};
    return x;
  endfunction

  task automatic issue(op4_t o, string what);
    logic  we;
    w64_t  exp;
    @(negedge clk);
    op = o;
    issue_cycle = cycle;
    we = writes_rd(o.op);
    case (o.op)
      OP_BFLY:  exp = ref_bfly(shadow[o.rs[0]], {shadow[o.rs[3]], shadow[o.rs[2]], shadow[o.rs[1]]});
      OP_IBFLY: exp = ref_ibfly(shadow[o.rs[0]], {shadow[o.rs[3]], shadow[o.rs[2]], shadow[o.rs[1]]});
      default:  exp = ref_alu(o.op, shadow[o.rs[0]], shadow[o.rs[1]]);
    endcase
    if (last_we && o.op != OP_NOP)
      for (int k = 0; k < 4; k++) if (o.rs[k] == last_rd) n_bypass++;
    @(posedge clk);
    #1;
    checks++;
    if (wb_valid !== we || (we && (wb_rd !== o.rd || wb_data !== exp))) begin
      failures++;
      $display("FAIL %s: valid=%b rd=%0d data=%h exp %h", what, wb_valid, wb_rd, wb_data, exp);
    end
    if (o.op == OP_BFLY) n_bfly++;
    if (o.op == OP_IBFLY) n_ibfly++;
    if (we) shadow[o.rd] = exp;
    last_we = we;
    last_rd = o.rd;
    op = '0;
  endtask

  task automatic mem_load(int r, w64_t v);
    // let a pending write-back commit first: it has priority over memory
    if (last_we) @(posedge clk);
    @(negedge clk);
    mem_we = 1'b1; mem_waddr = ridx_t'(r); mem_wdata = v;
    @(negedge clk);
    mem_we = 1'b0;
    shadow[r] = v;
    last_we = 1'b0;
  endtask

  initial begin
    perm_t src;
    cfg3_t bc, ic;
    w64_t  x;
    int    c0;
    op_e   alu_ops [9] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_ROL, OP_ROR};
    op = '0; mem_we = 1'b0; mem_waddr = '0; mem_wdata = '0;
    foreach (shadow[r]) shadow[r] = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 1; r < 32; r++) mem_load(r, rand64());
    foreach (alu_ops[k]) issue(mk4(alu_ops[k], 20 + k, k, k + 1, 0, 0), "alu");
    // bypass into each bus position
    issue(mk4(OP_ADD, 5, 1, 2, 0, 0), "dep 0");
    issue(mk4(OP_SUB, 6, 5, 3, 0, 0), "dep a");
    issue(mk4(OP_XOR, 7, 4, 6, 0, 0), "dep b");
    issue(mk4(OP_BFLY, 8, 9, 7, 10, 11), "dep Rc1");
    issue(mk4(OP_IBFLY, 9, 10, 11, 8, 12), "dep Rc2");
    issue(mk4(OP_BFLY, 10, 11, 12, 13, 9), "dep Rc3");
    issue(mk4(OP_IBFLY, 11, 10, 12, 13, 14), "dep Rs");
    // routed permutations: BFLY then IBFLY on the same register, two cycles
    for (int n = 0; n < 8; n++) begin
      random_perm(src);
      benes_route(src, bc, ic);
      mem_load(11, bc[0]); mem_load(12, bc[1]); mem_load(13, bc[2]);
      mem_load(14, ic[0]); mem_load(15, ic[1]); mem_load(16, ic[2]);
      x = rand64();
      mem_load(1, x);
      issue(mk4(OP_BFLY, 1, 1, 11, 12, 13), "BFLY");
      c0 = issue_cycle;
      issue(mk4(OP_IBFLY, 1, 1, 14, 15, 16), "IBFLY");
      checks++;
      if (wb_data !== apply_perm(x, src) || cycle - c0 != 2) begin
        failures++;
        $display("FAIL permutation: got %h exp %h after %0d cycles", wb_data, apply_perm(x, src), cycle - c0);
      end
    end
    // random mix
    for (int n = 0; n < 500; n++) begin
      op_e o;
      o = ($urandom_range(3, 0) == 0) ? (($urandom_range(1, 0) == 0) ? OP_BFLY : OP_IBFLY)
                                      : alu_ops[$urandom_range(8, 0)];
      issue(mk4(o, int'($urandom_range(31, 0)), int'($urandom_range(31, 0)), int'($urandom_range(31, 0)),
                int'($urandom_range(31, 0)), int'($urandom_range(31, 0))), "random");
    end
    for (int r = 0; r < 32; r++) issue(mk4(OP_OR, r, r, r, 0, 0), "readback");
    $display("bypass=%0d bfly=%0d ibfly=%0d", n_bypass, n_bfly, n_ibfly);
    checks++;
    if (n_bypass == 0 || n_bfly == 0 || n_ibfly == 0) failures++;
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
