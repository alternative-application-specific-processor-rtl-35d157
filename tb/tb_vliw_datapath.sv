// tb_vliw_datapath: self-checking test of the two-slot VLIW datapath.
// Registers are loaded through the memory port, then long words are issued
// one per cycle and every write-back result is compared with the
// architectural model ref_word(). Directed parts: ALU operations in both
// slots, back-to-back dependent words (bypass from either slot), the
// two-word arbitrary permutation {BFLY.ct1;BFLY} {IBFLY.ct1;IBFLY} in both
// slot orders with its two-cycle latency, illegal words (dropped, error
// flag), and a long random mix. Register contents are read back at the end.
// A second instance with NSLOT = 4 (two long words per cycle) runs the
// schedule that permutes r1..r4 one per cycle, checks that completions come
// in consecutive cycles, that two pairs for one unit are refused, and a
// random mix against a four-slot model built from ref_word().
module tb_vliw_datapath;
  import perm_pkg::*;
  import perm_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  slot_t [1:0]  bundle;
  logic         err;
  logic         mem_we;
  ridx_t        mem_waddr;
  word_t        mem_wdata;
  logic  [1:0]  wb_valid;
  ridx_t [1:0]  wb_rd;
  word_t [1:0]  wb_data;
  logic         wb_bfly, wb_ibfly;

  regs_t shadow;
  int    checks = 0, failures = 0;
  int    cycle = 0;
  int    n_bypass = 0, n_bfly = 0, n_ibfly = 0, n_illegal = 0, n_perm2 = 0;

  vliw_datapath dut (
    .clk(clk), .rst_n(rst_n), .bundle_i(bundle), .bundle_err_o(err),
    .mem_we_i(mem_we), .mem_waddr_i(mem_waddr), .mem_wdata_i(mem_wdata),
    .wb_valid_o(wb_valid), .wb_rd_o(wb_rd), .wb_data_o(wb_data),
    .wb_bfly_o(wb_bfly), .wb_ibfly_o(wb_ibfly));

  always @(posedge clk) cycle <= cycle + 1;

  // ---- four-slot instance
  slot_t [3:0]  w4;
  logic         err4;
  logic         mem4_we;
  ridx_t        mem4_waddr;
  word_t        mem4_wdata;
  logic  [3:0]  wb4_valid;
  ridx_t [3:0]  wb4_rd;
  word_t [3:0]  wb4_data;
  logic         wb4_bfly, wb4_ibfly;
  regs_t        shadow4;
  logic  [3:0]  last4_we;
  int           n_dual_unit = 0, n_illegal4 = 0;

  vliw_datapath #(.NSLOT(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .bundle_i(w4), .bundle_err_o(err4),
    .mem_we_i(mem4_we), .mem_waddr_i(mem4_waddr), .mem_wdata_i(mem4_wdata),
    .wb_valid_o(wb4_valid), .wb_rd_o(wb4_rd), .wb_data_o(wb4_data),
    .wb_bfly_o(wb4_bfly), .wb_ibfly_o(wb4_ibfly));

  // four slots = two long words read from the same state; each long word
  // follows ref_word() and at most one may use each unit
  function automatic logic ref_word4(input regs_t rf, input slot_t w [4],
                                     output logic [3:0] we, output w64_t res [4]);
    logic       legal;
    logic [1:0] we2;
    w64_t       r2 [2];
    int         nb, ni;
    legal = 1'b1; nb = 0; ni = 0;
    for (int g = 0; g < 2; g++) begin
      legal &= ref_word(rf, w[2*g], w[2*g+1], we2, r2);
      we[2*g] = we2[0]; we[2*g+1] = we2[1];
      res[2*g] = r2[0]; res[2*g+1] = r2[1];
      nb += int'(w[2*g].op == OP_BFLY || w[2*g+1].op == OP_BFLY);
      ni += int'(w[2*g].op == OP_IBFLY || w[2*g+1].op == OP_IBFLY);
    end
    legal &= (nb <= 1) && (ni <= 1);
    if (!legal) we = '0;
    return legal;
  endfunction

  task automatic issue4(slot_t w [4], string what);
    logic [3:0] we;
    w64_t       res [4];
    logic       legal;
    @(negedge clk);
    for (int k = 0; k < 4; k++) w4[k] = w[k];
    legal = ref_word4(shadow4, w, we, res);
    #1;
    checks++;
    if (err4 !== !legal) begin failures++; $display("FAIL %s: 4-slot err=%b", what, err4); end
    if (!legal) n_illegal4++;
    @(posedge clk);
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (wb4_valid[k] !== we[k] || (we[k] && (wb4_rd[k] !== w[k].rd || wb4_data[k] !== res[k]))) begin
        failures++;
        $display("FAIL %s slot %0d: valid=%b data=%h exp valid=%b data=%h",
                 what, k, wb4_valid[k], wb4_data[k], we[k], res[k]);
      end
    end
    if (wb4_bfly && wb4_ibfly) n_dual_unit++;
    for (int k = 0; k < 4; k++) if (we[k]) shadow4[w[k].rd] = res[k];
    last4_we = we;
    w4 = '0;
  endtask

  task automatic mem4_load(int r, w64_t v);
    if (last4_we != '0) @(posedge clk);
    @(negedge clk);
    mem4_we = 1'b1; mem4_waddr = ridx_t'(r); mem4_wdata = v;
    @(negedge clk);
    mem4_we = 1'b0;
    shadow4[r] = v;
    last4_we = '0;
  endtask

  task automatic run_four_slot();
    perm_t src;
    cfg3_t bc, ic;
    w64_t  x [5];
    slot_t w [4];
    slot_t nop_s;
    int    first, done;
    nop_s = mk(OP_NOP, 0, 0, 0);
    random_perm(src);
    benes_route(src, bc, ic);
    for (int k = 0; k < 3; k++) begin
      mem4_load(11 + k, bc[k]);
      mem4_load(14 + k, ic[k]);
    end
    for (int r = 1; r <= 4; r++) begin
      x[r] = rand64();
      mem4_load(r, x[r]);
    end
    // cycle 1: BFLY of r1; cycles 2-4: IBFLY of r(k-1) with BFLY of rk;
    // cycle 5: IBFLY of r4
    first = 0; done = 0;
    for (int c = 1; c <= 5; c++) begin
      w[0] = nop_s; w[1] = nop_s; w[2] = nop_s; w[3] = nop_s;
      if (c >= 2) begin
        w[0] = mk(OP_IBFLY_CT, 0, 14, 15);
        w[1] = mk(OP_IBFLY, c - 1, c - 1, 16);
      end
      if (c <= 4) begin
        w[2] = mk(OP_BFLY_CT, 0, 11, 12);
        w[3] = mk(OP_BFLY, c, c, 13);
      end
      issue4(w, "r1..r4 schedule");
      if (c >= 2) begin
        checks++;
        if (wb4_data[1] !== apply_perm(x[c-1], src)) begin
          failures++;
          $display("FAIL 4-slot: r%0d permutation %h", c - 1, wb4_data[1]);
        end
        if (first == 0) first = cycle;
        done++;
      end
    end
    // four permutations done, one per cycle from the second word on
    checks++;
    if (done != 4 || cycle - first != 3) begin
      failures++;
      $display("FAIL 4-slot throughput: %0d permutations over %0d cycles", done, cycle - first + 1);
    end
    // two pairs for one unit, and a pair split across long words
    w[0] = mk(OP_BFLY_CT, 0, 11, 12); w[1] = mk(OP_BFLY, 5, 1, 13);
    w[2] = mk(OP_BFLY, 6, 2, 13);     w[3] = mk(OP_BFLY_CT, 0, 11, 12);
    issue4(w, "two BFLY pairs");
    w[0] = nop_s; w[1] = mk(OP_IBFLY_CT, 0, 14, 15);
    w[2] = mk(OP_IBFLY, 6, 2, 16); w[3] = nop_s;
    issue4(w, "split pair");
    // random mix: each long word holds a BFLY pair, an IBFLY pair or ALU ops
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < 4; k++)
        w[k] = mk(op_e'($urandom_range(int'(OP_ROR), int'(OP_NOP))), int'($urandom_range(31, 0)),
                  int'($urandom_range(31, 0)), int'($urandom_range(31, 0)));
      for (int g = 0; g < 2; g++) begin
        int kind, m;
        kind = int'($urandom_range(3, 0));
        m = 2 * g + int'($urandom_range(1, 0));
        if (kind < 2) begin
          w[m].op = kind == 0 ? OP_BFLY : OP_IBFLY;
          w[4*g+1-m].op = kind == 0 ? OP_BFLY_CT : OP_IBFLY_CT;
        end
      end
      if ($urandom_range(15, 0) == 0) w[$urandom_range(3, 0)].op = op_e'($urandom_range(13, 0));
      issue4(w, "4-slot random");
    end
    // read back every register, four per word
    for (int r = 0; r < 32; r += 4) begin
      for (int k = 0; k < 4; k++) w[k] = mk(OP_OR, r + k, r + k, r + k);
      issue4(w, "4-slot readback");
    end
  endtask

  logic [1:0] last_we;
  ridx_t      last_rd [2];
  int         issue_cycle;   // cycle in which the last word was driven

  // Issue one long word for one cycle and check its write-back.
  task automatic issue(slot_t s0, slot_t s1, string what);
    logic [1:0] we;
    w64_t       res [2];
    logic       legal;
    @(negedge clk);
    bundle[0] = s0;
    bundle[1] = s1;
    issue_cycle = cycle;
    legal = ref_word(shadow, s0, s1, we, res);
    // count operands that must come from the bypass
    for (int k = 0; k < 2; k++)
      for (int p = 0; p < 2; p++)
        if (last_we[p] && (bundle[k].rs1 == last_rd[p] || bundle[k].rs2 == last_rd[p]) &&
            bundle[k].op != OP_NOP)
          n_bypass++;
    #1;
    checks++;
    if (err !== !legal) begin failures++; $display("FAIL %s: bundle_err=%b", what, err); end
    if (!legal) n_illegal++;
    @(posedge clk);
    #1;
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (wb_valid[k] !== we[k] || (we[k] && (wb_rd[k] !== bundle[k].rd || wb_data[k] !== res[k]))) begin
        failures++;
        $display("FAIL %s slot %0d: valid=%b rd=%0d data=%h exp valid=%b data=%h",
                 what, k, wb_valid[k], wb_rd[k], wb_data[k], we[k], res[k]);
      end
    end
    if (wb_bfly)  n_bfly++;
    if (wb_ibfly) n_ibfly++;
    // architectural update, slot 1 last
    for (int k = 0; k < 2; k++) if (we[k]) shadow[bundle[k].rd] = res[k];
    last_we = we;
    last_rd[0] = bundle[0].rd;
    last_rd[1] = bundle[1].rd;
    bundle = '0;
  endtask

  task automatic nop();
    issue(mk(OP_NOP, 0, 0, 0), mk(OP_NOP, 0, 0, 0), "nop");
  endtask

  // r[rd] = arbitrary permutation src of r[rs], configuration in r11..r16
  task automatic permute(int rd, int rs, logic swap_slots, string what);
    int c0;
    if (!swap_slots) begin
      issue(mk(OP_BFLY_CT, 0, 11, 12), mk(OP_BFLY, rd, rs, 13), {what, " BFLY"});
      c0 = issue_cycle;
      issue(mk(OP_IBFLY_CT, 0, 14, 15), mk(OP_IBFLY, rd, rd, 16), {what, " IBFLY"});
    end else begin
      issue(mk(OP_BFLY, rd, rs, 13), mk(OP_BFLY_CT, 0, 11, 12), {what, " BFLY"});
      c0 = issue_cycle;
      issue(mk(OP_IBFLY, rd, rd, 16), mk(OP_IBFLY_CT, 0, 14, 15), {what, " IBFLY"});
    end
    // BFLY word driven in cycle c0, IBFLY word in c0+1, the permuted value is
    // on the write-back bus in cycle c0+2: a latency of two cycles
    checks++;
    if (cycle - c0 != 2) begin failures++; $display("FAIL %s: took %0d cycles", what, cycle - c0); end
  endtask

  task automatic mem_load(int r, w64_t v);
    // let a pending write-back commit first: it has priority over memory
    if (last_we != '0) @(posedge clk);
    @(negedge clk);
    mem_we = 1'b1; mem_waddr = ridx_t'(r); mem_wdata = v;
    @(negedge clk);
    mem_we = 1'b0;
    shadow[r] = v;
  endtask

  initial begin
    perm_t src;
    cfg3_t bc, ic;
    op_e   alu_ops [9] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_ROL, OP_ROR};
    bundle = '0; mem_we = 1'b0; mem_waddr = '0; mem_wdata = '0;
    w4 = '0; mem4_we = 1'b0; mem4_waddr = '0; mem4_wdata = '0; last4_we = '0;
    foreach (shadow4[r]) shadow4[r] = '0;
    last_we = '0; last_rd[0] = '0; last_rd[1] = '0;
    foreach (shadow[r]) shadow[r] = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 1; r < 32; r++) mem_load(r, rand64());
    nop();
    // ALU operations in both slots
    foreach (alu_ops[k])
      issue(mk(alu_ops[k], 20, 1, 2), mk(alu_ops[(k + 4) % 9], 21, 3, 4), "alu pair");
    // dependent chains through the bypass, from slot 0 and from slot 1
    issue(mk(OP_ADD, 5, 1, 2), mk(OP_XOR, 6, 3, 4), "chain a");
    issue(mk(OP_SUB, 7, 5, 6), mk(OP_ROL, 8, 6, 5), "chain b");
    issue(mk(OP_OR, 7, 7, 8), mk(OP_ADD, 8, 8, 7), "chain c");
    // same destination in both slots: slot 1 wins
    issue(mk(OP_ADD, 9, 1, 2), mk(OP_SUB, 9, 1, 2), "same rd");
    issue(mk(OP_OR, 10, 9, 9), mk(OP_NOP, 0, 0, 0), "read same rd");
    // arbitrary permutations
    for (int n = 0; n < 8; n++) begin
      random_perm(src);
      benes_route(src, bc, ic);
      mem_load(11, bc[0]); mem_load(12, bc[1]); mem_load(13, bc[2]);
      mem_load(14, ic[0]); mem_load(15, ic[1]); mem_load(16, ic[2]);
      mem_load(1, rand64());
      permute(1, 1, n[0], "permutation");
      n_perm2++;
    end
    // the model's result is checked by issue(); check it is the wanted permutation too
    begin
      w64_t x;
      random_perm(src);
      benes_route(src, bc, ic);
      x = rand64();
      mem_load(11, bc[0]); mem_load(12, bc[1]); mem_load(13, bc[2]);
      mem_load(14, ic[0]); mem_load(15, ic[1]); mem_load(16, ic[2]);
      mem_load(2, x);
      permute(3, 2, 1'b0, "routed permutation");
      checks++;
      if (wb_data[1] !== apply_perm(x, src)) begin
        failures++;
        $display("FAIL routed permutation: got %h exp %h", wb_data[1], apply_perm(x, src));
      end
    end
    // illegal words: unpaired BFLY, unpaired .ct1, mixed pair
    issue(mk(OP_BFLY, 4, 1, 2), mk(OP_ADD, 5, 1, 2), "unpaired BFLY");
    issue(mk(OP_IBFLY_CT, 0, 1, 2), mk(OP_NOP, 0, 0, 0), "unpaired IBFLY.ct1");
    issue(mk(OP_BFLY_CT, 0, 1, 2), mk(OP_IBFLY, 6, 1, 2), "mixed pair");
    // random mix
    for (int n = 0; n < 600; n++) begin
      slot_t s [2];
      int    kind;
      kind = int'($urandom_range(9, 0));
      for (int k = 0; k < 2; k++)
        s[k] = mk(alu_ops[$urandom_range(8, 0)], int'($urandom_range(31, 0)),
                  int'($urandom_range(31, 0)), int'($urandom_range(31, 0)));
      if (kind < 2) begin
        int m = int'($urandom_range(1, 0));
        s[m].op   = kind == 0 ? OP_BFLY : OP_IBFLY;
        s[1-m].op = kind == 0 ? OP_BFLY_CT : OP_IBFLY_CT;
      end else if (kind == 2) begin
        s[0].op = op_e'($urandom_range(13, 0));
        s[1].op = op_e'($urandom_range(13, 0));
      end
      issue(s[0], s[1], "random");
    end
    // read every register back through slot 0 (OR r, r, r)
    for (int r = 0; r < 32; r++) issue(mk(OP_OR, r, r, r), mk(OP_NOP, 0, 0, 0), "readback");
    run_four_slot();
    $display("bypass=%0d bfly=%0d ibfly=%0d illegal=%0d permutations=%0d",
             n_bypass, n_bfly, n_ibfly, n_illegal, n_perm2);
    $display("4-slot: both units in one cycle=%0d illegal=%0d", n_dual_unit, n_illegal4);
    checks++;
    if (n_bypass == 0 || n_bfly == 0 || n_ibfly == 0 || n_illegal == 0 ||
        n_dual_unit == 0 || n_illegal4 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
