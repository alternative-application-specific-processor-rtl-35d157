// tb_perm_asip_top: end-to-end test of the whole design at its default size.
//
// VLIW side: loads registers through the memory port, runs ALU words,
// dependent words through the bypass, arbitrary 64-bit permutations as two
// long words each (checked against the routed permutation and for their
// two-cycle latency), the same permutation applied to r1..r4 back to back,
// the DES initial permutation IP and its inverse FP (the tables are built
// from their closed form below), illegal words, and a random instruction
// mix, everything against the architectural model ref_word().
// Four-slot VLIW machine: the same permutation on r1..r4 issued as the
// overlapped schedule, one permutation completing per cycle.
// LdState machine: the four-instruction sequence on routed permutations
// through its registers, the two-instruction repeat, and a context switch
// that saves the internal registers with MovePUtoGR and restores them with
// LdState.
// Every mechanism is counted and a mechanism that never happened is a
// failure.
module tb_perm_asip_top;
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
  logic  [1:0]  ss_valid;
  slot_t [1:0]  ss_inst;
  logic  [1:0]  ss_take;
  logic         ss_dual, ss_err;
  logic         ss_mem_we;
  ridx_t        ss_mem_waddr;
  word_t        ss_mem_wdata;
  logic  [1:0]  ss_wb_valid;
  ridx_t [1:0]  ss_wb_rd;
  word_t [1:0]  ss_wb_data;
  logic         ss_wb_bfly, ss_wb_ibfly;
  logic         si_valid;
  finstr_t      si_instr;
  logic         si_err, si_pending;
  logic         si_mem_we;
  ridx_t        si_mem_waddr;
  word_t        si_mem_wdata;
  logic         si_wb_valid;
  ridx_t        si_wb_rd;
  word_t        si_wb_data;
  slot_t [3:0]  tp_bundle;
  logic         tp_err;
  logic         tp_mem_we;
  ridx_t        tp_mem_waddr;
  word_t        tp_mem_wdata;
  logic  [3:0]  tp_wb_valid;
  ridx_t [3:0]  tp_wb_rd;
  word_t [3:0]  tp_wb_data;
  logic         tp_wb_bfly, tp_wb_ibfly;
  int           n_tp_perm = 0;
  ls_instr_t    ls_instr;
  logic         ls_mem_we;
  ridx_t        ls_mem_waddr;
  word_t        ls_mem_wdata;
  logic         ls_wb_valid;
  ridx_t        ls_wb_rd;
  word_t        ls_wb_data;
  logic         ls_last_we;

  perm_asip_top dut (
    .clk(clk), .rst_n(rst_n),
    .bundle_i(bundle), .bundle_err_o(err),
    .mem_we_i(mem_we), .mem_waddr_i(mem_waddr), .mem_wdata_i(mem_wdata),
    .wb_valid_o(wb_valid), .wb_rd_o(wb_rd), .wb_data_o(wb_data),
    .wb_bfly_o(wb_bfly), .wb_ibfly_o(wb_ibfly),
    .ss_valid_i(ss_valid), .ss_inst_i(ss_inst), .ss_take_o(ss_take), .ss_dual_o(ss_dual),
    .ss_err_o(ss_err), .ss_mem_we_i(ss_mem_we), .ss_mem_waddr_i(ss_mem_waddr),
    .ss_mem_wdata_i(ss_mem_wdata), .ss_wb_valid_o(ss_wb_valid), .ss_wb_rd_o(ss_wb_rd),
    .ss_wb_data_o(ss_wb_data), .ss_wb_bfly_o(ss_wb_bfly), .ss_wb_ibfly_o(ss_wb_ibfly),
    .si_valid_i(si_valid), .si_instr_i(si_instr), .si_err_o(si_err), .si_pending_o(si_pending),
    .si_mem_we_i(si_mem_we), .si_mem_waddr_i(si_mem_waddr), .si_mem_wdata_i(si_mem_wdata),
    .si_wb_valid_o(si_wb_valid), .si_wb_rd_o(si_wb_rd), .si_wb_data_o(si_wb_data),
    .tp_bundle_i(tp_bundle), .tp_bundle_err_o(tp_err), .tp_mem_we_i(tp_mem_we),
    .tp_mem_waddr_i(tp_mem_waddr), .tp_mem_wdata_i(tp_mem_wdata), .tp_wb_valid_o(tp_wb_valid),
    .tp_wb_rd_o(tp_wb_rd), .tp_wb_data_o(tp_wb_data), .tp_wb_bfly_o(tp_wb_bfly),
    .tp_wb_ibfly_o(tp_wb_ibfly),
    .ls_instr_i(ls_instr), .ls_mem_we_i(ls_mem_we), .ls_mem_waddr_i(ls_mem_waddr),
    .ls_mem_wdata_i(ls_mem_wdata), .ls_wb_valid_o(ls_wb_valid), .ls_wb_rd_o(ls_wb_rd),
    .ls_wb_data_o(ls_wb_data));

  regs_t shadow;
  int    checks = 0, failures = 0;
  int    cycle = 0, issue_cycle = 0;
  logic [1:0] last_we;
  ridx_t      last_rd [2];
  // mechanism counters
  int n_mem = 0, n_alu = 0, n_bypass = 0, n_bfly = 0, n_ibfly = 0, n_illegal = 0;
  int n_perm = 0, n_pipe = 0, n_des = 0;
  int n_ld = 0, n_lsperm = 0, n_mv = 0, n_repeat = 0, n_restore = 0;
  int n_ss_dual = 0, n_ss_single = 0, n_ss_perm = 0, n_si_perm = 0, n_si_alu = 0;

  // ------------------------------------------- superscalar and single issue
  // Both machines run a program; a sequential model of the program gives the
  // expected register writes in program order, which are compared with the
  // write-back ports (slot 0 before slot 1).
  regs_t ss_rf, si_rf;
  typedef struct { int rd; w64_t v; } wr_t;
  wr_t   ss_exp [$], si_exp [$];

  task automatic seq_exec(ref regs_t rf, ref wr_t q [$], input op_e op, input int rd,
                          input int rs, input int c1, input int c2, input int c3, input int b);
    w64_t v;
    case (op)
      OP_BFLY:  v = ref_bfly(rf[rs], {rf[c3], rf[c2], rf[c1]});
      OP_IBFLY: v = ref_ibfly(rf[rs], {rf[c3], rf[c2], rf[c1]});
      default:  v = ref_alu(op, rf[rs], rf[b]);
    endcase
    rf[rd] = v;
    q.push_back('{rd, v});
  endtask

  task automatic check_writes(ref wr_t q [$], input logic valid, input ridx_t rd,
                              input w64_t data, input string what);
    if (valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL %s: unexpected write r%0d", what, rd);
      end else begin
        wr_t e = q.pop_front();
        if (int'(rd) != e.rd || data !== e.v) begin
          failures++;
          $display("FAIL %s: write r%0d=%h, expected r%0d=%h", what, rd, data, e.rd, e.v);
        end
      end
    end
  endtask

  always @(posedge clk) begin
    #2;
    for (int k = 0; k < 2; k++) check_writes(ss_exp, ss_wb_valid[k], ss_wb_rd[k], ss_wb_data[k], "superscalar");
    check_writes(si_exp, si_wb_valid, si_wb_rd, si_wb_data, "single issue");
  end

  always @(posedge clk) cycle <= cycle + 1;

  task automatic expect_eq(w64_t got, w64_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ VLIW side
  task automatic issue(slot_t s0, slot_t s1, string what);
    logic [1:0] we;
    w64_t       res [2];
    logic       legal;
    @(negedge clk);
    bundle[0] = s0;
    bundle[1] = s1;
    issue_cycle = cycle;
    legal = ref_word(shadow, s0, s1, we, res);
    for (int k = 0; k < 2; k++) begin
      if (is_alu_op(bundle[k].op) && legal) n_alu++;
      for (int p = 0; p < 2; p++)
        if (last_we[p] && bundle[k].op != OP_NOP &&
            (bundle[k].rs1 == last_rd[p] || bundle[k].rs2 == last_rd[p]))
          n_bypass++;
    end
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
    for (int k = 0; k < 2; k++) if (we[k]) shadow[bundle[k].rd] = res[k];
    last_we = we;
    last_rd[0] = bundle[0].rd;
    last_rd[1] = bundle[1].rd;
    bundle = '0;
  endtask

  task automatic mem_load(int r, w64_t v);
    // let a pending write-back commit first: it has priority over memory
    if (last_we != '0) @(posedge clk);
    @(negedge clk);
    mem_we = 1'b1; mem_waddr = ridx_t'(r); mem_wdata = v;
    @(negedge clk);
    mem_we = 1'b0;
    shadow[r] = v;
    n_mem++;
    last_we = '0;
  endtask

  task automatic load_cfg(cfg3_t bc, cfg3_t ic);
    mem_load(11, bc[0]); mem_load(12, bc[1]); mem_load(13, bc[2]);
    mem_load(14, ic[0]); mem_load(15, ic[1]); mem_load(16, ic[2]);
  endtask

  // rd = permutation of rs in two long words; checks the 2-cycle latency
  // and, when want is given, the value
  task automatic permute(int rd, int rs, logic swap_slots, logic chk, w64_t want, string what);
    int c0;
    if (!swap_slots) begin
      issue(mk(OP_BFLY_CT, 0, 11, 12), mk(OP_BFLY, rd, rs, 13), {what, " BFLY"});
      c0 = issue_cycle;
      issue(mk(OP_IBFLY_CT, 0, 14, 15), mk(OP_IBFLY, rd, rd, 16), {what, " IBFLY"});
      if (chk) expect_eq(wb_data[1], want, what);
    end else begin
      issue(mk(OP_BFLY, rd, rs, 13), mk(OP_BFLY_CT, 0, 11, 12), {what, " BFLY"});
      c0 = issue_cycle;
      issue(mk(OP_IBFLY, rd, rd, 16), mk(OP_IBFLY_CT, 0, 14, 15), {what, " IBFLY"});
      if (chk) expect_eq(wb_data[0], want, what);
    end
    checks++;
    if (cycle - c0 != 2) begin failures++; $display("FAIL %s: latency %0d", what, cycle - c0); end
    n_perm++;
  endtask

  // DES initial permutation in this design's bit numbering (bit 0 = LSB).
  // DES numbers bits 1..64 from the most significant end and defines, for
  // output row r and column c (0..7), IP[8r+c] = 8*(7-c) + s(r) with
  // s(r) = 2r+2 for r < 4 and 2(r-4)+1 otherwise (IP[0] = 58, IP[1] = 50,
  // ..., IP[63] = 7). FP is its inverse.
  function automatic void des_ip(output perm_t ip);
    for (int k = 0; k < 64; k++) begin
      int r = k / 8, c = k % 8;
      int one_based = 8 * (7 - c) + ((r < 4) ? 2 * r + 2 : 2 * (r - 4) + 1);
      ip[63 - k] = 64 - one_based;
    end
  endfunction

  // ---------------------------------------------------------- LdState side
  function automatic ls_instr_t lsi(ls_kind_e k, logic inv, logic sel, int rd, int rs1, int rs2);
    ls_instr_t x;
    x = '0;
    x.kind = k; x.inv = inv; x.sel = sel;
    x.rd = ridx_t'(rd); x.rs1 = ridx_t'(rs1); x.rs2 = ridx_t'(rs2);
    return x;
  endfunction

  // memory write into the LdState machine's registers; a pending write-back
  // commits first
  task automatic ls_load(int r, w64_t v);
    if (ls_last_we) begin
      @(negedge clk);
      ls_instr = lsi(LS_NOP, 1'b0, 1'b0, 0, 0, 0);
      @(posedge clk);
    end
    @(negedge clk);
    ls_instr = lsi(LS_NOP, 1'b0, 1'b0, 0, 0, 0);
    ls_mem_we = 1'b1; ls_mem_waddr = ridx_t'(r); ls_mem_wdata = v;
    @(posedge clk);
    #1 ls_mem_we = 1'b0;
    ls_last_we = 1'b0;
  endtask

  // issue one instruction; returns what reaches the write-back stage
  task automatic ls_issue(ls_instr_t x, output w64_t res);
    @(negedge clk);
    ls_instr = x;
    @(posedge clk);
    #1;
    res = ls_wb_data;
    ls_last_we = ls_wb_valid;
    case (x.kind)
      LS_LDSTATE: n_ld++;
      LS_PERM:    n_lsperm++;
      LS_MOVE:    n_mv++;
      default: ;
    endcase
    checks++;
    if (ls_wb_valid !== (x.kind inside {LS_ALU, LS_PERM, LS_MOVE}) ||
        (ls_wb_valid && ls_wb_rd !== x.rd)) begin
      failures++;
      $display("FAIL LdState machine write-back valid=%b rd=%0d", ls_wb_valid, ls_wb_rd);
    end
  endtask

  initial begin
    perm_t src, ip, fp;
    cfg3_t bc, ic, bc2, ic2;
    w64_t  x, y, sv [4];
    op_e   alu_ops [9];

    alu_ops = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_ROL, OP_ROR};
    bundle = '0; mem_we = 1'b0; mem_waddr = '0; mem_wdata = '0;
    ss_valid = '0; ss_inst = '0; ss_mem_we = 1'b0; ss_mem_waddr = '0; ss_mem_wdata = '0;
    si_valid = 1'b0; si_instr = '0; si_mem_we = 1'b0; si_mem_waddr = '0; si_mem_wdata = '0;
    tp_bundle = '0; tp_mem_we = 1'b0; tp_mem_waddr = '0; tp_mem_wdata = '0;
    ls_instr = '0; ls_mem_we = 1'b0; ls_mem_waddr = '0; ls_mem_wdata = '0; ls_last_we = 1'b0;
    last_we = '0; last_rd[0] = '0; last_rd[1] = '0;
    foreach (shadow[r]) shadow[r] = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- VLIW: registers from memory, ALU words, bypass chains
    for (int r = 1; r < 32; r++) mem_load(r, rand64());
    foreach (alu_ops[k])
      issue(mk(alu_ops[k], 20, 1, 2), mk(alu_ops[(k + 3) % 9], 21, 3, 4), "alu");
    issue(mk(OP_ADD, 5, 1, 2), mk(OP_XOR, 6, 3, 4), "chain a");
    issue(mk(OP_SUB, 7, 5, 6), mk(OP_ROR, 8, 6, 5), "chain b");
    issue(mk(OP_AND, 9, 7, 8), mk(OP_OR, 10, 8, 7), "chain c");

    // ---- arbitrary permutations, two long words each
    for (int n = 0; n < 10; n++) begin
      random_perm(src);
      benes_route(src, bc, ic);
      load_cfg(bc, ic);
      x = rand64();
      mem_load(1, x);
      permute(1, 1, n[0], 1'b1, apply_perm(x, src), "arbitrary permutation");
    end

    // ---- same permutation on r1..r4 back to back (one every two cycles)
    random_perm(src);
    benes_route(src, bc, ic);
    load_cfg(bc, ic);
    for (int r = 1; r <= 4; r++) begin sv[r-1] = rand64(); mem_load(r, sv[r-1]); end
    for (int r = 1; r <= 4; r++) begin
      permute(r, r, 1'b0, 1'b1, apply_perm(sv[r-1], src), "pipelined permutation");
      n_pipe++;
    end

    // ---- DES IP then FP on the datapath
    des_ip(ip);
    foreach (ip[k]) fp[ip[k]] = k;
    benes_route(ip, bc, ic);
    benes_route(fp, bc2, ic2);
    for (int n = 0; n < 4; n++) begin
      x = rand64();
      mem_load(2, x);
      load_cfg(bc, ic);
      permute(3, 2, 1'b0, 1'b1, apply_perm(x, ip), "DES IP");
      load_cfg(bc2, ic2);
      permute(4, 3, 1'b1, 1'b1, x, "DES FP(IP(x))");
      n_des++;
    end
    // spot values of the table: DES input bit 58 (this design's bit 6) is
    // the first output bit (bit 63), input bit 7 (bit 57) the last (bit 0)
    checks++;
    if (ip[63] != 6 || ip[0] != 57) begin failures++; $display("FAIL DES IP table"); end

    // ---- illegal words and a random mix
    issue(mk(OP_IBFLY, 4, 1, 2), mk(OP_SUB, 5, 1, 2), "unpaired IBFLY");
    issue(mk(OP_BFLY_CT, 0, 1, 2), mk(OP_BFLY_CT, 0, 3, 4), "two BFLY.ct1");
    for (int n = 0; n < 300; n++) begin
      slot_t s [2];
      int    kind;
      kind = int'($urandom_range(9, 0));
      for (int k = 0; k < 2; k++)
        s[k] = mk(alu_ops[$urandom_range(8, 0)], int'($urandom_range(31, 0)),
                  int'($urandom_range(31, 0)), int'($urandom_range(31, 0)));
      if (kind < 2) begin
        int m;
        m = int'($urandom_range(1, 0));
        s[m].op   = kind == 0 ? OP_BFLY : OP_IBFLY;
        s[1-m].op = kind == 0 ? OP_BFLY_CT : OP_IBFLY_CT;
      end else if (kind == 2) begin
        s[0].op = op_e'($urandom_range(13, 0));
        s[1].op = op_e'($urandom_range(13, 0));
      end
      issue(s[0], s[1], "random");
    end

    // ---- superscalar machine: the four-register example plus ALU pairs
    begin
      slot_t prog [$];
      int    pc, c0, c1;
      random_perm(src);
      benes_route(src, bc, ic);
      for (int r = 0; r < 32; r++) begin
        w64_t v;
        v = (r >= 11 && r <= 16) ? ((r <= 13) ? bc[r - 11] : ic[r - 14]) : rand64();
        if (r == 0) v = '0;
        @(negedge clk);
        ss_mem_we = 1'b1; ss_mem_waddr = ridx_t'(r); ss_mem_wdata = v;
        si_mem_we = 1'b1; si_mem_waddr = ridx_t'(r); si_mem_wdata = v;
        ss_rf[r] = v;
        si_rf[r] = v;
      end
      @(negedge clk);
      ss_mem_we = 1'b0; si_mem_we = 1'b0;
      for (int r = 1; r <= 4; r++) begin
        prog.push_back(mk(OP_BFLY_CT, 0, 11, 12));
        prog.push_back(mk(OP_BFLY, r, r, 13));
        prog.push_back(mk(OP_IBFLY_CT, 0, 14, 15));
        prog.push_back(mk(OP_IBFLY, r, r, 16));
      end
      prog.push_back(mk(OP_ADD, 20, 1, 2));     // independent pair
      prog.push_back(mk(OP_XOR, 21, 3, 4));
      prog.push_back(mk(OP_SUB, 22, 20, 21));   // depends on both: split
      prog.push_back(mk(OP_ROL, 23, 22, 5));
      prog.push_back(mk(OP_OR, 24, 6, 7));
      // sequential model
      for (int i = 0; i < prog.size(); i++) begin
        if (prog[i].op == OP_BFLY || prog[i].op == OP_IBFLY)
          seq_exec(ss_rf, ss_exp, prog[i].op, int'(prog[i].rd), int'(prog[i].rs1), int'(prog[i-1].rs1),
                   int'(prog[i-1].rs2), int'(prog[i].rs2), 0);
        else if (is_alu_op(prog[i].op))
          seq_exec(ss_rf, ss_exp, prog[i].op, int'(prog[i].rd), int'(prog[i].rs1), 0, 0, 0, int'(prog[i].rs2));
      end
      // fetch buffer: the two oldest unissued instructions
      pc = 0;
      c0 = 0;
      c1 = 0;
      while (pc < prog.size()) begin
        @(negedge clk);
        ss_valid = {pc + 1 < prog.size(), 1'b1};
        ss_inst[0] = prog[pc];
        ss_inst[1] = (pc + 1 < prog.size()) ? prog[pc + 1] : mk(OP_NOP, 0, 0, 0);
        #1;
        if (pc == 0) c0 = cycle;
        checks++;
        if (ss_err) begin failures++; $display("FAIL superscalar issue error at %0d", pc); end
        if (ss_dual) n_ss_dual++; else n_ss_single++;
        if (ss_dual && ss_inst[1].op == OP_IBFLY) n_ss_perm++;
        if (pc == 16) c1 = cycle;                // four permutations issued
        pc += int'(ss_take);
      end
      @(negedge clk);
      ss_valid = '0;
      repeat (2) @(posedge clk);
      checks++;
      if (c1 - c0 != 8) begin failures++; $display("FAIL superscalar: 4 permutations in %0d cycles", c1 - c0); end
      checks++;
      if (ss_exp.size() != 0) begin failures++; $display("FAIL superscalar: %0d writes missing", ss_exp.size()); end
    end

    // ---- single-issue machine, long format v1 (the top's default method)
    begin
      finstr_t p [$];
      finstr_t x;
      w64_t    r1_init;
      int c0;
      r1_init = si_rf[1];
      x = '0; x.op = OP_BFLY;  x.rd = 1; x.rs1 = 1; x.rs2 = 11; x.rs3 = 12; x.rs4 = 13; p.push_back(x);
      x = '0; x.op = OP_IBFLY; x.rd = 1; x.rs1 = 1; x.rs2 = 14; x.rs3 = 15; x.rs4 = 16; p.push_back(x);
      x = '0; x.op = OP_BFLY;  x.rd = 5; x.rs1 = 2; x.rs2 = 11; x.rs3 = 12; x.rs4 = 13; p.push_back(x);
      x = '0; x.op = OP_ADD;   x.rd = 6; x.rs1 = 5; x.rs2 = 3;  p.push_back(x);
      x = '0; x.op = OP_IBFLY; x.rd = 5; x.rs1 = 5; x.rs2 = 14; x.rs3 = 15; x.rs4 = 16; p.push_back(x);
      x = '0; x.op = OP_BFLY_CT; x.rs1 = 1; x.rs2 = 2; p.push_back(x);   // not in this format
      x = '0; x.op = OP_ROR;   x.rd = 7; x.rs1 = 5; x.rs2 = 6;  p.push_back(x);
      foreach (p[i]) begin
        if (p[i].op == OP_BFLY || p[i].op == OP_IBFLY) begin
          seq_exec(si_rf, si_exp, p[i].op, int'(p[i].rd), int'(p[i].rs1), int'(p[i].rs2), int'(p[i].rs3), int'(p[i].rs4), 0);
          n_si_perm++;
        end else if (is_alu_op(p[i].op)) begin
          seq_exec(si_rf, si_exp, p[i].op, int'(p[i].rd), int'(p[i].rs1), 0, 0, 0, int'(p[i].rs2));
          n_si_alu++;
        end
      end
      c0 = 0;
      foreach (p[i]) begin
        @(negedge clk);
        si_valid = 1'b1;
        si_instr = p[i];
        #1;
        if (i == 0) c0 = cycle;
        checks++;
        if (si_err !== (p[i].op == OP_BFLY_CT)) begin failures++; $display("FAIL single issue err at %0d", i); end
        if (i == 1) begin
          @(posedge clk);
          #3;
          checks++;                          // BFLY + IBFLY: R1 permuted after two cycles
          if (cycle - c0 != 2 || !si_wb_valid || si_wb_data !== apply_perm(r1_init, src)) begin
            failures++;
            $display("FAIL single issue permutation: %h after %0d cycles", si_wb_data, cycle - c0);
          end
        end
      end
      @(negedge clk);
      si_valid = 1'b0;
      repeat (2) @(posedge clk);
      checks++;
      if (si_exp.size() != 0) begin failures++; $display("FAIL single issue: %0d writes missing", si_exp.size()); end
    end

    // ---- four-slot VLIW: r1..r4 permuted, one completing per cycle
    begin
      w64_t xs [5];
      int   c_first;
      random_perm(src);
      benes_route(src, bc, ic);
      for (int k = 0; k < 6; k++) begin     // r11..r13 butterfly, r14..r16 inverse
        @(negedge clk);
        tp_mem_we = 1'b1;
        tp_mem_waddr = ridx_t'(11 + k);
        tp_mem_wdata = k < 3 ? bc[k] : ic[k-3];
      end
      for (int r = 1; r <= 4; r++) begin
        xs[r] = rand64();
        @(negedge clk);
        tp_mem_we = 1'b1; tp_mem_waddr = ridx_t'(r); tp_mem_wdata = xs[r];
      end
      @(negedge clk);
      tp_mem_we = 1'b0;
      c_first = 0;
      for (int c = 1; c <= 5; c++) begin
        @(negedge clk);
        tp_bundle = '0;
        if (c >= 2) begin
          tp_bundle[0] = mk(OP_IBFLY_CT, 0, 14, 15);
          tp_bundle[1] = mk(OP_IBFLY, c - 1, c - 1, 16);
        end
        if (c <= 4) begin
          tp_bundle[2] = mk(OP_BFLY_CT, 0, 11, 12);
          tp_bundle[3] = mk(OP_BFLY, c, c, 13);
        end
        #1;
        checks++;
        if (tp_err) begin failures++; $display("FAIL four-slot word %0d refused", c); end
        @(posedge clk);
        #1;
        if (c >= 2) begin
          if (c_first == 0) c_first = cycle;
          expect_eq(tp_wb_data[1], apply_perm(xs[c-1], src), "four-slot permutation");
          checks++;
          if (!(tp_wb_bfly == (c <= 4) && tp_wb_ibfly)) begin
            failures++;
            $display("FAIL four-slot word %0d: units bfly=%b ibfly=%b", c, tp_wb_bfly, tp_wb_ibfly);
          end
          n_tp_perm++;
        end
      end
      checks++;
      if (cycle - c_first != 3) begin
        failures++;
        $display("FAIL four-slot: four permutations over %0d cycles", cycle - c_first + 1);
      end
      @(negedge clk);
      tp_bundle = '0;
    end

    // ---- LdState machine: r1 <- perm(r1) with the configuration in r11..r16
    for (int n = 0; n < 6; n++) begin
      random_perm(src);
      benes_route(src, bc, ic);
      x = rand64();
      ls_load(1, x);
      for (int k = 0; k < 3; k++) begin
        ls_load(11 + k, bc[k]);
        ls_load(14 + k, ic[k]);
      end
      ls_issue(lsi(LS_LDSTATE, 1'b0, 1'b0, 0, 11, 12), y);   // LdState.bfly r11, r12
      ls_issue(lsi(LS_PERM,    1'b0, 1'b0, 1, 1, 13), y);    // BFLY r1, r1, r13
      ls_issue(lsi(LS_LDSTATE, 1'b1, 1'b0, 0, 14, 15), y);   // LdState.ibfly r14, r15
      ls_issue(lsi(LS_PERM,    1'b1, 1'b0, 1, 1, 16), y);    // IBFLY r1, r1, r16
      expect_eq(y, apply_perm(x, src), "LdState permutation");
      x = rand64();
      ls_load(2, x);
      ls_issue(lsi(LS_PERM, 1'b0, 1'b0, 2, 2, 13), y);
      ls_issue(lsi(LS_PERM, 1'b1, 1'b0, 2, 2, 16), y);
      expect_eq(y, apply_perm(x, src), "LdState repeated permutation");
      n_repeat++;
    end
    // context switch: save C1, C2, C4, C5 into r20..r23 with MovePUtoGR, let
    // another process load its own state, restore, and permute again
    for (int k = 0; k < 4; k++) begin
      ls_issue(lsi(LS_MOVE, 1'(k / 2), 1'(k % 2), 20 + k, 0, 0), sv[k]);
    end
    expect_eq(sv[0], bc[0], "saved C1");
    expect_eq(sv[1], bc[1], "saved C2");
    expect_eq(sv[2], ic[0], "saved C4");
    expect_eq(sv[3], ic[1], "saved C5");
    ls_load(24, rand64());
    ls_load(25, rand64());
    ls_issue(lsi(LS_LDSTATE, 1'b0, 1'b0, 0, 24, 25), y);
    ls_issue(lsi(LS_LDSTATE, 1'b1, 1'b0, 0, 25, 24), y);
    ls_issue(lsi(LS_LDSTATE, 1'b0, 1'b0, 0, 20, 21), y);
    ls_issue(lsi(LS_LDSTATE, 1'b1, 1'b0, 0, 22, 23), y);
    x = rand64();
    ls_load(3, x);
    ls_issue(lsi(LS_PERM, 1'b0, 1'b0, 3, 3, 13), y);
    ls_issue(lsi(LS_PERM, 1'b1, 1'b0, 3, 3, 16), y);
    expect_eq(y, apply_perm(x, src), "permutation after restore");
    n_restore++;
    @(negedge clk);
    ls_instr = lsi(LS_NOP, 1'b0, 1'b0, 0, 0, 0);
    @(posedge clk);

    $display("mem_loads=%0d alu_ops=%0d bypass=%0d bfly=%0d ibfly=%0d illegal=%0d",
             n_mem, n_alu, n_bypass, n_bfly, n_ibfly, n_illegal);
    $display("permutations=%0d pipelined=%0d des=%0d", n_perm, n_pipe, n_des);
    $display("superscalar: dual=%0d single=%0d permutations=%0d; single issue: permutations=%0d alu=%0d",
             n_ss_dual, n_ss_single, n_ss_perm, n_si_perm, n_si_alu);
    $display("four-slot VLIW permutations=%0d", n_tp_perm);
    $display("ldstate: load=%0d perm=%0d move=%0d repeat=%0d restore=%0d",
             n_ld, n_lsperm, n_mv, n_repeat, n_restore);
    begin
      int cnt [21];
      cnt = '{n_mem, n_alu, n_bypass, n_bfly, n_ibfly, n_illegal, n_perm,
              n_pipe, n_des, n_ld, n_lsperm, n_mv, n_repeat, n_restore,
              n_ss_dual, n_ss_single, n_ss_perm, n_si_perm, n_si_alu, n_tp_perm, 1};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
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
