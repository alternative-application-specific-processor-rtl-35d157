// tb_si_frontend: self-checking test of the operand-gathering front end in
// all four methods at once (one instance per method, same instruction
// stream). For each fetched instruction the four-source operation is
// compared with the expected operand mapping: register pairs (with
// wrap-around), both long formats, and the bundled method with its
// instruction buffer, including fetch gaps between the two halves, error
// cases and the four-cycle latency of a bundled permutation at one
// instruction per cycle.
module tb_si_frontend;
  import perm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic    v;
  finstr_t in;
  op4_t    op [4];
  logic    err [4];
  logic    pend [4];
  int      checks = 0, failures = 0;
  int      n_pair = 0, n_gap = 0, n_err = 0;

  si_frontend #(.METHOD(M_REGPAIR)) u_rp (.clk(clk), .rst_n(rst_n), .instr_valid_i(v), .instr_i(in),
                                          .op_o(op[0]), .err_o(err[0]), .pending_o(pend[0]));
  si_frontend #(.METHOD(M_TWOLEN1)) u_t1 (.clk(clk), .rst_n(rst_n), .instr_valid_i(v), .instr_i(in),
                                          .op_o(op[1]), .err_o(err[1]), .pending_o(pend[1]));
  si_frontend #(.METHOD(M_TWOLEN2)) u_t2 (.clk(clk), .rst_n(rst_n), .instr_valid_i(v), .instr_i(in),
                                          .op_o(op[2]), .err_o(err[2]), .pending_o(pend[2]));
  si_frontend #(.METHOD(M_BUNDLED)) u_bd (.clk(clk), .rst_n(rst_n), .instr_valid_i(v), .instr_i(in),
                                          .op_o(op[3]), .err_o(err[3]), .pending_o(pend[3]));

  function automatic finstr_t fi(op_e o, int rd, int a, int b, int c = 0, int d = 0);
    finstr_t x;
    x.op = o; x.rd = ridx_t'(rd); x.rs1 = ridx_t'(a); x.rs2 = ridx_t'(b);
    x.rs3 = ridx_t'(c); x.rs4 = ridx_t'(d);
    return x;
  endfunction

  function automatic op4_t o4(op_e o, int rd, int s0, int s1, int s2, int s3);
    op4_t x;
    x.op = o; x.rd = ridx_t'(rd);
    x.rs = {ridx_t'(s3), ridx_t'(s2), ridx_t'(s1), ridx_t'(s0)};
    return x;
  endfunction

  // drive one instruction for one cycle; check method m's output
  task automatic drive(logic valid, finstr_t x, int m, op4_t exp_op, logic exp_err, string what);
    @(negedge clk);
    v = valid; in = x;
    #1;
    checks++;
    if (op[m] !== exp_op || err[m] !== exp_err) begin
      failures++;
      $display("FAIL %s (method %0d): op=%h err=%b exp op=%h err=%b", what, m, op[m], err[m], exp_op, exp_err);
    end
    if (exp_err) n_err++;
  endtask

  // state of the bundle buffer after the current cycle's edge
  task automatic check_pend(logic exp, string what);
    @(posedge clk);
    #1;
    checks++;
    if (pend[3] !== exp) begin
      failures++;
      $display("FAIL %s: pending=%b", what, pend[3]);
    end
  endtask

  localparam op4_t NOP4 = '{op: OP_NOP, rd: '0, rs: '0};

  initial begin
    v = 1'b0; in = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // ALU instructions are the same in every method
    for (int m = 0; m < 4; m++) drive(1'b1, fi(OP_ADD, 3, 4, 5), m, o4(OP_ADD, 3, 4, 5, 0, 0), 1'b0, "alu");
    // register pair: BFLY Rd, Rs1, Rs2 -> Rs1 | Rs2, Rs2+1, Rs1+1
    drive(1'b1, fi(OP_BFLY, 1, 1, 11), 0, o4(OP_BFLY, 1, 1, 11, 12, 2), 1'b0, "pair");
    drive(1'b1, fi(OP_IBFLY, 7, 6, 14), 0, o4(OP_IBFLY, 7, 6, 14, 15, 7), 1'b0, "pair");
    drive(1'b1, fi(OP_BFLY, 2, 31, 30), 0, o4(OP_BFLY, 2, 31, 30, 31, 0), 1'b0, "pair wrap");
    drive(1'b1, fi(OP_BFLY_CT, 0, 1, 2), 0, NOP4, 1'b1, "ct1 in pair method");
    // two-length v1 and v2
    drive(1'b1, fi(OP_BFLY, 1, 1, 11, 12, 13), 1, o4(OP_BFLY, 1, 1, 11, 12, 13), 1'b0, "long v1");
    drive(1'b1, fi(OP_IBFLY, 9, 8, 14, 15, 16), 1, o4(OP_IBFLY, 9, 8, 14, 15, 16), 1'b0, "long v1");
    drive(1'b1, fi(OP_BFLY, 1, 11, 12, 13), 2, o4(OP_BFLY, 1, 1, 11, 12, 13), 1'b0, "long v2");
    drive(1'b1, fi(OP_IBFLY, 5, 14, 15, 16), 2, o4(OP_IBFLY, 5, 5, 14, 15, 16), 1'b0, "long v2");
    drive(1'b1, fi(OP_IBFLY_CT, 0, 1, 2), 1, NOP4, 1'b1, "ct1 in long method");
    // the shared stream left that IBFLY.ct1 in the bundle buffer: complete it
    check_pend(1'b1, "ict1 buffered");
    drive(1'b1, fi(OP_IBFLY, 9, 9, 3), 3, o4(OP_IBFLY, 9, 9, 1, 2, 3), 1'b0, "complete buffered ict1");
    // bundled: four instructions, one per cycle; results every second cycle
    for (int n = 0; n < 3; n++) begin
      int r = n + 1;
      drive(1'b1, fi(OP_BFLY_CT, 0, 11, 12), 3, NOP4, 1'b0, "bundle ct1");
      check_pend(1'b1, "ct1 buffered");
      drive(1'b1, fi(OP_BFLY, r, r, 13), 3, o4(OP_BFLY, r, r, 11, 12, 13), 1'b0, "bundle BFLY");
      drive(1'b1, fi(OP_IBFLY_CT, 0, 14, 15), 3, NOP4, 1'b0, "bundle ict1");
      drive(1'b1, fi(OP_IBFLY, r, r, 16), 3, o4(OP_IBFLY, r, r, 14, 15, 16), 1'b0, "bundle IBFLY");
      check_pend(1'b0, "buffer cleared");
      n_pair += 2;
    end
    // a fetch gap between the halves keeps the buffer
    drive(1'b1, fi(OP_BFLY_CT, 0, 21, 22), 3, NOP4, 1'b0, "gap ct1");
    drive(1'b0, fi(OP_ADD, 1, 1, 1), 3, NOP4, 1'b0, "gap");
    drive(1'b0, '0, 3, NOP4, 1'b0, "gap");
    drive(1'b1, fi(OP_BFLY, 4, 5, 23), 3, o4(OP_BFLY, 4, 5, 21, 22, 23), 1'b0, "after gap");
    n_gap++;
    // errors: wrong partner, lone second half; buffer empty afterwards
    drive(1'b1, fi(OP_BFLY_CT, 0, 1, 2), 3, NOP4, 1'b0, "ct1");
    drive(1'b1, fi(OP_IBFLY, 3, 3, 4), 3, NOP4, 1'b1, "wrong partner");
    drive(1'b1, fi(OP_BFLY, 3, 3, 4), 3, NOP4, 1'b1, "lone BFLY");
    drive(1'b1, fi(OP_ADD, 3, 4, 5), 3, o4(OP_ADD, 3, 4, 5, 0, 0), 1'b0, "alu after errors");
    $display("bundles=%0d gaps=%0d errors=%0d", n_pair, n_gap, n_err);
    checks++;
    if (n_pair == 0 || n_gap == 0 || n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
