// tb_ss_issue: self-checking test of the superscalar pair-issue logic.
// Directed cases (permutation pair issued together, .ct1 waiting for its
// partner, two independent ALU instructions, a dependent pair split, the
// error cases, NOP and empty buffer) followed by random instruction pairs
// against a rule table written here. The block is combinational; a clock
// only paces the test.
module tb_ss_issue;
  import perm_pkg::*;
  import perm_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  [1:0] valid;
  slot_t [1:0] inst, bundle;
  logic  [1:0] take;
  logic        dual, err;
  int checks = 0, failures = 0;
  int n_pair = 0, n_wait = 0, n_dual_alu = 0, n_split = 0, n_err = 0;

  ss_issue dut (.valid_i(valid), .inst_i(inst), .bundle_o(bundle), .take_o(take),
                .dual_o(dual), .err_o(err));

  // expected (bundle, take, err) from the issue rules
  task automatic expect_issue(string what);
    slot_t [1:0] eb;
    logic  [1:0] et;
    logic        ee;
    logic        ct0, pm0, alu0, alu1, part, dep;
    eb = '0; et = 2'd0; ee = 1'b0;
    ct0  = inst[0].op == OP_BFLY_CT || inst[0].op == OP_IBFLY_CT;
    pm0  = inst[0].op == OP_BFLY || inst[0].op == OP_IBFLY;
    alu0 = inst[0].op >= OP_ADD && inst[0].op <= OP_ROR;
    alu1 = inst[1].op >= OP_ADD && inst[1].op <= OP_ROR;
    part = valid[1] && op_e'(inst[0].op + 4'd1) == inst[1].op && ct0;
    dep  = inst[1].rs1 == inst[0].rd || inst[1].rs2 == inst[0].rd;
    if (valid[0]) begin
      if (ct0 && part)         begin eb = inst; et = 2; n_pair++; end
      else if (ct0 && valid[1]) begin ee = 1; et = 1; end
      else if (ct0)            begin et = 0; n_wait++; end
      else if (pm0)            begin ee = 1; et = 1; end
      else if (alu0) begin
        eb[0] = inst[0];
        if (valid[1] && alu1 && !dep) begin eb[1] = inst[1]; et = 2; n_dual_alu++; end
        else begin et = 1; if (valid[1] && alu1) n_split++; end
      end else et = 1;
    end
    if (ee) n_err++;
    @(posedge clk);
    checks++;
    if (bundle !== eb || take !== et || err !== ee || dual !== (et == 2 && !ee)) begin
      failures++;
      $display("FAIL %s: in0=%p in1=%p v=%b got take=%0d err=%b dual=%b", what,
               inst[0], inst[1], valid, take, err, dual);
    end
  endtask

  task automatic set(logic v0, slot_t a, logic v1, slot_t b);
    valid = {v1, v0};
    inst[0] = a;
    inst[1] = b;
  endtask

  initial begin
    set(1, mk(OP_BFLY_CT, 0, 11, 12), 1, mk(OP_BFLY, 1, 1, 13));   expect_issue("BFLY pair");
    set(1, mk(OP_IBFLY_CT, 0, 14, 15), 1, mk(OP_IBFLY, 1, 1, 16)); expect_issue("IBFLY pair");
    set(1, mk(OP_BFLY_CT, 0, 11, 12), 0, mk(OP_BFLY, 1, 1, 13));   expect_issue("partner not fetched");
    set(1, mk(OP_ADD, 3, 1, 2), 1, mk(OP_SUB, 4, 5, 6));           expect_issue("independent ALU");
    set(1, mk(OP_ADD, 3, 1, 2), 1, mk(OP_SUB, 4, 3, 6));           expect_issue("RAW on rs1");
    set(1, mk(OP_ADD, 3, 1, 2), 1, mk(OP_SUB, 4, 6, 3));           expect_issue("RAW on rs2");
    set(1, mk(OP_ADD, 3, 1, 2), 1, mk(OP_BFLY_CT, 0, 6, 7));       expect_issue("ALU then ct1");
    set(1, mk(OP_BFLY_CT, 0, 1, 2), 1, mk(OP_IBFLY, 3, 3, 4));     expect_issue("wrong partner");
    set(1, mk(OP_IBFLY, 3, 3, 4), 1, mk(OP_ADD, 3, 1, 2));         expect_issue("lone IBFLY");
    set(1, mk(OP_NOP, 0, 0, 0), 1, mk(OP_ADD, 3, 1, 2));           expect_issue("NOP");
    set(0, mk(OP_ADD, 3, 1, 2), 1, mk(OP_ADD, 4, 1, 2));           expect_issue("empty");
    for (int n = 0; n < 2000; n++) begin
      slot_t a, b;
      a = mk(op_e'($urandom_range(13, 0)), int'($urandom_range(7, 0)), int'($urandom_range(7, 0)), int'($urandom_range(7, 0)));
      b = mk(op_e'($urandom_range(13, 0)), int'($urandom_range(7, 0)), int'($urandom_range(7, 0)), int'($urandom_range(7, 0)));
      if ($urandom_range(3, 0) == 0) begin a.op = OP_BFLY_CT; b.op = OP_BFLY; end
      set(1'($urandom_range(7, 0) != 0), a, 1'($urandom_range(7, 0) != 0), b);
      expect_issue("random");
    end
    $display("pairs=%0d waits=%0d dual_alu=%0d split=%0d errors=%0d", n_pair, n_wait, n_dual_alu, n_split, n_err);
    checks++;
    if (n_pair == 0 || n_wait == 0 || n_dual_alu == 0 || n_split == 0 || n_err == 0) failures++;
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
