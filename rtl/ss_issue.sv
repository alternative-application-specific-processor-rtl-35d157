// ss_issue: issue logic of the 2-way superscalar permutation method.
//
// The superscalar method runs ordinary two-operand instructions on the same
// two-ALU, four-read-port datapath as the VLIW method (vliw_datapath), but
// the pairing is found at run time. Each cycle this block looks at the two
// oldest fetched instructions, inst_i[0] (older) and inst_i[1], and forms
// the word for the datapath:
//   * BFLY.ct1 followed by its BFLY (or IBFLY.ct1 by its IBFLY) always issue
//     together, as the permutation units need all four operands at once;
//     a .ct1 whose partner has not been fetched yet waits (nothing issues);
//   * two ALU instructions issue together when the younger one does not
//     read the older one's destination; results of earlier cycles reach
//     both through the datapath's bypass, so no other check is needed;
//     the datapath's slot-1-wins write priority keeps program order when
//     both write one register;
//   * otherwise the older instruction issues alone in slot 0.
// A .ct1 followed by anything but its partner, or a BFLY/IBFLY with no .ct1
// before it, is dropped and err_o raised. take_o tells the fetch buffer how
// many instructions (0, 1 or 2) were consumed this cycle. Purely
// combinational.
//
// From the document: issuing the pair in the same cycle and running two ALU
// instructions in parallel. This design's own: the dependency rule, waiting
// for a missing partner and dropping malformed pairs.
module ss_issue
  import perm_pkg::*;
(
  input  logic  [1:0] valid_i,    // inst_i[k] holds a fetched instruction
  input  slot_t [1:0] inst_i,
  output slot_t [1:0] bundle_o,   // to vliw_datapath
  output logic  [1:0] take_o,     // instructions consumed: 0, 1 or 2
  output logic        dual_o,     // two instructions issued together
  output logic        err_o
);
  localparam slot_t NOP = '{op: OP_NOP, rd: '0, rs1: '0, rs2: '0};

  logic i0_ct, i0_perm, i1_partner, independent;

  assign i0_ct      = inst_i[0].op inside {OP_BFLY_CT, OP_IBFLY_CT};
  assign i0_perm    = inst_i[0].op inside {OP_BFLY, OP_IBFLY};
  assign i1_partner = valid_i[1] &&
                      ((inst_i[0].op == OP_BFLY_CT  && inst_i[1].op == OP_BFLY) ||
                       (inst_i[0].op == OP_IBFLY_CT && inst_i[1].op == OP_IBFLY));
  assign independent = inst_i[1].rs1 != inst_i[0].rd && inst_i[1].rs2 != inst_i[0].rd;

  always_comb begin
    bundle_o = {NOP, NOP};
    take_o   = 2'd0;
    dual_o   = 1'b0;
    err_o    = 1'b0;
    if (valid_i[0]) begin
      if (i0_ct) begin
        if (i1_partner) begin
          bundle_o = inst_i;
          take_o   = 2'd2;
          dual_o   = 1'b1;
        end else if (valid_i[1]) begin
          err_o  = 1'b1;           // .ct1 not followed by its partner
          take_o = 2'd1;
        end
      end else if (i0_perm) begin
        err_o  = 1'b1;             // second half without a first
        take_o = 2'd1;
      end else if (is_alu_op(inst_i[0].op)) begin
        bundle_o[0] = inst_i[0];
        if (valid_i[1] && is_alu_op(inst_i[1].op) && independent) begin
          bundle_o[1] = inst_i[1];
          take_o      = 2'd2;
          dual_o      = 1'b1;
        end else begin
          take_o = 2'd1;
        end
      end else begin
        take_o = 2'd1;             // OP_NOP
      end
    end
  end

endmodule
