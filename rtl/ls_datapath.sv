// ls_datapath: single-issue datapath of the LdState method.
//
// An ordinary processor datapath with two register read ports and one ALU,
// plus a butterfly and an inverse butterfly permutation unit that each keep
// the configuration of their first four stages in internal registers
// (ldstate_pu: C1/C2 and C4/C5). Every instruction therefore needs only two
// source operands (ls_instr_t, inv picks the unit):
//   LS_LDSTATE  LdState.bfly/.ibfly Rc1, Rc2: load the unit's two registers
//   LS_PERM     BFLY/IBFLY Rd, Rs, Rc3: permute Rs with the stored stages and
//               Rc3 for the last two stages
//   LS_MOVE     MovePUtoGR Rd: copy C1 or C2 (C4 or C5) into a general
//               register, to save the state on a context switch
//   LS_ALU      the usual ALU operation
// A permutation from scratch is LdState.bfly, BFLY, LdState.ibfly, IBFLY:
// four instructions, four cycles; repeating it needs only BFLY and IBFLY.
//
// Timing as in the other datapaths: read and execute in the issue cycle,
// result in the write-back stage (wb_*_o) the cycle after, register file
// written at the following edge, bypass from the write-back stage to both
// source buses. LdState updates the internal registers at the end of its
// cycle, so the next instruction already uses them. Register writes at one
// edge: write-back over memory.
//
// From the document: the units with internal registers, the four
// instructions and their operands, two read ports. This design's own: the
// instruction fields, the pipeline and the write priority.
module ls_datapath
  import perm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  ls_instr_t instr_i,     // kind LS_NOP when nothing issues
  input  logic      mem_we_i,
  input  ridx_t     mem_waddr_i,
  input  word_t     mem_wdata_i,
  output logic      wb_valid_o,
  output ridx_t     wb_rd_o,
  output word_t     wb_data_o
);
  word_t [1:0] rf_rdata, src;
  logic        wb_valid_q;
  ridx_t       wb_rd_q;
  word_t       wb_data_q;

  always_comb begin
    src[0] = (wb_valid_q && wb_rd_q == instr_i.rs1) ? wb_data_q : rf_rdata[0];
    src[1] = (wb_valid_q && wb_rd_q == instr_i.rs2) ? wb_data_q : rf_rdata[1];
  end

  word_t  alu_y, bfly_res, ibfly_res, ex_data;
  pu_op_e pu_op;
  logic   ex_we;

  alu #(.W(XLEN)) u_alu (.op_i(instr_i.alu_op), .a_i(src[0]), .b_i(src[1]), .y_o(alu_y));

  always_comb begin
    unique case (instr_i.kind)
      LS_LDSTATE: pu_op = PU_LD;
      LS_PERM:    pu_op = PU_PERM;
      LS_MOVE:    pu_op = PU_MV;
      default:    pu_op = PU_NONE;
    endcase
  end

  ldstate_pu #(.N(XLEN), .INVERSE(1'b0)) u_pu_bfly (
    .clk(clk), .rst_n(rst_n), .op_i(instr_i.inv ? PU_NONE : pu_op), .mv_sel_i(instr_i.sel),
    .a_i(src[0]), .b_i(src[1]), .res_o(bfly_res));

  ldstate_pu #(.N(XLEN), .INVERSE(1'b1)) u_pu_ibfly (
    .clk(clk), .rst_n(rst_n), .op_i(instr_i.inv ? pu_op : PU_NONE), .mv_sel_i(instr_i.sel),
    .a_i(src[0]), .b_i(src[1]), .res_o(ibfly_res));

  always_comb begin
    ex_we   = instr_i.kind inside {LS_ALU, LS_PERM, LS_MOVE};
    ex_data = (instr_i.kind == LS_ALU) ? alu_y : (instr_i.inv ? ibfly_res : bfly_res);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid_q <= 1'b0;
      wb_rd_q    <= '0;
      wb_data_q  <= '0;
    end else begin
      wb_valid_q <= ex_we;
      wb_rd_q    <= instr_i.rd;
      wb_data_q  <= ex_data;
    end
  end

  regfile #(.NREGS(NREGS), .W(XLEN), .NR(2), .NW(2)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .raddr_i({instr_i.rs2, instr_i.rs1}),
    .rdata_o(rf_rdata),
    .we_i   ({wb_valid_q, mem_we_i}),
    .waddr_i({wb_rd_q, mem_waddr_i}),
    .wdata_i({wb_data_q, mem_wdata_i})
  );

  assign wb_valid_o = wb_valid_q;
  assign wb_rd_o    = wb_rd_q;
  assign wb_data_o  = wb_data_q;

endmodule
