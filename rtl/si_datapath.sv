// si_datapath: single-issue datapath with one ALU and (4,1) permutation units.
//
// This is the datapath shared by the register-pair, two-length-instruction
// and bundled-instruction methods. A four-port register file drives four
// source buses. The ALU uses the first two. The butterfly and inverse
// butterfly units take all four: bus 0 carries the data Rs, buses 1-3 the
// configuration operands Rc1, Rc2, Rc3. One op4_t operation is accepted per
// cycle on op_i, already gathered by a front end (si_frontend).
//
// Timing is that of vliw_datapath: read and execute in one cycle, result in
// the write-back stage (wb_*_o) during the next cycle, register file written
// at the edge after that, and a bypass from the write-back stage to all four
// buses. So BFLY followed by IBFLY on the same register completes in two
// cycles. Register writes at one edge: write-back over memory.
//
// From the document: four read ports and four source buses with bypasses,
// one ALU, the two (4,1) units and the memory path. This design's own: the
// op4_t form of an operation, the write-back stage and the write priority.
module si_datapath
  import perm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  op4_t  op_i,          // OP_NOP when nothing issues
  input  logic  mem_we_i,
  input  ridx_t mem_waddr_i,
  input  word_t mem_wdata_i,
  output logic  wb_valid_o,
  output ridx_t wb_rd_o,
  output word_t wb_data_o
);
  word_t [3:0] rf_rdata, src;
  logic        wb_valid_q;
  ridx_t       wb_rd_q;
  word_t       wb_data_q;

  // bypass from the write-back stage to the four source buses
  always_comb begin
    for (int k = 0; k < 4; k++)
      src[k] = (wb_valid_q && wb_rd_q == op_i.rs[k]) ? wb_data_q : rf_rdata[k];
  end

  word_t alu_y, bfly_y, ibfly_y, ex_data;

  alu #(.W(XLEN)) u_alu (
    .op_i(to_alu_op(op_i.op)), .a_i(src[0]), .b_i(src[1]), .y_o(alu_y));

  bfly_net  #(.N(XLEN), .NCFG(3)) u_bfly (
    .data_i(src[0]), .cfg_i({src[3], src[2], src[1]}), .data_o(bfly_y));
  ibfly_net #(.N(XLEN), .NCFG(3)) u_ibfly (
    .data_i(src[0]), .cfg_i({src[3], src[2], src[1]}), .data_o(ibfly_y));

  always_comb begin
    unique case (op_i.op)
      OP_BFLY:  ex_data = bfly_y;
      OP_IBFLY: ex_data = ibfly_y;
      default:  ex_data = alu_y;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid_q <= 1'b0;
      wb_rd_q    <= '0;
      wb_data_q  <= '0;
    end else begin
      wb_valid_q <= writes_rd(op_i.op);
      wb_rd_q    <= op_i.rd;
      wb_data_q  <= ex_data;
    end
  end

  regfile #(.NREGS(NREGS), .W(XLEN), .NR(4), .NW(2)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .raddr_i(op_i.rs),
    .rdata_o(rf_rdata),
    .we_i   ({wb_valid_q, mem_we_i}),
    .waddr_i({wb_rd_q, mem_waddr_i}),
    .wdata_i({wb_data_q, mem_wdata_i})
  );

  assign wb_valid_o = wb_valid_q;
  assign wb_rd_o    = wb_rd_q;
  assign wb_data_o  = wb_data_q;

  // The .ct1 halves never reach this datapath: the front end merges them.
  a_no_ct: assert property (@(posedge clk) disable iff (!rst_n)
                            !(op_i.op inside {OP_BFLY_CT, OP_IBFLY_CT}));

endmodule
