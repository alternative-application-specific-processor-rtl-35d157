// vliw_datapath: VLIW datapath with butterfly permutation units.
//
// Each cycle the datapath executes one issued word of NSLOT slots. With the
// default NSLOT = 2 that is one long instruction word; NSLOT = 4 issues two
// long words per cycle. The two source specifiers of every slot address
// their own read ports of the register file (2*NSLOT ports), giving one
// 64-bit source bus each, and every slot has its own ALU. The butterfly and
// inverse butterfly (4,1) units get their four operands from a pair of
// instructions in the same long word (slots 2g and 2g+1 form long word g):
//   { BFLY.ct1 Rc1, Rc2 ; BFLY Rd, Rs, Rc3 }      (either slot order)
// the .ct1 slot supplies Rc1/Rc2 (stages 0-3), the BFLY slot supplies the
// data Rs and Rc3 (stages 4,5) and names Rd; the .ct1 slot writes nothing.
// A permutation is therefore a BFLY pair then an IBFLY pair and takes two
// cycles. With NSLOT = 4 a BFLY pair of one permutation and the IBFLY pair
// of another can issue together, so a stream of permutations completes one
// per cycle. An issued word is illegal when a long word holds an unpaired
// BFLY/IBFLY or .ct1, or two of them, or when more than one long word needs
// the same unit: bundle_err_o is raised and the whole word is dropped
// (nothing is written).
//
// Timing: operands are read and the word executed in one cycle; the results
// are held for one cycle in the write-back stage (wb_*_o) and written to the
// register file at the next edge. The bypass paths forward the write-back
// values to all source buses, so a word can use the results of the word
// right before it; the second half of a permutation reads the first half's
// result this way. Data from memory enters through the mem_* write port and
// is readable from the cycle after its edge. Register writes at one edge:
// the highest slot first, memory last.
//
// From the document: the four read ports and source buses, two ALUs, the
// two permutation units, the bypass paths, the memory path into the register
// file, the instruction pairing, and the wider issue (eight ports) for one
// permutation per cycle. This design's own choices: the slot encoding
// (perm_pkg::slot_t), one ALU per slot when NSLOT = 4, the one-stage
// write-back pipeline, dropping illegal words and the write priority.
module vliw_datapath
  import perm_pkg::*;
#(
  parameter int unsigned NSLOT = 2      // slots per issued word: 2 or 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // issued word, already decoded; OP_NOP slots do nothing
  input  slot_t [NSLOT-1:0]    bundle_i,
  output logic                 bundle_err_o,
  // write port for data arriving from memory
  input  logic                 mem_we_i,
  input  ridx_t                mem_waddr_i,
  input  word_t                mem_wdata_i,
  // write-back stage: results of the previous word, one per slot
  output logic  [NSLOT-1:0]    wb_valid_o,
  output ridx_t [NSLOT-1:0]    wb_rd_o,
  output word_t [NSLOT-1:0]    wb_data_o,
  // which unit produced a write-back result (for monitoring)
  output logic                 wb_bfly_o,
  output logic                 wb_ibfly_o
);
  localparam int unsigned NGRP = NSLOT / 2;   // long words per issued word
  localparam int unsigned NRD  = 2 * NSLOT;   // read ports and source buses

  // ---------------------------------------------------------------- read
  ridx_t [NRD-1:0] raddr;
  word_t [NRD-1:0] rf_rdata;
  word_t [NRD-1:0] src;    // the source buses, after the bypass

  always_comb begin
    for (int s = 0; s < NSLOT; s++) begin
      raddr[2*s]   = bundle_i[s].rs1;
      raddr[2*s+1] = bundle_i[s].rs2;
    end
  end

  // write-back stage registers
  logic  [NSLOT-1:0] wb_valid_q;
  ridx_t [NSLOT-1:0] wb_rd_q;
  word_t [NSLOT-1:0] wb_data_q;
  logic              wb_bfly_q, wb_ibfly_q;

  // bypass: the highest slot wins, as in the register file
  always_comb begin
    for (int k = 0; k < NRD; k++) begin
      src[k] = rf_rdata[k];
      for (int s = 0; s < NSLOT; s++)
        if (wb_valid_q[s] && wb_rd_q[s] == raddr[k])
          src[k] = wb_data_q[s];
    end
  end

  // ------------------------------------------------------------- execute
  word_t [NSLOT-1:0] alu_y;
  for (genvar s = 0; s < NSLOT; s++) begin : g_alu
    alu #(.W(XLEN)) u_alu (
      .op_i(to_alu_op(bundle_i[s].op)),
      .a_i (src[2*s]),
      .b_i (src[2*s+1]),
      .y_o (alu_y[s])
    );
  end

  // Pairing inside each long word g, and which long word feeds each unit.
  logic  [NGRP-1:0] grp_ok, has_b, has_i;
  word_t [NGRP-1:0] grp_data;
  word_t [NGRP-1:0][2:0] grp_cfg;
  logic  legal;

  always_comb begin
    for (int g = 0; g < NGRP; g++) begin
      int n_b, n_bc, n_i, n_ic;
      logic main_hi;                 // the BFLY/IBFLY is in slot 2g+1
      n_b = 0; n_bc = 0; n_i = 0; n_ic = 0;
      for (int s = 2 * g; s < 2 * g + 2; s++) begin
        n_b  += int'(bundle_i[s].op == OP_BFLY);
        n_bc += int'(bundle_i[s].op == OP_BFLY_CT);
        n_i  += int'(bundle_i[s].op == OP_IBFLY);
        n_ic += int'(bundle_i[s].op == OP_IBFLY_CT);
      end
      grp_ok[g] = (n_b == n_bc) && (n_i == n_ic);
      has_b[g]  = (n_b != 0);
      has_i[g]  = (n_i != 0);
      main_hi   = (bundle_i[2*g+1].op == OP_BFLY) || (bundle_i[2*g+1].op == OP_IBFLY);
      if (main_hi) begin
        grp_data[g]   = src[4*g+2];
        grp_cfg[g][2] = src[4*g+3];
        grp_cfg[g][0] = src[4*g];
        grp_cfg[g][1] = src[4*g+1];
      end else begin
        grp_data[g]   = src[4*g];
        grp_cfg[g][2] = src[4*g+1];
        grp_cfg[g][0] = src[4*g+2];
        grp_cfg[g][1] = src[4*g+3];
      end
    end
    legal = (&grp_ok) && ($countones(has_b) <= 1) && ($countones(has_i) <= 1);
  end

  word_t       bfly_data, ibfly_data, bfly_y, ibfly_y;
  word_t [2:0] bfly_cfg, ibfly_cfg;

  always_comb begin
    bfly_data  = grp_data[0];
    bfly_cfg   = grp_cfg[0];
    ibfly_data = grp_data[0];
    ibfly_cfg  = grp_cfg[0];
    for (int g = 1; g < NGRP; g++) begin
      if (has_b[g]) begin
        bfly_data = grp_data[g];
        bfly_cfg  = grp_cfg[g];
      end
      if (has_i[g]) begin
        ibfly_data = grp_data[g];
        ibfly_cfg  = grp_cfg[g];
      end
    end
  end

  bfly_net  #(.N(XLEN), .NCFG(3)) u_bfly  (.data_i(bfly_data),  .cfg_i(bfly_cfg),  .data_o(bfly_y));
  ibfly_net #(.N(XLEN), .NCFG(3)) u_ibfly (.data_i(ibfly_data), .cfg_i(ibfly_cfg), .data_o(ibfly_y));

  word_t [NSLOT-1:0] ex_data;
  logic  [NSLOT-1:0] ex_we;
  always_comb begin
    for (int s = 0; s < NSLOT; s++) begin
      ex_we[s] = legal && writes_rd(bundle_i[s].op);
      unique case (bundle_i[s].op)
        OP_BFLY:  ex_data[s] = bfly_y;
        OP_IBFLY: ex_data[s] = ibfly_y;
        default:  ex_data[s] = alu_y[s];
      endcase
    end
  end

  assign bundle_err_o = !legal;

  // ---------------------------------------------------------- write-back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid_q <= '0;
      wb_rd_q    <= '0;
      wb_data_q  <= '0;
      wb_bfly_q  <= 1'b0;
      wb_ibfly_q <= 1'b0;
    end else begin
      wb_valid_q <= ex_we;
      for (int s = 0; s < NSLOT; s++) begin
        wb_rd_q[s]   <= bundle_i[s].rd;
        wb_data_q[s] <= ex_data[s];
      end
      wb_bfly_q  <= legal && (|has_b);
      wb_ibfly_q <= legal && (|has_i);
    end
  end

  regfile #(.NREGS(NREGS), .W(XLEN), .NR(NRD), .NW(NSLOT + 1)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .raddr_i(raddr),
    .rdata_o(rf_rdata),
    .we_i   ({wb_valid_q, mem_we_i}),
    .waddr_i({wb_rd_q, mem_waddr_i}),
    .wdata_i({wb_data_q, mem_wdata_i})
  );

  assign wb_valid_o = wb_valid_q;
  assign wb_rd_o    = wb_rd_q;
  assign wb_data_o  = wb_data_q;
  assign wb_bfly_o  = wb_bfly_q;
  assign wb_ibfly_o = wb_ibfly_q;

  // An illegal word must leave the architectural state untouched.
  a_drop_illegal: assert property (@(posedge clk) disable iff (!rst_n)
                                   !legal |=> wb_valid_q == '0);

endmodule
