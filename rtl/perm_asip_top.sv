// perm_asip_top: fast arbitrary 64-bit bit permutations in an ASIP.
//
// An arbitrary permutation of a 64-bit register is a BFLY (6-stage
// butterfly) followed by an IBFLY (6-stage inverse butterfly); each needs
// four 64-bit source operands. This top holds one machine for each way of
// supplying them, side by side, each with its own ports and sharing only
// clock and reset:
//
//  * u_vliw (vliw_datapath), the main design: two-slot long instruction
//    words on a four-read-port datapath with two ALUs. A permutation is the
//    words {BFLY.ct1; BFLY} then {IBFLY.ct1; IBFLY}: two cycles. Of the
//    methods compared this one matches superscalar speed with the simplest
//    control.
//  * u_vliw_tp (vliw_datapath, NSLOT = 4), the throughput configuration of
//    the VLIW method: two long words per cycle on eight read ports, so the
//    BFLY pair of one permutation and the IBFLY pair of another run in the
//    same cycle and a stream of permutations completes one per cycle.
//  * u_ss_issue + u_ss_dp, the 2-way superscalar method: the same datapath,
//    fed by issue logic (ss_issue) that pairs instructions at run time.
//  * u_si_fe + u_si_dp, the single-issue datapath with one ALU and four read
//    ports, with the front end (si_frontend) set by SI_METHOD to register
//    pairs, one of the two long-instruction formats, or two-instruction
//    bundles. With the default M_TWOLEN1 the bundle buffer is unused and
//    si_pending_o stays 0.
//  * u_ls (ls_datapath), the LdState method: a single-issue datapath with
//    two read ports whose butterfly and inverse butterfly units keep four
//    stages' configuration in internal registers (LdState, MovePUtoGR).
//
// Instruction fetch and the memory are not part of the design: decoded
// instructions enter on the *_i instruction ports and memory data through
// each machine's mem write port. Timing is that of the sub-blocks: results
// of all four machines appear on their wb ports one cycle after issue.
module perm_asip_top
  import perm_pkg::*;
#(
  parameter si_method_e SI_METHOD = M_TWOLEN1   // operand method of the single-issue machine
) (
  input  logic          clk,
  input  logic          rst_n,
  // VLIW datapath
  input  slot_t [1:0]   bundle_i,
  output logic          bundle_err_o,
  input  logic          mem_we_i,
  input  ridx_t         mem_waddr_i,
  input  word_t         mem_wdata_i,
  output logic  [1:0]   wb_valid_o,
  output ridx_t [1:0]   wb_rd_o,
  output word_t [1:0]   wb_data_o,
  output logic          wb_bfly_o,
  output logic          wb_ibfly_o,
  // VLIW machine issuing two long words (four slots) per cycle
  input  slot_t [3:0]   tp_bundle_i,
  output logic          tp_bundle_err_o,
  input  logic          tp_mem_we_i,
  input  ridx_t         tp_mem_waddr_i,
  input  word_t         tp_mem_wdata_i,
  output logic  [3:0]   tp_wb_valid_o,
  output ridx_t [3:0]   tp_wb_rd_o,
  output word_t [3:0]   tp_wb_data_o,
  output logic          tp_wb_bfly_o,
  output logic          tp_wb_ibfly_o,
  // 2-way superscalar machine
  input  logic  [1:0]   ss_valid_i,
  input  slot_t [1:0]   ss_inst_i,
  output logic  [1:0]   ss_take_o,
  output logic          ss_dual_o,
  output logic          ss_err_o,
  input  logic          ss_mem_we_i,
  input  ridx_t         ss_mem_waddr_i,
  input  word_t         ss_mem_wdata_i,
  output logic  [1:0]   ss_wb_valid_o,
  output ridx_t [1:0]   ss_wb_rd_o,
  output word_t [1:0]   ss_wb_data_o,
  output logic          ss_wb_bfly_o,
  output logic          ss_wb_ibfly_o,
  // single-issue machine
  input  logic          si_valid_i,
  input  finstr_t       si_instr_i,
  output logic          si_err_o,
  output logic          si_pending_o,
  input  logic          si_mem_we_i,
  input  ridx_t         si_mem_waddr_i,
  input  word_t         si_mem_wdata_i,
  output logic          si_wb_valid_o,
  output ridx_t         si_wb_rd_o,
  output word_t         si_wb_data_o,
  // LdState machine
  input  ls_instr_t     ls_instr_i,
  input  logic          ls_mem_we_i,
  input  ridx_t         ls_mem_waddr_i,
  input  word_t         ls_mem_wdata_i,
  output logic          ls_wb_valid_o,
  output ridx_t         ls_wb_rd_o,
  output word_t         ls_wb_data_o
);

  vliw_datapath u_vliw (
    .clk         (clk),
    .rst_n       (rst_n),
    .bundle_i    (bundle_i),
    .bundle_err_o(bundle_err_o),
    .mem_we_i    (mem_we_i),
    .mem_waddr_i (mem_waddr_i),
    .mem_wdata_i (mem_wdata_i),
    .wb_valid_o  (wb_valid_o),
    .wb_rd_o     (wb_rd_o),
    .wb_data_o   (wb_data_o),
    .wb_bfly_o   (wb_bfly_o),
    .wb_ibfly_o  (wb_ibfly_o)
  );

  // ---- VLIW, two long words per cycle
  vliw_datapath #(.NSLOT(4)) u_vliw_tp (
    .clk         (clk),
    .rst_n       (rst_n),
    .bundle_i    (tp_bundle_i),
    .bundle_err_o(tp_bundle_err_o),
    .mem_we_i    (tp_mem_we_i),
    .mem_waddr_i (tp_mem_waddr_i),
    .mem_wdata_i (tp_mem_wdata_i),
    .wb_valid_o  (tp_wb_valid_o),
    .wb_rd_o     (tp_wb_rd_o),
    .wb_data_o   (tp_wb_data_o),
    .wb_bfly_o   (tp_wb_bfly_o),
    .wb_ibfly_o  (tp_wb_ibfly_o)
  );

  // ---- superscalar: run-time pairing in front of the same datapath
  slot_t [1:0] ss_bundle;
  logic        ss_bundle_err;

  ss_issue u_ss_issue (
    .valid_i (ss_valid_i),
    .inst_i  (ss_inst_i),
    .bundle_o(ss_bundle),
    .take_o  (ss_take_o),
    .dual_o  (ss_dual_o),
    .err_o   (ss_err_o)
  );

  vliw_datapath u_ss_dp (
    .clk         (clk),
    .rst_n       (rst_n),
    .bundle_i    (ss_bundle),
    .bundle_err_o(ss_bundle_err),   // never set: ss_issue forms legal words only
    .mem_we_i    (ss_mem_we_i),
    .mem_waddr_i (ss_mem_waddr_i),
    .mem_wdata_i (ss_mem_wdata_i),
    .wb_valid_o  (ss_wb_valid_o),
    .wb_rd_o     (ss_wb_rd_o),
    .wb_data_o   (ss_wb_data_o),
    .wb_bfly_o   (ss_wb_bfly_o),
    .wb_ibfly_o  (ss_wb_ibfly_o)
  );

  a_ss_legal: assert property (@(posedge clk) !ss_bundle_err);

  // ---- single issue: operand gathering, then the one-ALU datapath
  op4_t si_op;

  si_frontend #(.METHOD(SI_METHOD)) u_si_fe (
    .clk          (clk),
    .rst_n        (rst_n),
    .instr_valid_i(si_valid_i),
    .instr_i      (si_instr_i),
    .op_o         (si_op),
    .err_o        (si_err_o),
    .pending_o    (si_pending_o)
  );

  si_datapath u_si_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .op_i       (si_op),
    .mem_we_i   (si_mem_we_i),
    .mem_waddr_i(si_mem_waddr_i),
    .mem_wdata_i(si_mem_wdata_i),
    .wb_valid_o (si_wb_valid_o),
    .wb_rd_o    (si_wb_rd_o),
    .wb_data_o  (si_wb_data_o)
  );

  // ---- LdState machine
  ls_datapath u_ls (
    .clk        (clk),
    .rst_n      (rst_n),
    .instr_i    (ls_instr_i),
    .mem_we_i   (ls_mem_we_i),
    .mem_waddr_i(ls_mem_waddr_i),
    .mem_wdata_i(ls_mem_wdata_i),
    .wb_valid_o (ls_wb_valid_o),
    .wb_rd_o    (ls_wb_rd_o),
    .wb_data_o  (ls_wb_data_o)
  );

endmodule
