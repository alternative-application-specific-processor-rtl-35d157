// ldstate_pu: permutation unit with internal configuration registers.
//
// This is the unit of the LdState method. It holds the configuration of the
// first four network stages in two internal N-bit registers (C1 and C2 for
// the butterfly unit, C4 and C5 for the inverse butterfly unit), so each
// instruction needs only the usual two source operands:
//   PU_LD   (LdState.bfly / LdState.ibfly Rc1, Rc2): C1 <= a_i, C2 <= b_i
//   PU_PERM (BFLY / IBFLY Rd, Rs, Rc3): res_o = network(a_i) configured by
//           C1 (stages 0,1), C2 (stages 2,3) and b_i (stages 4,5)
//   PU_MV   (MovePUtoGR): res_o = C1 when mv_sel_i is 0, C2 when it is 1,
//           so the state can be saved to general registers on a context
//           switch and reloaded later with PU_LD.
// INVERSE selects the inverse butterfly network instead of the butterfly.
// The two input buses and the stage grouping follow the document's drawing
// of the unit; the operation encoding, the mv_sel_i select and resetting the
// internal registers to zero (every switch passing straight through) are
// this design's choices. res_o is combinational; PU_LD takes effect at the
// rising clock edge, so a PU_PERM in the next cycle uses the new state.
module ldstate_pu
  import perm_pkg::*;
#(
  parameter int unsigned N       = 64,   // bits permuted
  parameter bit          INVERSE = 1'b0  // 0: butterfly, 1: inverse butterfly
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pu_op_e       op_i,      // PU_NONE, PU_LD, PU_PERM, PU_MV
  input  logic         mv_sel_i,  // internal register read by PU_MV
  input  logic [N-1:0] a_i,       // data / control bus (Rs or Rc1)
  input  logic [N-1:0] b_i,       // control bus (Rc3 or Rc2)
  output logic [N-1:0] res_o
);
  logic [N-1:0]      c1_q, c2_q;   // C1/C2 (or C4/C5)
  logic [2:0][N-1:0] cfg;
  logic [N-1:0]      perm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_q <= '0;
      c2_q <= '0;
    end else if (op_i == PU_LD) begin
      c1_q <= a_i;
      c2_q <= b_i;
    end
  end

  assign cfg = {b_i, c2_q, c1_q};

  if (INVERSE) begin : g_inv
    ibfly_net #(.N(N), .NCFG(3)) u_net (.data_i(a_i), .cfg_i(cfg), .data_o(perm));
  end else begin : g_fwd
    bfly_net  #(.N(N), .NCFG(3)) u_net (.data_i(a_i), .cfg_i(cfg), .data_o(perm));
  end

  always_comb begin
    unique case (op_i)
      PU_PERM: res_o = perm;
      PU_MV:   res_o = mv_sel_i ? c2_q : c1_q;
      default: res_o = '0;
    endcase
  end

endmodule
