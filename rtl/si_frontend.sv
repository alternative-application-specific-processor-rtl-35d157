// si_frontend: operand gathering for the single-issue permutation methods.
//
// A single-issue processor with a four-port register file can give a
// BFLY/IBFLY its four source operands in several ways. This block turns one
// fetched instruction per cycle (finstr_t) into the four-source op4_t that
// si_datapath executes; METHOD selects the way:
//   M_REGPAIR  register pairs: BFLY Rd, Rs1, Rs2 permutes R[s1] with
//              configuration R[s2], R[s2+1], R[s1+1] (specifiers wrap mod 32)
//   M_TWOLEN1  long format with five specifiers: BFLY Rd, Rs, Rc1, Rc2, Rc3
//   M_TWOLEN2  long format, result over the data: BFLY Rd, Rc1, Rc2, Rc3
//              permutes R[d] in place
//   M_BUNDLED  two ordinary instructions, BFLY.ct1 Rc1, Rc2 then BFLY Rd, Rs,
//              Rc3. The .ct1 waits in a one-entry instruction buffer and
//              the pair executes as one operation when its second half
//              arrives. With one instruction fetched per cycle a full
//              permutation then takes four cycles.
// ALU instructions pass through in every method (sources rs1, rs2).
//
// Errors (err_o, the instruction becomes OP_NOP): a .ct1 outside M_BUNDLED;
// in M_BUNDLED, a BFLY/IBFLY with no buffered .ct1 of its kind, or anything
// but that BFLY/IBFLY after a buffered .ct1 (the buffered half is then
// dropped as well). Cycles with instr_valid_i low keep the buffer. Outside
// M_BUNDLED the buffer is never loaded and pending_o stays 0.
//
// From the document: the four operand forms, which registers a pair names,
// and the instruction buffer of the bundled method. This design's own: the
// finstr_t field use, wrap-around of R[s+1] and the error handling.
module si_frontend
  import perm_pkg::*;
#(
  parameter si_method_e METHOD = M_TWOLEN1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    instr_valid_i,
  input  finstr_t instr_i,
  output op4_t    op_o,
  output logic    err_o,
  output logic    pending_o      // a .ct1 waits in the buffer (M_BUNDLED)
);
  localparam op4_t NOP4 = '{op: OP_NOP, rd: '0, rs: '0};

  // bundle buffer
  logic  buf_valid_q;
  op_e   buf_op_q;
  ridx_t buf_rs1_q, buf_rs2_q;

  logic is_ct, is_perm, pair_ok;
  logic buf_load, buf_clear;

  assign is_ct   = instr_i.op inside {OP_BFLY_CT, OP_IBFLY_CT};
  assign is_perm = instr_i.op inside {OP_BFLY, OP_IBFLY};
  assign pair_ok = buf_valid_q &&
                   ((buf_op_q == OP_BFLY_CT  && instr_i.op == OP_BFLY) ||
                    (buf_op_q == OP_IBFLY_CT && instr_i.op == OP_IBFLY));

  always_comb begin
    op_o      = NOP4;
    err_o     = 1'b0;
    buf_load  = 1'b0;
    buf_clear = 1'b0;
    if (instr_valid_i) begin
      if (METHOD == M_BUNDLED && buf_valid_q) begin
        buf_clear = 1'b1;
        if (pair_ok) begin
          op_o.op = instr_i.op;
          op_o.rd = instr_i.rd;
          op_o.rs = {instr_i.rs2, buf_rs2_q, buf_rs1_q, instr_i.rs1};
        end else begin
          err_o = 1'b1;
        end
      end else if (is_ct) begin
        if (METHOD == M_BUNDLED) buf_load = 1'b1;
        else                     err_o    = 1'b1;
      end else if (is_perm) begin
        op_o.op = instr_i.op;
        op_o.rd = instr_i.rd;
        unique case (METHOD)
          M_REGPAIR: op_o.rs = {instr_i.rs1 + ridx_t'(1), instr_i.rs2 + ridx_t'(1),
                                instr_i.rs2, instr_i.rs1};
          M_TWOLEN1: op_o.rs = {instr_i.rs4, instr_i.rs3, instr_i.rs2, instr_i.rs1};
          M_TWOLEN2: op_o.rs = {instr_i.rs3, instr_i.rs2, instr_i.rs1, instr_i.rd};
          default: begin            // bundled, second half without a first
            op_o  = NOP4;
            err_o = 1'b1;
          end
        endcase
      end else if (is_alu_op(instr_i.op)) begin
        op_o.op = instr_i.op;
        op_o.rd = instr_i.rd;
        op_o.rs = {ridx_t'(0), ridx_t'(0), instr_i.rs2, instr_i.rs1};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_valid_q <= 1'b0;
      buf_op_q    <= OP_NOP;
      buf_rs1_q   <= '0;
      buf_rs2_q   <= '0;
    end else if (buf_load) begin
      buf_valid_q <= 1'b1;
      buf_op_q    <= instr_i.op;
      buf_rs1_q   <= instr_i.rs1;
      buf_rs2_q   <= instr_i.rs2;
    end else if (buf_clear) begin
      buf_valid_q <= 1'b0;
    end
  end

  assign pending_o = buf_valid_q;

endmodule
