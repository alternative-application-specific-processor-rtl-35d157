// perm_pkg: types and constants shared by the bit-permutation ASIP.
//
// The machine is a 64-bit processor with 32 general registers. Besides the
// usual ALU operations it has the BFLY and IBFLY permutation instructions: a
// BFLY routes the 64 bits of a data register through a 6-stage butterfly
// network, an IBFLY through a 6-stage inverse butterfly network. Each network
// needs 3 x 64 configuration bits, so a permutation instruction has four
// 64-bit source operands. In the VLIW form used here the four operands come
// from a pair of ordinary two-source instructions issued in the same long
// instruction word: BFLY.ct1 Rc1,Rc2 together with BFLY Rd,Rs,Rc3 (and
// IBFLY.ct1 with IBFLY). The 64-bit word, the 6 stages and the 32 registers
// are the document's numbers; the operation list and its encoding are this
// design's own choice (the document gives no instruction encoding).
package perm_pkg;

  localparam int unsigned XLEN   = 64;            // data path width
  localparam int unsigned NREGS  = 32;            // general registers
  localparam int unsigned RIDX_W = $clog2(NREGS); // register specifier width

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  // Operations of one VLIW slot (one "regular" instruction).
  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_ADD      = 4'd1,   // rd = rs1 + rs2
    OP_SUB      = 4'd2,   // rd = rs1 - rs2
    OP_AND      = 4'd3,
    OP_OR       = 4'd4,
    OP_XOR      = 4'd5,
    OP_SLL      = 4'd6,   // shift left logical by rs2[5:0]
    OP_SRL      = 4'd7,   // shift right logical by rs2[5:0]
    OP_ROL      = 4'd8,   // rotate left by rs2[5:0]
    OP_ROR      = 4'd9,   // rotate right by rs2[5:0]
    OP_BFLY_CT  = 4'd10,  // BFLY.ct1  Rc1(rs1), Rc2(rs2); writes nothing
    OP_BFLY     = 4'd11,  // BFLY  Rd, Rs(rs1), Rc3(rs2)
    OP_IBFLY_CT = 4'd12,  // IBFLY.ct1 Rc1(rs1), Rc2(rs2); writes nothing
    OP_IBFLY    = 4'd13   // IBFLY Rd, Rs(rs1), Rc3(rs2)
  } op_e;

  // One slot of a long instruction word, already decoded.
  typedef struct packed {
    op_e   op;
    ridx_t rd;
    ridx_t rs1;
    ridx_t rs2;
  } slot_t;

  // A four-source operation as executed by the single-issue datapath, after
  // the front end has gathered its operands. ALU operations use rs[0], rs[1];
  // OP_BFLY / OP_IBFLY use rs[0] = Rs (data), rs[1] = Rc1, rs[2] = Rc2,
  // rs[3] = Rc3.
  typedef struct packed {
    op_e         op;
    ridx_t       rd;
    ridx_t [3:0] rs;
  } op4_t;

  // An instruction as fetched, before operand gathering. Which fields a
  // permutation instruction uses depends on the method (si_method_e):
  //   register pair : BFLY rd, rs1, rs2       (Rs=rs1, Rc1=rs2, Rc2=rs2+1, Rc3=rs1+1)
  //   two-length v1 : BFLY rd, rs1, rs2, rs3, rs4 (Rs, Rc1, Rc2, Rc3)
  //   two-length v2 : BFLY rd, rs1, rs2, rs3  (Rs=rd, Rc1, Rc2, Rc3)
  //   bundled       : BFLY.ct1 rs1, rs2 followed by BFLY rd, rs1, rs2
  typedef struct packed {
    op_e   op;
    ridx_t rd;
    ridx_t rs1;
    ridx_t rs2;
    ridx_t rs3;
    ridx_t rs4;
  } finstr_t;

  // How a single-issue processor supplies the four permutation operands.
  typedef enum logic [1:0] {
    M_REGPAIR = 2'd0,
    M_TWOLEN1 = 2'd1,
    M_TWOLEN2 = 2'd2,
    M_BUNDLED = 2'd3
  } si_method_e;

  // ALU operation select (a subset of op_e, re-encoded for the ALU).
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_SUB = 4'd1,
    ALU_AND = 4'd2,
    ALU_OR  = 4'd3,
    ALU_XOR = 4'd4,
    ALU_SLL = 4'd5,
    ALU_SRL = 4'd6,
    ALU_ROL = 4'd7,
    ALU_ROR = 4'd8
  } alu_op_e;

  // Operations of a permutation unit with internal registers (LdState).
  typedef enum logic [1:0] {
    PU_NONE = 2'd0,   // idle, result 0
    PU_LD   = 2'd1,   // LdState: load both internal registers
    PU_PERM = 2'd2,   // BFLY / IBFLY with the stored first four stages
    PU_MV   = 2'd3    // MovePUtoGR: read one internal register
  } pu_op_e;

  // Instruction of the two-read-port LdState processor (ls_datapath).
  typedef enum logic [2:0] {
    LS_NOP     = 3'd0,
    LS_ALU     = 3'd1,   // rd = alu_op(rs1, rs2)
    LS_LDSTATE = 3'd2,   // LdState.bfly / LdState.ibfly rs1 (Rc1), rs2 (Rc2)
    LS_PERM    = 3'd3,   // BFLY / IBFLY rd, rs1 (Rs), rs2 (Rc3)
    LS_MOVE    = 3'd4    // MovePUtoGR rd <- C1/C2 (or C4/C5), chosen by sel
  } ls_kind_e;

  typedef struct packed {
    ls_kind_e kind;
    alu_op_e  alu_op;
    logic     inv;       // 1: the inverse butterfly unit (IBFLY, C4/C5)
    logic     sel;       // LS_MOVE: 0 = C1/C4, 1 = C2/C5
    ridx_t    rd;
    ridx_t    rs1;
    ridx_t    rs2;
  } ls_instr_t;

  // True for operations executed by an ALU.
  function automatic logic is_alu_op(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR,
                      OP_SLL, OP_SRL, OP_ROL, OP_ROR};
  endfunction

  function automatic alu_op_e to_alu_op(op_e op);
    unique case (op)
      OP_SUB:  return ALU_SUB;
      OP_AND:  return ALU_AND;
      OP_OR:   return ALU_OR;
      OP_XOR:  return ALU_XOR;
      OP_SLL:  return ALU_SLL;
      OP_SRL:  return ALU_SRL;
      OP_ROL:  return ALU_ROL;
      OP_ROR:  return ALU_ROR;
      default: return ALU_ADD;
    endcase
  endfunction

  // True for operations that write a result register.
  function automatic logic writes_rd(op_e op);
    return is_alu_op(op) || op == OP_BFLY || op == OP_IBFLY;
  endfunction

endpackage
