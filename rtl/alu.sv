// alu: 64-bit arithmetic and logic unit of the permutation ASIP.
//
// Performs the word operations block ciphers use besides table lookups and
// permutations: add, subtract, AND, OR, XOR, logical shifts and rotations by
// the low log2(XLEN) bits of operand b. The document names the ALU (one in
// the single-issue datapath, two in the VLIW datapath) and lists these
// operation classes, but does not define an operation set; the list and its
// encoding (perm_pkg::alu_op_e) are this design's choice. Combinational, one
// result per cycle.
module alu
  import perm_pkg::*;
#(
  parameter int unsigned W = XLEN   // operand width, a power of two
) (
  input  alu_op_e      op_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] y_o
);
  localparam int unsigned SH_W = $clog2(W);

  logic [SH_W-1:0] sh;
  logic [W-1:0]    rol, ror;

  // A shift by W (when sh is 0) yields zero, so the OR keeps a_i unchanged.
  assign sh  = b_i[SH_W-1:0];
  assign rol = (a_i << sh) | (a_i >> (W - 32'(sh)));
  assign ror = (a_i >> sh) | (a_i << (W - 32'(sh)));

  always_comb begin
    unique case (op_i)
      ALU_ADD: y_o = a_i + b_i;
      ALU_SUB: y_o = a_i - b_i;
      ALU_AND: y_o = a_i & b_i;
      ALU_OR:  y_o = a_i | b_i;
      ALU_XOR: y_o = a_i ^ b_i;
      ALU_SLL: y_o = a_i << sh;
      ALU_SRL: y_o = a_i >> sh;
      ALU_ROL: y_o = rol;
      ALU_ROR: y_o = ror;
      default: y_o = '0;
    endcase
  end

endmodule
