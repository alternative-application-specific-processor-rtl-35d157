// regfile: general register file with several read and write ports.
//
// The document's four-source permutation instructions need four register
// read ports, feeding four source buses; the VLIW datapath also has two
// result buses and a path from memory into the register file. This register
// file therefore has NR combinational read ports and NW write ports written
// on the rising clock edge. The number of registers (32) follows the
// document's example; the rest is this design's choice: a write is seen by
// the read ports only after the clock edge (the datapath bypasses results
// itself), when several write ports name the same register in one cycle the
// highest-numbered port wins, and reset clears every register to zero.
module regfile #(
  parameter int unsigned NREGS = 32,   // registers
  parameter int unsigned W     = 64,   // register width
  parameter int unsigned NR    = 4,    // read ports
  parameter int unsigned NW    = 3,    // write ports
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NR-1:0][AW-1:0] raddr_i,
  output logic [NR-1:0][W-1:0]  rdata_o,
  input  logic [NW-1:0]         we_i,
  input  logic [NW-1:0][AW-1:0] waddr_i,
  input  logic [NW-1:0][W-1:0]  wdata_i
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NW; p++)
        if (we_i[p]) regs[waddr_i[p]] <= wdata_i[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NR; p++) rdata_o[p] = regs[raddr_i[p]];
  end

endmodule
