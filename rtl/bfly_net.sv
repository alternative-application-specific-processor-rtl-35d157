// bfly_net: N-input butterfly network, the BFLY (4,1) permutation unit.
//
// The network has log2(N) stages, each a row of N/2 two-input swap switches
// (a pair of 2:1 multiplexers). Stage positions are counted from the input:
// position p pairs bits i and i+d with d = N/2 >> p, so the first stage
// exchanges across the widest distance (32 for N = 64) and the last one
// between neighbours, as in the 8-input drawing of the document. A switch
// with configuration bit 1 swaps its two bits, with 0 it passes them.
//
// Configuration: NCFG = ceil(log2(N)/2) N-bit operands (three for N = 64),
// each configuring two consecutive stages: cfg_i[0] (Rc1) stages at
// positions 0,1, cfg_i[1] (Rc2) positions 2,3, cfg_i[2] (Rc3) positions 4,5. That grouping follows the document; the
// bit order inside an operand is this design's choice: the lower N/2 bits
// configure the first stage of the pair, the upper N/2 bits the second.
// Switch j of a stage with distance d joins bits i = (j/d)*2d + j%d and i+d.
//
// Purely combinational, one pass per cycle: the document's point is that a
// 6-stage butterfly is faster than a 64-bit ALU. Bit 0 is the least
// significant bit of every operand.
module bfly_net #(
  parameter int unsigned N    = 64,                   // bits permuted, a power of two >= 4
  parameter int unsigned NCFG = ($clog2(N) + 1) / 2   // configuration operands
) (
  input  logic [N-1:0]         data_i,
  input  logic [NCFG-1:0][N-1:0] cfg_i,   // [0]=Rc1, [1]=Rc2, [2]=Rc3
  output logic [N-1:0]      data_o
);
  localparam int unsigned S = $clog2(N);
  localparam int unsigned H = N / 2;

  // Stage-wise control: N/2 bits per stage, taken from the operand pairs.
  logic [S-1:0][H-1:0] stage_cfg;
  logic [S:0][N-1:0]   lvl;

  always_comb begin
    for (int p = 0; p < S; p++)
      stage_cfg[p] = (p % 2 == 0) ? cfg_i[p/2][H-1:0] : cfg_i[p/2][N-1:H];
  end

  assign lvl[0] = data_i;

  for (genvar p = 0; p < S; p++) begin : g_stage
    localparam int unsigned D = H >> p;   // exchange distance of this stage
    for (genvar j = 0; j < H; j++) begin : g_sw
      localparam int unsigned LO = (j / D) * 2 * D + (j % D);
      localparam int unsigned HI = LO + D;
      assign lvl[p+1][LO] = stage_cfg[p][j] ? lvl[p][HI] : lvl[p][LO];
      assign lvl[p+1][HI] = stage_cfg[p][j] ? lvl[p][LO] : lvl[p][HI];
    end
  end

  assign data_o = lvl[S];

endmodule
