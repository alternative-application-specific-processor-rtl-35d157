// perm_tb_pkg: reference models shared by the permutation testbenches.
//
// The models are written independently of the RTL: a network stage is
// described by bit arithmetic on each position (partner = i XOR d, switch
// number = position with bit log2(d) removed) instead of the RTL's
// generate-loop wiring. benes_route() computes, for any permutation of 64
// bits, the BFLY and IBFLY configuration operands that perform it, with the
// classic looping algorithm applied to the butterfly / inverse butterfly
// pair as a Benes network. Conventions (shared with the RTL documentation):
// stage p of an operand group uses operand p/2, lower half for even p, upper
// half for odd p; the butterfly's stage p has distance 32 >> p, the inverse
// butterfly's stage p distance 1 << p; a permutation src[] means
// out[k] = in[src[k]]. ref_word() is an architectural model of one VLIW
// long word of the datapath, written from its instruction definitions.
package perm_tb_pkg;
  import perm_pkg::*;

  typedef logic [63:0]      w64_t;
  typedef logic [2:0][63:0] cfg3_t;
  typedef int               perm_t [64];

  // One stage of distance d = 1 << b with 32 switch controls c.
  function automatic w64_t ref_stage(w64_t x, int b, logic [31:0] c);
    w64_t y = x;
    int   d = 1 << b;
    for (int i = 0; i < 64; i++) begin
      if (((i >> b) & 1) == 0) begin
        int j = ((i >> (b + 1)) << b) | (i & (d - 1));
        if (c[j]) begin
          y[i]     = x[i + d];
          y[i + d] = x[i];
        end
      end
    end
    return y;
  endfunction

  function automatic logic [31:0] stage_ctl(cfg3_t cfg, int p);
    return (p % 2 == 0) ? cfg[p / 2][31:0] : cfg[p / 2][63:32];
  endfunction

  function automatic w64_t ref_bfly(w64_t x, cfg3_t cfg);
    for (int p = 0; p < 6; p++) x = ref_stage(x, 5 - p, stage_ctl(cfg, p));
    return x;
  endfunction

  function automatic w64_t ref_ibfly(w64_t x, cfg3_t cfg);
    for (int p = 0; p < 6; p++) x = ref_stage(x, p, stage_ctl(cfg, p));
    return x;
  endfunction

  function automatic w64_t apply_perm(w64_t x, perm_t src);
    w64_t y;
    for (int k = 0; k < 64; k++) y[k] = x[src[k]];
    return y;
  endfunction

  function automatic void random_perm(output perm_t src);
    for (int k = 0; k < 64; k++) src[k] = k;
    for (int k = 63; k > 0; k--) begin
      int r = int'($urandom_range(k, 0));
      int t = src[k];
      src[k] = src[r];
      src[r] = t;
    end
  endfunction

  function automatic w64_t rand64();
    return {$urandom, $urandom};
  endfunction

  // Configure BFLY (bcfg) then IBFLY (icfg) so that
  // ref_ibfly(ref_bfly(x, bcfg), icfg) == apply_perm(x, src).
  function automatic void benes_route(input perm_t src,
                                      output cfg3_t bcfg, output cfg3_t icfg);
    int fw [64];     // signal now at input position x must reach output fw[x]
    int inv [64];
    int side [64];   // -1 unassigned, else 0/1
    int nfw [64];
    bcfg = '0;
    icfg = '0;
    for (int k = 0; k < 64; k++) fw[src[k]] = k;
    for (int lvl = 0; lvl < 6; lvl++) begin
      int b = 5 - lvl;
      int d = 1 << b;
      int bq = lvl;        // butterfly stage position
      int iq = 5 - lvl;    // inverse butterfly stage position
      for (int x = 0; x < 64; x++) begin
        inv[fw[x]] = x;
        side[x] = -1;
      end
      for (int x0 = 0; x0 < 64; x0++) begin
        if (side[x0] == -1) begin
          int x = x0;
          int s = 0;
          while (side[x] == -1) begin
            int y, x2;
            side[x]     = s;
            side[x ^ d] = 1 - s;
            // the partner input goes the other way; its output's partner
            // must then come from side s again
            y  = fw[x ^ d] ^ d;
            x2 = inv[y];
            x  = x2;
          end
        end
      end
      for (int x = 0; x < 64; x++) begin
        int lo = x & ~d;
        int j  = ((lo >> (b + 1)) << b) | (lo & (d - 1));
        int np = (x & ~d) | (side[x] << b);
        int y  = fw[x];
        if (((x >> b) & 1) == 0 && side[x] == 1) bcfg[bq / 2][(bq % 2) * 32 + j] = 1'b1;
        // output y receives from side side[x]; the switch swaps when its lower
        // output is fed from side 1
        if (((y >> b) & 1) == 0 && side[x] == 1) begin
          int jy = ((y >> (b + 1)) << b) | (y & (d - 1));
          icfg[iq / 2][(iq % 2) * 32 + jy] = 1'b1;
        end
        nfw[np] = (y & ~d) | (side[x] << b);
      end
      fw = nfw;
    end
  endfunction

  // ---------------------------------------------------------------------
  // Architectural model of one VLIW long word: both slots read the register
  // state left by all earlier words. Returns whether the word is legal and
  // each slot's write enable and value.
  typedef w64_t regs_t [32];

  function automatic w64_t ref_alu(op_e op, w64_t a, w64_t b);
    int s = int'(b[5:0]);
    w64_t r;
    case (op)
      OP_ADD: r = a + b;
      OP_SUB: r = a - b;
      OP_AND: r = a & b;
      OP_OR:  r = a | b;
      OP_XOR: r = a ^ b;
      OP_SLL: r = a << s;
      OP_SRL: r = a >> s;
      OP_ROL: r = (s == 0) ? a : ((a << s) | (a >> (64 - s)));
      OP_ROR: r = (s == 0) ? a : ((a >> s) | (a << (64 - s)));
      default: r = '0;
    endcase
    return r;
  endfunction

  function automatic logic ref_word(input regs_t rf, input slot_t s0, input slot_t s1,
                                    output logic [1:0] we, output w64_t res [2]);
    slot_t sl [2];
    int    m, c;
    logic  legal;
    sl[0] = s0; sl[1] = s1;
    we = '0; res[0] = '0; res[1] = '0;
    legal = 1'b1;
    begin
      int nb, nbc, ni, nic;
      nb  = int'(s0.op == OP_BFLY)     + int'(s1.op == OP_BFLY);
      nbc = int'(s0.op == OP_BFLY_CT)  + int'(s1.op == OP_BFLY_CT);
      ni  = int'(s0.op == OP_IBFLY)    + int'(s1.op == OP_IBFLY);
      nic = int'(s0.op == OP_IBFLY_CT) + int'(s1.op == OP_IBFLY_CT);
      legal = (nb == nbc) && (ni == nic);
    end
    if (!legal) return 1'b0;
    for (int k = 0; k < 2; k++) begin
      case (sl[k].op)
        OP_NOP, OP_BFLY_CT, OP_IBFLY_CT: ;
        OP_BFLY, OP_IBFLY: begin
          cfg3_t cfg;
          m = k; c = 1 - k;
          cfg = {rf[sl[m].rs2], rf[sl[c].rs2], rf[sl[c].rs1]};
          res[k] = (sl[k].op == OP_BFLY) ? ref_bfly(rf[sl[m].rs1], cfg)
                                         : ref_ibfly(rf[sl[m].rs1], cfg);
          we[k] = 1'b1;
        end
        default: begin
          res[k] = ref_alu(sl[k].op, rf[sl[k].rs1], rf[sl[k].rs2]);
          we[k] = 1'b1;
        end
      endcase
    end
    return 1'b1;
  endfunction

  function automatic slot_t mk(op_e op, int rd, int rs1, int rs2);
    slot_t s;
    s.op = op; s.rd = ridx_t'(rd); s.rs1 = ridx_t'(rs1); s.rs2 = ridx_t'(rs2);
    return s;
  endfunction

endpackage
