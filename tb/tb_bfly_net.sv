// tb_bfly_net: self-checking test of the 64-bit butterfly network.
// Checks the identity configuration, every single switch of every stage on
// its own, and random data/configuration pairs against the bit-level model
// of perm_tb_pkg. The network is combinational; a clock only paces the test
// and the watchdog.
module tb_bfly_net;
  import perm_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  w64_t  data, out;
  cfg3_t cfg;
  int    checks = 0, failures = 0;

  bfly_net #(.N(64)) dut (.data_i(data), .cfg_i(cfg), .data_o(out));

  task automatic check(string what);
    w64_t exp = ref_bfly(data, cfg);
    @(posedge clk);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: data=%h cfg=%h got=%h exp=%h", what, data, cfg, out, exp);
    end
  endtask

  initial begin
    data = 64'h0123_4567_89ab_cdef;
    cfg  = '0;
    check("identity");
    if (out !== data) failures++;
    checks++;
    // one switch at a time: exactly two bits, 32 >> p apart, exchanged
    for (int p = 0; p < 6; p++) begin
      for (int j = 0; j < 32; j += 7) begin
        cfg = '0;
        cfg[p / 2][(p % 2) * 32 + j] = 1'b1;
        data = rand64();
        check($sformatf("single switch p=%0d j=%0d", p, j));
      end
    end
    // a single set bit walks through a fully set network: with all switches
    // crossing, every stage flips one address bit, so bit i goes to ~i
    cfg = '1;
    for (int i = 0; i < 64; i++) begin
      data = 64'd1 << i;
      @(posedge clk);
      checks++;
      if (out !== (64'd1 << (63 - i))) begin
        failures++;
        $display("FAIL all-cross bit %0d: got %h", i, out);
      end
    end
    for (int n = 0; n < 500; n++) begin
      data = rand64();
      cfg  = {rand64(), rand64(), rand64()};
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
