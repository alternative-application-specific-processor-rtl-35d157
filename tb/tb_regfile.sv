// tb_regfile: self-checking test of the 32 x 64-bit register file with four
// read and three write ports. Checks reset to zero, writes through every
// port, that a write is visible only after its clock edge, the priority of
// the highest-numbered port on a conflict, and random traffic against a
// shadow array.
module tb_regfile;
  localparam int NREGS = 32, W = 64, NR = 4, NW = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [NR-1:0][4:0]   raddr;
  logic [NR-1:0][W-1:0] rdata;
  logic [NW-1:0]        we;
  logic [NW-1:0][4:0]   waddr;
  logic [NW-1:0][W-1:0] wdata;
  logic [W-1:0]         shadow [NREGS];
  int checks = 0, failures = 0;

  regfile #(.NREGS(NREGS), .W(W), .NR(NR), .NW(NW)) dut (
    .clk(clk), .rst_n(rst_n), .raddr_i(raddr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata));

  task automatic read_all_check(string what);
    for (int r = 0; r < NREGS; r += NR) begin
      for (int p = 0; p < NR; p++) raddr[p] = 5'((r + p + 3 * p) % NREGS);
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++;
          $display("FAIL %s: port %0d reg %0d got %h exp %h", what, p, raddr[p], rdata[p], shadow[raddr[p]]);
        end
      end
    end
  endtask

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (shadow[r]) shadow[r] = '0;
    read_all_check("after reset");
    // fill through each port in turn
    for (int r = 0; r < NREGS; r++) begin
      @(negedge clk);
      we = '0;
      we[r % NW]    = 1'b1;
      waddr[r % NW] = 5'(r);
      wdata[r % NW] = {$urandom, $urandom};
      shadow[r]     = wdata[r % NW];
      // not yet visible before the edge
      raddr[0] = 5'(r);
      #1;
      if (r > 0) begin
        checks++;
        if (rdata[0] !== 64'd0) begin failures++; $display("FAIL write visible early, reg %0d", r); end
      end
    end
    @(negedge clk);
    we = '0;
    read_all_check("after fill");
    // all ports to one register: port NW-1 wins
    @(negedge clk);
    for (int p = 0; p < NW; p++) begin
      we[p] = 1'b1; waddr[p] = 5'd7; wdata[p] = 64'hAAAA_0000_0000_0000 | 64'(p);
    end
    shadow[7] = wdata[NW-1];
    @(negedge clk);
    we = '0;
    read_all_check("write conflict");
    // random traffic
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p]    = 1'($urandom);
        waddr[p] = 5'($urandom);
        wdata[p] = {$urandom, $urandom};
      end
      for (int p = 0; p < NW; p++) if (we[p]) shadow[waddr[p]] = wdata[p];
      @(negedge clk);
      we = '0;
      for (int p = 0; p < NR; p++) raddr[p] = 5'($urandom);
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++;
          $display("FAIL random: port %0d reg %0d", p, raddr[p]);
        end
      end
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
