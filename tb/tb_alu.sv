// tb_alu: self-checking test of the 64-bit ALU. Every operation is driven
// with corner operands (zero, all ones, shift amounts 0, 1 and 63) and random
// operands, and compared with a bit-by-bit reference written here.
module tb_alu;
  import perm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  alu_op_e op;
  word_t   a, b, y;
  int      checks = 0, failures = 0;

  alu #(.W(64)) dut (.op_i(op), .a_i(a), .b_i(b), .y_o(y));

  function automatic word_t model(alu_op_e o, word_t x, word_t z);
    word_t r;
    int    s = int'(z[5:0]);
    case (o)
      ALU_ADD: r = x + z;
      ALU_SUB: r = x + ~z + 64'd1;
      ALU_AND: r = x & z;
      ALU_OR:  r = x | z;
      ALU_XOR: r = x ^ z;
      ALU_SLL: for (int i = 0; i < 64; i++) r[i] = (i >= s) ? x[i - s] : 1'b0;
      ALU_SRL: for (int i = 0; i < 64; i++) r[i] = (i + s < 64) ? x[i + s] : 1'b0;
      ALU_ROL: for (int i = 0; i < 64; i++) r[i] = x[(i - s + 64) % 64];
      ALU_ROR: for (int i = 0; i < 64; i++) r[i] = x[(i + s) % 64];
      default: r = '0;
    endcase
    return r;
  endfunction

  task automatic run(alu_op_e o, word_t x, word_t z);
    word_t exp;
    op = o; a = x; b = z;
    exp = model(o, x, z);
    @(posedge clk);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got=%h exp=%h", o.name(), x, z, y, exp);
    end
  endtask

  initial begin
    alu_op_e ops [9] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
                         ALU_SLL, ALU_SRL, ALU_ROL, ALU_ROR};
    word_t corners [5] = '{64'd0, 64'd1, 64'd63, '1, 64'h8000_0000_0000_0001};
    foreach (ops[k]) begin
      foreach (corners[i]) foreach (corners[j]) run(ops[k], corners[i], corners[j]);
      for (int n = 0; n < 100; n++) run(ops[k], {$urandom, $urandom}, {$urandom, $urandom});
    end
    // known values
    run(ALU_ROL, 64'h8000_0000_0000_0001, 64'd1);
    checks++; if (y !== 64'h3) failures++;
    run(ALU_ROR, 64'h8000_0000_0000_0001, 64'd1);
    checks++; if (y !== 64'hC000_0000_0000_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
