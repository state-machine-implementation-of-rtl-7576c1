// tb_ir_decoders: drives random and directed instruction words into the
// instruction decoders and compares every decoder vector and named output
// with values computed from the instruction fields.
module tb_ir_decoders;
  logic [31:0] ir;
  logic [3:0]  fmt;
  logic [7:0]  op2;
  logic [63:0] op3;
  logic [15:0] cond;
  logic set_br_op, call_op, alu_op, mem_op, branch, sethi, ld, st, addcc;
  int checks = 0, failures = 0;

  ir_decoders dut (.*);

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s ir=%h got=%h exp=%h", what, ir, got, exp);
    end
  endtask

  task automatic apply(logic [31:0] word);
    ir = word;
    #1;
    check("fmt",  64'(fmt),  64'd1 << word[31:30]);
    check("op2",  64'(op2),  64'd1 << word[24:22]);
    check("op3",  op3,       64'd1 << word[24:19]);
    check("cond", 64'(cond), 64'd1 << word[28:25]);
    check("set_br_op", 64'(set_br_op), 64'(word[31:30] == 2'b00));
    check("call_op",   64'(call_op),   64'(word[31:30] == 2'b01));
    check("alu_op",    64'(alu_op),    64'(word[31:30] == 2'b10));
    check("mem_op",    64'(mem_op),    64'(word[31:30] == 2'b11));
    check("branch",    64'(branch),    64'(word[24:22] == 3'b010));
    check("sethi",     64'(sethi),     64'(word[24:22] == 3'b100));
    check("ld",        64'(ld),        64'(word[24:19] == 6'b000000));
    check("st",        64'(st),        64'(word[24:19] == 6'b000100));
    check("addcc",     64'(addcc),     64'(word[24:19] == 6'b010000));
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ld [%r1+4], %r2 ; st %r2, [%r1+8] ; addcc %r1, %r2, %r3 ; sethi ; branch
    apply(32'hC400_6004);
    apply(32'hC420_6008);
    apply(32'h8680_4002);
    apply(32'h0300_0001);
    apply(32'h1080_0003);
    for (int i = 0; i < 2000; i++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
