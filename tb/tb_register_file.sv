// tb_register_file: random A/B/C bus traffic against a model register array.
// Checks that the A and B buses show the selected registers, that %r0 reads
// zero and ignores writes, that numbers 38..63 hold nothing and read zero,
// that reset clears the registers, and that ir_q follows register 37.
module tb_register_file;
  import arc_pkg::*;

  logic        clk = 0, rst;
  reg_sel_t    a_sel, b_sel, c_sel;
  logic [31:0] c_bus, a_bus, b_bus, ir_q;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    rst = 1; a_sel = 0; b_sel = 0; c_sel = 0; c_bus = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // after reset every register reads zero
    for (int i = 0; i < 64; i++) begin
      a_sel = reg_sel_t'(i); b_sel = reg_sel_t'(63 - i); #1;
      check("reset a", a_bus, 32'd0);
      check("reset b", b_bus, 32'd0);
    end
    // write every register once with a known pattern
    for (int i = 0; i < 64; i++) begin
      c_sel = reg_sel_t'(i); c_bus = 32'hA500_0000 | 32'(i);
      @(posedge clk); #1;
      if (i != 0 && i < 38) model[i] = c_bus;
    end
    for (int i = 0; i < 64; i++) begin
      a_sel = reg_sel_t'(i); b_sel = reg_sel_t'(i); #1;
      check("pattern a", a_bus, model[i]);
      check("pattern b", b_bus, model[i]);
    end
    check("ir_q", ir_q, 32'hA500_0025);
    // random traffic
    for (int n = 0; n < 5000; n++) begin
      a_sel = reg_sel_t'($urandom_range(0, 63));
      b_sel = reg_sel_t'($urandom_range(0, 63));
      c_sel = reg_sel_t'($urandom_range(0, 63));
      c_bus = $urandom;
      #1;
      check("a_bus", a_bus, model[a_sel]);
      check("b_bus", b_bus, model[b_sel]);
      check("ir_q", ir_q, model[37]);
      @(posedge clk); #1;
      if (c_sel != 0 && c_sel < 38) model[c_sel] = c_bus;
    end
    // reset clears again
    rst = 1; @(posedge clk); #1 rst = 0;
    a_sel = REG_PC; b_sel = REG_IR; #1;
    check("reset pc", a_bus, 32'd0);
    check("reset ir", b_bus, 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
