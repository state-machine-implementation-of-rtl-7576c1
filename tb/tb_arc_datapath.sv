// tb_arc_datapath: random control words against a model of the registers and
// condition codes. Checks the A, B and C buses, the C-bus source (memory read
// data when RD, ALU result otherwise), that %r0 stays zero, and that the
// condition codes change only on *CC functions without RD.
module tb_arc_datapath;
  import arc_pkg::*;

  logic        clk = 0, rst;
  ctrl_word_t  ctrl;
  logic [31:0] mem_dout, a_bus, b_bus, c_bus, ir;
  cc_t         cc;
  logic [31:0] model [64];
  cc_t         model_cc;
  int checks = 0, failures = 0;
  int cc_loads = 0, mem_reads = 0;

  arc_datapath dut (.*);

  always #5 clk = ~clk;

  localparam alu_fn_e FNS [6] = '{ALU_ADD, ALU_ADDCC, ALU_ANDCC, ALU_SEXT13, ALU_INCPC, ALU_OR};

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
    logic [31:0] x, y, f;
    logic [32:0] s;
    cc_t         ncc;
    foreach (model[i]) model[i] = '0;
    model_cc = '0;
    rst = 1; mem_dout = '0;
    ctrl = '{a: REG_R0, b: REG_R0, c: REG_R0, alu: ALU_ADD, rd: 1'b0, wr: 1'b0};
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 6000; n++) begin
      ctrl.a   = reg_sel_t'($urandom_range(0, 37));
      ctrl.b   = reg_sel_t'($urandom_range(0, 37));
      ctrl.c   = reg_sel_t'($urandom_range(0, 39));
      ctrl.alu = FNS[$urandom_range(0, 5)];
      ctrl.rd  = ($urandom_range(0, 3) == 0);
      ctrl.wr  = 1'b0;
      mem_dout = $urandom;
      #1;
      x = model[ctrl.a]; y = model[ctrl.b];
      s = {1'b0, x} + {1'b0, y};
      ncc = model_cc;
      case (ctrl.alu)
        ALU_ADD:    f = s[31:0];
        ALU_ADDCC:  begin f = s[31:0]; ncc = '{f[31], f == 0, (x[31] == y[31]) && (f[31] != x[31]), s[32]}; end
        ALU_ANDCC:  begin f = x & y;   ncc = '{f[31], f == 0, 1'b0, 1'b0}; end
        ALU_SEXT13: f = {{19{x[12]}}, x[12:0]};
        ALU_INCPC:  f = x + 4;
        default:    f = x | y;
      endcase
      check("a_bus", a_bus, x);
      check("b_bus", b_bus, y);
      check("c_bus", c_bus, ctrl.rd ? mem_dout : f);
      check("ir", ir, model[37]);
      checks++;
      if (cc !== model_cc) begin
        failures++;
        $display("FAIL cc got=%b exp=%b", cc, model_cc);
      end
      @(posedge clk); #1;
      if (ctrl.c != 0 && ctrl.c < 38) model[ctrl.c] = ctrl.rd ? mem_dout : f;
      if (ctrl.rd) mem_reads++;
      if (!ctrl.rd && ctrl.alu inside {ALU_ADDCC, ALU_ANDCC}) begin
        model_cc = ncc;
        cc_loads++;
      end
    end
    checks++;
    if (cc_loads == 0 || mem_reads == 0) begin
      failures++;
      $display("FAIL coverage cc_loads=%0d mem_reads=%0d", cc_loads, mem_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
