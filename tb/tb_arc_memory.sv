// tb_arc_memory: random reads and writes against a model array. Writes land
// at the rising edge, reads are combinational and zero when rd is low, the two
// low address bits are ignored and addresses wrap at the memory size.
module tb_arc_memory;
  localparam int unsigned WORDS = 4096;  // the memory's default
  localparam int unsigned WA    = 12;

  logic        clk = 0, rd, wr;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  arc_memory dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%h got=%h exp=%h", what, addr, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; addr = 0; din = 0;
    // fill every word through the write port
    for (int i = 0; i < WORDS; i++) begin
      wr = 1; addr = 32'(i * 4); din = $urandom; model[i] = din;
      @(posedge clk); #1;
    end
    wr = 0;
    for (int i = 0; i < WORDS; i++) begin
      rd = 1; addr = 32'(i * 4) | 32'($urandom_range(0, 3)); #1;
      check("read", dout, model[i]);
    end
    // random mix, including wrapped addresses and rd = 0
    for (int n = 0; n < 5000; n++) begin
      addr = $urandom;
      case ($urandom_range(0, 2))
        0: begin
          rd = 0; wr = 1; din = $urandom;
          @(posedge clk); #1;
          model[addr[WA+1:2]] = din;
        end
        1: begin rd = 1; wr = 0; #1; check("read", dout, model[addr[WA+1:2]]); end
        default: begin rd = 0; wr = 0; #1; check("idle", dout, 32'd0); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
