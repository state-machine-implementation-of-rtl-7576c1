// tb_decoder: exhaustive check of the 6-to-64 one-hot bus decoder.
// Every select value is applied; the output must be the single bit 1 << sel.
module tb_decoder;
  localparam int unsigned WIDTH = 6;  // the decoder's default

  logic [WIDTH-1:0]      sel;
  logic [(1<<WIDTH)-1:0] y;
  int checks = 0, failures = 0;

  decoder dut (.sel(sel), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << WIDTH); i++) begin
      sel = WIDTH'(i);
      #1;
      checks++;
      if (y !== (64'd1 << i)) begin
        failures++;
        $display("FAIL sel=%0d y=%h", i, y);
      end
      checks++;
      if ($countones(y) != 1) begin
        failures++;
        $display("FAIL sel=%0d not one-hot", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
