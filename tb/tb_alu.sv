// tb_alu: every ALU function code on directed and random operands, compared
// with a reference model written independently here (64-bit arithmetic for
// carry and overflow). Function codes are applied as plain numbers so the
// encoding itself is checked: ADD must be 0101, ADDCC 0011, SEXT13 1100.
module tb_alu;
  import arc_pkg::*;

  logic [31:0] a, b, f;
  alu_fn_e     fn;
  cc_t         cc;
  logic        set_cc;
  int checks = 0, failures = 0;

  alu dut (.*);

  function automatic logic [31:0] ref_f(logic [3:0] code, logic [31:0] x, logic [31:0] y);
    logic [63:0] wide;
    case (code)
      4'd0, 4'd8: return x & y;
      4'd1, 4'd6: return x | y;
      4'd2, 4'd7: return ~(x | y);
      4'd3, 4'd5: begin wide = 64'(x) + 64'(y); return wide[31:0]; end
      4'd4:       return x >> y[4:0];
      4'd9:       return {x[29:0], 2'b00};
      4'd10:      return {x[21:0], 10'b0};
      4'd11:      return {19'b0, x[12:0]};
      4'd12:      return {{19{x[12]}}, x[12:0]};
      4'd13:      return x + 1;
      4'd14:      return x + 4;
      default:    return {{5{x[31]}}, x[31:5]};
    endcase
  endfunction

  task automatic apply(logic [3:0] code, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    logic [63:0] wide;
    logic        exp_set, exp_v, exp_c;
    a = x; b = y; fn = alu_fn_e'(code);
    #1;
    exp     = ref_f(code, x, y);
    exp_set = (code <= 4'd3);
    wide    = 64'(x) + 64'(y);
    exp_c   = (code == 4'd3) && wide[32];
    exp_v   = (code == 4'd3) && ($signed(64'($signed(x)) + 64'($signed(y))) !=
                                 $signed(64'($signed(wide[31:0]))));
    checks++;
    if (f !== exp) begin
      failures++;
      $display("FAIL fn=%b a=%h b=%h f=%h exp=%h", code, x, y, f, exp);
    end
    checks++;
    if (set_cc !== exp_set) begin
      failures++;
      $display("FAIL set_cc fn=%b", code);
    end
    if (exp_set) begin
      checks++;
      if (cc !== {exp[31], exp == 0, exp_v, exp_c}) begin
        failures++;
        $display("FAIL cc fn=%b a=%h b=%h cc=%b exp=%b", code, x, y, cc,
                 {exp[31], exp == 0, exp_v, exp_c});
      end
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed corner cases
    apply(4'b0011, 32'h7FFF_FFFF, 32'h0000_0001);  // addcc: overflow, negative
    apply(4'b0011, 32'hFFFF_FFFF, 32'h0000_0001);  // addcc: carry, zero
    apply(4'b0011, 32'h8000_0000, 32'h8000_0000);  // addcc: carry, overflow, zero
    apply(4'b0101, 32'h0000_1234, 32'h0000_0100);  // add
    apply(4'b1100, 32'h0000_1FFF, 32'h0);          // sext13 of -1
    apply(4'b1100, 32'hFFFF_0FFF, 32'h0);          // sext13 positive
    apply(4'b1110, 32'h0000_0010, 32'h0);          // incpc
    apply(4'b1111, 32'h8000_0000, 32'h0);          // rshift5 sign fill
    apply(4'b0000, 32'hF0F0_0000, 32'h0F0F_0000);  // andcc -> zero
    for (int code = 0; code < 16; code++)
      for (int n = 0; n < 300; n++)
        apply(4'(code), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
