// tb_control_unit: drives the control unit with instructions the way the
// datapath and memory would (fetch_word during the fetch state, IR loaded at
// its end) and checks, state by state, the state sequence, the full 24-bit
// control word and the number of clocks each instruction takes:
//   ld/st, rs1 + simm13 : 0 1 2 4 5|6 99   (6 clocks)
//   ld/st, rs1 + rs2    : 0 1 3 2 4 5|6 99 (7 clocks)
//   other mem_op        : 0 1 [3] 2 4 99    (5 or 6 clocks)
//   other formats       : 0 99             (2 clocks)
module tb_control_unit;
  import arc_pkg::*;

  logic        clk = 0, rst;
  logic [31:0] ir, fetch_word;
  cc_t         cc;
  ctrl_word_t  ctrl;
  cu_state_e   state;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  // expected control word of a state for instruction w, written as raw bits
  function automatic logic [23:0] exp_word(int s, logic [31:0] w);
    logic [5:0] rs1, rs2, rd;
    rs1 = {1'b0, w[18:14]}; rs2 = {1'b0, w[4:0]}; rd = {1'b0, w[29:25]};
    case (s)
      0:  return {6'b100000, 6'b000000, 6'b100101, 4'b0101, 2'b10};
      1:  return {6'b100101, 6'b000000, 6'b100001, 4'b1100, 2'b00};
      2:  return {6'b100001, 6'b000000, 6'b000000, 4'b0101, 2'b00};
      3:  return {rs2,       6'b000000, 6'b100001, 4'b0101, 2'b00};
      4:  return {rs1,       6'b100001, 6'b100001, 4'b0101, 2'b00};
      5:  return {6'b100001, 6'b000000, rd,        4'b0101, 2'b10};
      6:  return {6'b100001, rd,        6'b000000, 4'b0101, 2'b01};
      default: return {6'b100000, 6'b000000, 6'b100000, 4'b1110, 2'b00};
    endcase
  endfunction

  // run one instruction through the unit and check every state it visits
  task automatic run(logic [31:0] w);
    int seq [$];
    logic is_mem, is_ld, is_st;
    is_mem = (w[31:30] == 2'b11);
    is_ld  = is_mem && (w[24:19] == 6'b000000);
    is_st  = is_mem && (w[24:19] == 6'b000100);
    seq = {0};
    if (is_mem) begin
      seq.push_back(1);
      if (!w[13]) seq.push_back(3);
      seq.push_back(2);
      seq.push_back(4);
      if (is_ld) seq.push_back(5);
      if (is_st) seq.push_back(6);
    end
    seq.push_back(99);
    foreach (seq[k]) begin
      // the word is on the memory data bus in the fetch state, in IR after it
      fetch_word = (seq[k] == 0) ? w : $urandom;
      #2;
      checks++;
      if (int'(state) != seq[k]) begin
        failures++;
        $display("FAIL w=%h step %0d state=%0d exp=%0d", w, k, state, seq[k]);
      end
      checks++;
      if (ctrl !== exp_word(seq[k], w)) begin
        failures++;
        $display("FAIL w=%h state %0d ctrl=%h exp=%h", w, seq[k], ctrl, exp_word(seq[k], w));
      end
      @(posedge clk);
      if (seq[k] == 0) ir <= w;
      #1;
    end
  endtask

  function automatic logic [31:0] mem_insn(logic [5:0] op3, logic i);
    logic [31:0] w;
    w = $urandom;
    w[31:30] = 2'b11;
    w[24:19] = op3;
    w[13]    = i;
    return w;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n_ld, n_st;
    rst = 1; ir = $urandom; fetch_word = '0; cc = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // directed: the two control-word examples and their clock counts
    t0 = int'($time / 10); run(32'hC400_6004);         // ld [%r1+4], %r2
    checks++; if (int'($time / 10) - t0 != 6) begin failures++; $display("FAIL ld imm clocks"); end
    t0 = int'($time / 10); run(32'hC420_4003);         // st %r2, [%r1+%r3]
    checks++; if (int'($time / 10) - t0 != 7) begin failures++; $display("FAIL st reg clocks"); end
    t0 = int'($time / 10); run(32'h8680_4002);         // addcc: not in the table
    checks++; if (int'($time / 10) - t0 != 2) begin failures++; $display("FAIL other clocks"); end
    // random instruction stream
    n_ld = 0; n_st = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] w;
      case ($urandom_range(0, 4))
        0: begin w = mem_insn(6'b000000, 1'($urandom)); n_ld++; end
        1: begin w = mem_insn(6'b000100, 1'($urandom)); n_st++; end
        default: w = $urandom;
      endcase
      run(w);
    end
    checks++;
    if (n_ld == 0 || n_st == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
