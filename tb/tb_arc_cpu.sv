// tb_arc_cpu: end-to-end test of the CPU at its default size.
//
// A program is placed in memory: a directed part (loads and stores with
// immediate and register offsets, a negative offset, a load into %r0, an
// instruction of another format, a memory instruction that is neither ld nor
// st) followed by a random stream. An instruction-level reference model in
// this bench executes the same program on its own copy of memory and
// registers: ld/st use address rs1 + sext(simm13) or rs1 + rs2, every other
// instruction only advances pc. For each instruction the bench checks pc at
// fetch and the number of clocks it took; at the end it compares every
// register and every memory word. It also counts each mechanism (fetch,
// immediate path, register path, ld, st, other format skipped, other memory
// instruction skipped, load into %r0 discarded) and fails any that never
// happened.
module tb_arc_cpu;
  import arc_pkg::*;

  localparam int unsigned MEM_WORDS = 4096;  // the CPU's default
  localparam int unsigned N_RANDOM  = 600;
  localparam int          N_DIRECTED = 11;

  logic        clk = 0, rst;
  cu_state_e   state;
  ctrl_word_t  ctrl;
  cc_t         cc;
  logic [31:0] ir;
  int checks = 0, failures = 0;

  arc_cpu dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic [31:0] ref_mem [MEM_WORDS];
  logic [31:0] ref_r   [32];
  logic [31:0] exp_pc    [$];
  int          exp_clks  [$];
  int          n_insn;

  // mechanism counters
  int c_fetch = 0, c_imm = 0, c_reg = 0, c_ld = 0, c_st = 0;
  int c_skip_fmt = 0, c_skip_mem = 0, c_r0 = 0;

  function automatic logic [31:0] fmt3(logic [4:0] rd, logic [5:0] op3, logic [4:0] rs1,
                                       logic i, logic [12:0] off);
    return {2'b11, rd, op3, rs1, i, off};
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
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
    int unsigned pc, k, ea;
    logic [31:0] w;
    logic        is_mem, is_ld, is_st;
    // ------------------------------------------------------- program
    foreach (ref_mem[i]) ref_mem[i] = '0;
    k = 0;
    ref_mem[k++] = fmt3(5'd1, 6'b000000, 5'd0, 1'b1, 13'h800);    // ld [%r0+0x800], %r1
    ref_mem[k++] = fmt3(5'd2, 6'b000000, 5'd0, 1'b1, 13'h804);    // ld [%r0+0x804], %r2
    ref_mem[k++] = fmt3(5'd3, 6'b000000, 5'd1, 1'b1, 13'h004);    // ld [%r1+4], %r3
    ref_mem[k++] = fmt3(5'd4, 6'b000000, 5'd1, 1'b0, 13'h002);    // ld [%r1+%r2], %r4
    ref_mem[k++] = fmt3(5'd3, 6'b000100, 5'd0, 1'b1, 13'h810);    // st %r3, [%r0+0x810]
    ref_mem[k++] = fmt3(5'd4, 6'b000100, 5'd1, 1'b0, 13'h005);    // st %r4, [%r1+%r5]
    ref_mem[k++] = 32'h8C80_4002;                                 // addcc %r1,%r2,%r6
    ref_mem[k++] = fmt3(5'd0, 6'b000000, 5'd0, 1'b1, 13'h800);    // ld [%r0+0x800], %r0
    ref_mem[k++] = fmt3(5'd7, 6'b000000, 5'd1, 1'b1, 13'h1F00);   // ld [%r1-0x100], %r7
    ref_mem[k++] = fmt3(5'd8, 6'b000001, 5'd0, 1'b1, 13'h800);    // ldub: not ld/st
    ref_mem[k++] = fmt3(5'd7, 6'b000100, 5'd0, 1'b1, 13'h814);    // st %r7, [%r0+0x814]
    // random stream: mostly ld/st near the data area, some other words
    for (int n = 0; n < N_RANDOM; n++) begin
      case ($urandom_range(0, 5))
        0, 1: ref_mem[k++] = fmt3(5'($urandom), 6'b000000, 5'($urandom_range(0, 8)),
                                  1'($urandom), 13'(12'h800 + 4 * $urandom_range(0, 255)));
        2, 3: ref_mem[k++] = fmt3(5'($urandom), 6'b000100, 5'($urandom_range(0, 8)),
                                  1'($urandom), 13'(12'h800 + 4 * $urandom_range(0, 255)));
        4:    ref_mem[k++] = fmt3(5'($urandom), 6'($urandom), 5'($urandom), 1'($urandom), 13'($urandom));
        default: ref_mem[k++] = {2'($urandom_range(0, 2)), 30'($urandom)};
      endcase
    end
    n_insn = int'(k);
    // data
    ref_mem[12'h800 >> 2] = 32'h0000_0900;   // pointer
    ref_mem[12'h804 >> 2] = 32'h0000_0008;   // index
    ref_mem[12'h904 >> 2] = 32'h1111_2222;
    ref_mem[12'h908 >> 2] = 32'h3333_4444;
    for (int i = 12'h910 >> 2; i < (12'hC00 >> 2); i++) ref_mem[i] = $urandom;
    // load the CPU's memory
    foreach (ref_mem[i]) dut.u_mem.mem[i] = ref_mem[i];

    // ------------------------------------------------ reference run
    foreach (ref_r[i]) ref_r[i] = '0;
    pc = 0;
    for (int n = 0; n < n_insn; n++) begin
      w      = ref_mem[pc[13:2]];
      is_mem = (w[31:30] == 2'b11);
      is_ld  = is_mem && (w[24:19] == 6'b000000);
      is_st  = is_mem && (w[24:19] == 6'b000100);
      exp_pc.push_back(pc);
      exp_clks.push_back(is_mem ? (5 + (w[13] ? 0 : 1) + ((is_ld || is_st) ? 1 : 0)) : 2);
      ea = ref_r[w[18:14]] + (w[13] ? {{19{w[12]}}, w[12:0]} : ref_r[w[4:0]]);
      if (is_ld && w[29:25] != 0) ref_r[w[29:25]] = ref_mem[ea[13:2]];
      if (is_st)                  ref_mem[ea[13:2]] = ref_r[w[29:25]];
      pc += 4;
    end
    exp_pc.push_back(pc);

    // ------------------------------------------------------ DUT run
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
  end

  // per-instruction pc and clock count, mechanism counters
  int         cycle = 0, last_fetch = -1, n_fetched = 0;
  cu_state_e  prev_state = S_0;
  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      prev_state <= state;
      if (state == S_0) begin
        c_fetch++;
        if (n_fetched < exp_pc.size())
          check("pc at fetch", dut.u_dp.u_regs.regs[32], exp_pc[n_fetched]);
        if (last_fetch >= 0) begin
          checks++;
          if (cycle - last_fetch != exp_clks[n_fetched - 1]) begin
            failures++;
            $display("FAIL insn %0d took %0d clocks, expected %0d",
                     n_fetched - 1, cycle - last_fetch, exp_clks[n_fetched - 1]);
          end
        end
        last_fetch = cycle;
        n_fetched++;
        if (n_fetched == N_DIRECTED + 1) check_directed();
        if (n_fetched == n_insn + 1) finish_run();
      end
      if (state == S_2 && prev_state == S_1) c_imm++;
      if (state == S_3)                      c_reg++;
      if (state == S_5) begin
        c_ld++;
        if (ctrl.c == REG_R0) c_r0++;
      end
      if (state == S_6)                      c_st++;
      if (state == S_99 && prev_state == S_0) c_skip_fmt++;
      if (state == S_99 && prev_state == S_4) c_skip_mem++;
    end
  end

  // state after the directed part, worked out by hand
  task automatic check_directed();
    check("directed r1", dut.u_dp.u_regs.regs[1], 32'h0000_0900);
    check("directed r2", dut.u_dp.u_regs.regs[2], 32'h0000_0008);
    check("directed r3", dut.u_dp.u_regs.regs[3], 32'h1111_2222);
    check("directed r4", dut.u_dp.u_regs.regs[4], 32'h3333_4444);
    check("directed r6", dut.u_dp.u_regs.regs[6], 32'h0000_0000);
    check("directed r7", dut.u_dp.u_regs.regs[7], 32'h0000_0900);
    check("directed r8", dut.u_dp.u_regs.regs[8], 32'h0000_0000);
    check("directed M[0x810]", dut.u_mem.mem[12'h810 >> 2], 32'h1111_2222);
    check("directed M[0x900]", dut.u_mem.mem[12'h900 >> 2], 32'h3333_4444);
    check("directed M[0x814]", dut.u_mem.mem[12'h814 >> 2], 32'h0000_0900);
  endtask

  task automatic finish_run();
    for (int i = 0; i < 32; i++) check($sformatf("r%0d", i), dut.u_dp.u_regs.regs[i], ref_r[i]);
    for (int i = 0; i < int'(MEM_WORDS); i++) check($sformatf("mem[%0d]", i), dut.u_mem.mem[i], ref_mem[i]);
    $display("mechanisms: fetch=%0d imm=%0d reg=%0d ld=%0d st=%0d skip_fmt=%0d skip_mem=%0d ld_r0=%0d",
             c_fetch, c_imm, c_reg, c_ld, c_st, c_skip_fmt, c_skip_mem, c_r0);
    checks++; if (c_imm == 0)      begin failures++; $display("FAIL immediate path never taken"); end
    checks++; if (c_reg == 0)      begin failures++; $display("FAIL register path never taken"); end
    checks++; if (c_ld == 0)       begin failures++; $display("FAIL no ld executed"); end
    checks++; if (c_st == 0)       begin failures++; $display("FAIL no st executed"); end
    checks++; if (c_skip_fmt == 0) begin failures++; $display("FAIL no other format skipped"); end
    checks++; if (c_skip_mem == 0) begin failures++; $display("FAIL no other mem_op skipped"); end
    checks++; if (c_r0 == 0)       begin failures++; $display("FAIL no load into %%r0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
