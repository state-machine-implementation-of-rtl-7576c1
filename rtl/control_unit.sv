// control_unit: hardwired ARC control unit written as a Moore state machine.
//
// Every clock the unit drives the 24-bit control word (A, B and C bus register
// numbers, ALU function, RD, WR) that belongs to its present state alone; the
// register-number fields may take the rs1, rs2 or rd field of the instruction
// register. The state register holds the state number in binary and a 7-to-128
// decoder turns it into one wire per state (State_0, State_1, ...), as a
// one-hot machine would have. The next state is chosen from those wires and
// from the outputs of the instruction decoders.
//
// States and control words (fields: A B C ALU RD WR; rs1 = IR[18:14],
// rs2 = IR[4:0], rd = IR[29:25], i = IR[13]):
//
//   0  fetch     ir    <- M[pc]            pc    r0    ir    ADD    1 0
//                mem_op -> 1, otherwise -> 99
//   1            temp0 <- sext13(ir)       ir    r0    temp0 SEXT13 0 0
//                i -> 2, ~i -> 3
//   2            (no register written)     temp0 r0    r0    ADD    0 0  -> 4
//   3            temp0 <- rs2 + r0         rs2   r0    temp0 ADD    0 0  -> 2
//   4  EA        temp0 <- rs1 + temp0      rs1   temp0 temp0 ADD    0 0
//                ld -> 5, st -> 6, otherwise -> 99
//   5  ld        rd    <- M[temp0]         temp0 r0    rd    ADD    1 0  -> 99
//   6  st        M[temp0] <- rd            temp0 rd    r0    ADD    0 1  -> 99
//   99           pc    <- incpc(pc)        pc    r0    pc    INCPC  0 0  -> 0
//
// This implements the load/store part of the state table the design is based
// on: ld and st, with register + immediate and register + register addressing.
// Choices of this design where that table is silent or could not work as
// printed:
//  * The fetch state decides on mem_op while the instruction is still being
//    loaded into IR, so the decoders see fetch_word (the memory read data,
//    i.e. the word going into IR) in State_0 and IR in every other state.
//  * The table gives State_2 the same add as State_4 ("Compute EA"), which
//    would add rs1 twice; State_2 here writes nothing and only joins the two
//    addressing paths, so the address is rs1 + simm13 or rs1 + rs2.
//  * Instructions outside the table (any format but mem_op; mem_op other than
//    ld and st) go to State_99 and only advance pc.
//  * Unused state codes return to State_0. Synchronous active-high reset
//    enters State_0.
// cc is an input of the machine but no implemented state branches on it.
module control_unit
  import arc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] ir,          // instruction register
  input  logic [31:0] fetch_word,  // word being fetched into IR in State_0
  input  cc_t         cc,
  output ctrl_word_t  ctrl,
  output cu_state_e   state
);

  cu_state_e          state_d;
  logic [127:0]       st;          // one wire per state code
  logic               state_0, state_1, state_2, state_3,
                      state_4, state_5, state_6, state_99;
  logic [31:0]        dec_word;

  // instruction decoder outputs
  logic [3:0]  fmt;
  logic [7:0]  op2;
  logic [63:0] op3;
  logic [15:0] cond;
  logic        set_br_op, call_op, alu_op, mem_op, branch, sethi, ld, st_op, addcc;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (rst) state <= S_0;
    else     state <= state_d;
  end

  decoder #(.WIDTH(STATE_W)) u_state_dec (.sel(state), .y(st));

  assign state_0  = st[S_0];
  assign state_1  = st[S_1];
  assign state_2  = st[S_2];
  assign state_3  = st[S_3];
  assign state_4  = st[S_4];
  assign state_5  = st[S_5];
  assign state_6  = st[S_6];
  assign state_99 = st[S_99];

  // ------------------------------------------------------------- decoders
  assign dec_word = state_0 ? fetch_word : ir;

  ir_decoders u_ir_dec (
    .ir        (dec_word),
    .fmt       (fmt),
    .op2       (op2),
    .op3       (op3),
    .cond      (cond),
    .set_br_op (set_br_op),
    .call_op   (call_op),
    .alu_op    (alu_op),
    .mem_op    (mem_op),
    .branch    (branch),
    .sethi     (sethi),
    .ld        (ld),
    .st        (st_op),
    .addcc     (addcc)
  );

  // ----------------------------------------------------------- next state
  always_comb begin
    state_d = S_0;
    if (state_0)       state_d = mem_op ? S_1 : S_99;
    else if (state_1)  state_d = dec_word[13] ? S_2 : S_3;
    else if (state_2)  state_d = S_4;
    else if (state_3)  state_d = S_2;
    else if (state_4)  state_d = ld ? S_5 : (st_op ? S_6 : S_99);
    else if (state_5)  state_d = S_99;
    else if (state_6)  state_d = S_99;
    else if (state_99) state_d = S_0;
  end

  // -------------------------------------------------------------- outputs
  reg_sel_t rs1, rs2, rd;
  assign rs1 = {1'b0, ir[18:14]};
  assign rs2 = {1'b0, ir[4:0]};
  assign rd  = {1'b0, ir[29:25]};

  always_comb begin
    ctrl = '{a: REG_R0, b: REG_R0, c: REG_R0, alu: ALU_ADD, rd: 1'b0, wr: 1'b0};
    if (state_0)       ctrl = '{a: REG_PC,    b: REG_R0,    c: REG_IR,    alu: ALU_ADD,    rd: 1'b1, wr: 1'b0};
    else if (state_1)  ctrl = '{a: REG_IR,    b: REG_R0,    c: REG_TEMP0, alu: ALU_SEXT13, rd: 1'b0, wr: 1'b0};
    else if (state_2)  ctrl = '{a: REG_TEMP0, b: REG_R0,    c: REG_R0,    alu: ALU_ADD,    rd: 1'b0, wr: 1'b0};
    else if (state_3)  ctrl = '{a: rs2,       b: REG_R0,    c: REG_TEMP0, alu: ALU_ADD,    rd: 1'b0, wr: 1'b0};
    else if (state_4)  ctrl = '{a: rs1,       b: REG_TEMP0, c: REG_TEMP0, alu: ALU_ADD,    rd: 1'b0, wr: 1'b0};
    else if (state_5)  ctrl = '{a: REG_TEMP0, b: REG_R0,    c: rd,        alu: ALU_ADD,    rd: 1'b1, wr: 1'b0};
    else if (state_6)  ctrl = '{a: REG_TEMP0, b: rd,        c: REG_R0,    alu: ALU_ADD,    rd: 1'b0, wr: 1'b1};
    else if (state_99) ctrl = '{a: REG_PC,    b: REG_R0,    c: REG_PC,    alu: ALU_INCPC,  rd: 1'b0, wr: 1'b0};
  end

  // the machine is always in exactly one of its named states
  a_known_state: assert property (@(posedge clk) disable iff (rst)
    $onehot({state_0, state_1, state_2, state_3, state_4, state_5, state_6, state_99}));
  a_rd_wr_exclusive: assert property (@(posedge clk) !(ctrl.rd && ctrl.wr));

endmodule
