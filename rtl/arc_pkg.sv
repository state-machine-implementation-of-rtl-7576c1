// arc_pkg: types and constants shared by the ARC control unit, datapath and
// memory.
//
// The control unit drives the datapath with a 24-bit control word every clock:
// a 6-bit register number for each of the A, B and C bus decoders, a 4-bit ALU
// function code, and the memory strobes RD and WR. The register numbers of
// %r0 (0), pc (32), temp0 (33) and ir (37) and the ALU codes of ADDCC (0011),
// ADD (0101) and SEXT13 (1100) are the ones the control-word examples use.
// The other ALU codes follow the usual ARC function table; because ADD is
// 0101 here, AND takes code 1000, the slot ADD has in that table.
// The FSM state numbers 0..6 and 99 are the state names of the state table.
package arc_pkg;

  localparam int unsigned WORD_W = 32;

  // register numbers as seen by the A, B and C bus decoders
  typedef logic [5:0] reg_sel_t;
  localparam reg_sel_t REG_R0    = 6'd0;
  localparam reg_sel_t REG_PC    = 6'd32;
  localparam reg_sel_t REG_TEMP0 = 6'd33;
  localparam reg_sel_t REG_IR    = 6'd37;
  localparam int unsigned NUM_REGS_DEFAULT = 38;  // %r0..%r31, pc, temp0..temp3, ir

  // ALU function codes
  typedef enum logic [3:0] {
    ALU_ANDCC    = 4'b0000,
    ALU_ORCC     = 4'b0001,
    ALU_NORCC    = 4'b0010,
    ALU_ADDCC    = 4'b0011,
    ALU_SRL      = 4'b0100,
    ALU_ADD      = 4'b0101,
    ALU_OR       = 4'b0110,
    ALU_NOR      = 4'b0111,
    ALU_AND      = 4'b1000,
    ALU_LSHIFT2  = 4'b1001,
    ALU_LSHIFT10 = 4'b1010,
    ALU_SIMM13   = 4'b1011,
    ALU_SEXT13   = 4'b1100,
    ALU_INC      = 4'b1101,
    ALU_INCPC    = 4'b1110,
    ALU_RSHIFT5  = 4'b1111
  } alu_fn_e;

  // condition codes: negative, zero, overflow, carry
  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } cc_t;

  // the 24 control bits: 22 to the datapath, 2 to memory
  typedef struct packed {
    reg_sel_t a;
    reg_sel_t b;
    reg_sel_t c;
    alu_fn_e  alu;
    logic     rd;
    logic     wr;
  } ctrl_word_t;

  // control unit states, numbered as in the state table
  typedef enum logic [6:0] {
    S_0  = 7'd0,   // instruction fetch
    S_1  = 7'd1,   // temp0 <- sext13(ir)
    S_2  = 7'd2,   // immediate and register paths join
    S_3  = 7'd3,   // temp0 <- rs2
    S_4  = 7'd4,   // compute effective address
    S_5  = 7'd5,   // execute ld
    S_6  = 7'd6,   // execute st
    S_99 = 7'd99   // pc <- pc + 4
  } cu_state_e;
  localparam int unsigned STATE_W = 7;

  // instruction fields (bit positions of the SPARC/ARC formats)
  localparam logic [5:0] OP3_LD    = 6'b000000;
  localparam logic [5:0] OP3_ST    = 6'b000100;
  localparam logic [5:0] OP3_ADDCC = 6'b010000;
  localparam logic [2:0] OP2_BRANCH = 3'b010;
  localparam logic [2:0] OP2_SETHI  = 3'b100;
  localparam logic [1:0] FMT_SET_BR = 2'b00;
  localparam logic [1:0] FMT_CALL   = 2'b01;
  localparam logic [1:0] FMT_ALU    = 2'b10;
  localparam logic [1:0] FMT_MEM    = 2'b11;

  // ALU functions that load the condition code register
  function automatic logic is_cc_fn(alu_fn_e fn);
    return fn inside {ALU_ANDCC, ALU_ORCC, ALU_NORCC, ALU_ADDCC};
  endfunction

endpackage
