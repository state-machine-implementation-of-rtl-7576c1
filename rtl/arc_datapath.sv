// arc_datapath: the ARC datapath driven by the control word.
//
// The A and B bus decoders put two registers on the A and B buses; the ALU
// combines them with the function ctrl.alu; the C bus carries the ALU result,
// or the memory's read data when ctrl.rd is set, into the register picked by
// the C bus decoder at the rising clock edge. The A bus is also the memory
// address and the B bus the memory write data. The 4-bit condition code
// register (n, z, v, c) is loaded from the ALU when the function is one of the
// *CC functions and no memory read is in progress, so memory operations never
// change it. This bus structure follows the description of memory and ALU
// operations; reset clearing every register and the condition codes is this
// design's choice.
//
// Outputs ir and cc are the 36 bits of state the control unit looks at.
module arc_datapath
  import arc_pkg::*;
#(
  parameter int unsigned NUM_REGS = NUM_REGS_DEFAULT
) (
  input  logic              clk,
  input  logic              rst,
  input  ctrl_word_t        ctrl,
  input  logic [WORD_W-1:0] mem_dout,
  output logic [WORD_W-1:0] a_bus,
  output logic [WORD_W-1:0] b_bus,
  output logic [WORD_W-1:0] c_bus,
  output logic [WORD_W-1:0] ir,
  output cc_t               cc
);

  logic [WORD_W-1:0] alu_f;
  cc_t               alu_cc;
  logic              alu_set_cc;

  register_file #(.NUM_REGS(NUM_REGS)) u_regs (
    .clk   (clk),
    .rst   (rst),
    .a_sel (ctrl.a),
    .b_sel (ctrl.b),
    .c_sel (ctrl.c),
    .c_bus (c_bus),
    .a_bus (a_bus),
    .b_bus (b_bus),
    .ir_q  (ir)
  );

  alu u_alu (
    .a      (a_bus),
    .b      (b_bus),
    .fn     (ctrl.alu),
    .f      (alu_f),
    .cc     (alu_cc),
    .set_cc (alu_set_cc)
  );

  assign c_bus = ctrl.rd ? mem_dout : alu_f;

  always_ff @(posedge clk) begin
    if (rst)                          cc <= '0;
    else if (alu_set_cc && !ctrl.rd)  cc <= alu_cc;
  end

endmodule
