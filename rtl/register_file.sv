// register_file: the ARC register file seen from the A, B and C buses.
//
// Registers are numbered 0..NUM_REGS-1: %r0..%r31, then pc (32), temp0 (33),
// temp1..temp3 (34..36) and ir (37). Each bus has its own 6-bit decoder:
// the one-hot output of the A (B) decoder gates the selected register onto the
// A (B) bus, and the one-hot output of the C decoder is the write enable of
// the selected register. %r0 always reads as zero and a write to it is
// discarded, as is a write to a number with no register behind it (38..63);
// the control unit uses C = 0 whenever nothing is to be written.
//
// Timing: A and B buses are combinational from a_sel/b_sel; the C-bus value
// is written at the rising clock edge. Synchronous active-high reset clears
// every register (the reset is this design's choice). ir_q is the instruction
// register's contents for the control unit.
module register_file
  import arc_pkg::*;
#(
  parameter int unsigned NUM_REGS = NUM_REGS_DEFAULT,
  parameter int unsigned W        = WORD_W,
  parameter int unsigned IR_NUM   = 37
) (
  input  logic         clk,
  input  logic         rst,
  input  reg_sel_t     a_sel,
  input  reg_sel_t     b_sel,
  input  reg_sel_t     c_sel,
  input  logic [W-1:0] c_bus,
  output logic [W-1:0] a_bus,
  output logic [W-1:0] b_bus,
  output logic [W-1:0] ir_q
);

  logic [63:0]  a_dec, b_dec, c_dec;
  logic [W-1:0] regs [NUM_REGS];

  decoder #(.WIDTH(6)) u_a_dec (.sel(a_sel), .y(a_dec));
  decoder #(.WIDTH(6)) u_b_dec (.sel(b_sel), .y(b_dec));
  decoder #(.WIDTH(6)) u_c_dec (.sel(c_sel), .y(c_dec));

  // %r0 is a constant, not a flip-flop
  assign regs[0] = '0;

  for (genvar i = 1; i < NUM_REGS; i++) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst)           regs[i] <= '0;
      else if (c_dec[i]) regs[i] <= c_bus;
    end
  end

  // bus drivers: OR of the decoder-gated registers
  always_comb begin
    a_bus = '0;
    b_bus = '0;
    for (int unsigned i = 0; i < NUM_REGS; i++) begin
      a_bus |= {W{a_dec[i]}} & regs[i];
      b_bus |= {W{b_dec[i]}} & regs[i];
    end
  end

  assign ir_q = regs[IR_NUM];

endmodule
