// arc_cpu: the ARC CPU with a hardwired state-machine control unit.
//
// The control unit issues one 24-bit control word per clock; the datapath
// moves registers over the A, B and C buses through the ALU, and the memory
// reads (RD) from or writes (WR) to the address on the A bus. The memory's
// read data goes to the datapath's C bus and, during the fetch state, to the
// control unit's decoders. An instruction with no states of its own takes 2
// clocks (fetch, pc increment), ld/st with an immediate offset 6 clocks and
// ld/st with a register offset 7 clocks.
//
// Ports: clk, synchronous active-high rst; state, ctrl, cc and pc are
// brought out for observation. MEM_WORDS sets the memory size in 32-bit
// words (a power of two; this design's choice).
module arc_cpu
  import arc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic              clk,
  input  logic              rst,
  output cu_state_e         state,
  output ctrl_word_t        ctrl,
  output cc_t               cc,
  output logic [WORD_W-1:0] ir
);

  logic [WORD_W-1:0] a_bus, b_bus, c_bus, mem_dout;

  control_unit u_cu (
    .clk        (clk),
    .rst        (rst),
    .ir         (ir),
    .fetch_word (mem_dout),
    .cc         (cc),
    .ctrl       (ctrl),
    .state      (state)
  );

  arc_datapath u_dp (
    .clk      (clk),
    .rst      (rst),
    .ctrl     (ctrl),
    .mem_dout (mem_dout),
    .a_bus    (a_bus),
    .b_bus    (b_bus),
    .c_bus    (c_bus),
    .ir       (ir),
    .cc       (cc)
  );

  arc_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk  (clk),
    .rd   (ctrl.rd),
    .wr   (ctrl.wr),
    .addr (a_bus),
    .din  (b_bus),
    .dout (mem_dout)
  );

endmodule
