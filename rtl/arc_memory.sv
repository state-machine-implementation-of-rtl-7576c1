// arc_memory: word-organised main memory of the ARC CPU.
//
// The address is the byte address on the A bus; the word at address[WA+1:2]
// is accessed (the two low bits are ignored and higher bits wrap). A read
// (rd = 1) drives the word onto dout combinationally, so the control unit
// can load it from the C bus at the end of the same clock; with rd = 0 dout is
// zero. A write (wr = 1) stores din (from the B bus) at the rising clock edge.
// Each access takes one clock, the memory has no wait or acknowledge signal,
// and its size are this design's choices; RD/WR, the A-bus address and the
// B-bus write data follow the description of memory operations. The array
// is not reset.
module arc_memory #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned W     = 32
) (
  input  logic         clk,
  input  logic         rd,
  input  logic         wr,
  input  logic [31:0]  addr,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int unsigned WA = $clog2(WORDS);

  logic [W-1:0]  mem [WORDS];
  logic [WA-1:0] idx;

  assign idx  = addr[WA+1:2];
  assign dout = rd ? mem[idx] : '0;

  always_ff @(posedge clk) begin
    if (wr) mem[idx] <= din;
  end

  // a state is either a read or a write, never both
  a_rd_wr_exclusive: assert property (@(posedge clk) !(rd && wr));

endmodule
