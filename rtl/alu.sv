// alu: the 16-function ARC ALU.
//
// f = fn(a, b). The four *CC functions also produce condition codes:
// n = f[31], z = (f == 0), and for ADDCC the signed overflow v and carry-out
// c of a + b; the logical *CC functions clear v and c. set_cc tells the
// datapath that the condition code register is to be loaded. Functions that
// ignore the B operand are listed with "A only".
//
//   0000 ANDCC   a & b            1000 AND      a & b
//   0001 ORCC    a | b            1001 LSHIFT2  a << 2          (A only)
//   0010 NORCC   ~(a | b)         1010 LSHIFT10 a << 10         (A only)
//   0011 ADDCC   a + b            1011 SIMM13   zero-ext a[12:0] (A only)
//   0100 SRL     a >> b[4:0]      1100 SEXT13   sign-ext a[12:0] (A only)
//   0101 ADD     a + b            1101 INC      a + 1           (A only)
//   0110 OR      a | b            1110 INCPC    a + 4           (A only)
//   0111 NOR     ~(a | b)         1111 RSHIFT5  a >>> 5         (A only)
//
// ADD = 0101, ADDCC = 0011 and SEXT13 = 1100 are fixed by the control words
// this CPU uses; the remaining functions and codes follow the usual ARC
// function table, with AND moved to 1000 because ADD holds 0101 here.
// Purely combinational.
module alu
  import arc_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_fn_e      fn,
  output logic [W-1:0] f,
  output cc_t          cc,
  output logic         set_cc
);

  logic [W:0] sum;   // a + b with carry-out

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    unique case (fn)
      ALU_ANDCC, ALU_AND: f = a & b;
      ALU_ORCC,  ALU_OR:  f = a | b;
      ALU_NORCC, ALU_NOR: f = ~(a | b);
      ALU_ADDCC, ALU_ADD: f = sum[W-1:0];
      ALU_SRL:            f = a >> b[4:0];
      ALU_LSHIFT2:        f = a << 2;
      ALU_LSHIFT10:       f = a << 10;
      ALU_SIMM13:         f = W'(a[12:0]);
      ALU_SEXT13:         f = W'(signed'(a[12:0]));
      ALU_INC:            f = a + W'(1);
      ALU_INCPC:          f = a + W'(4);
      ALU_RSHIFT5:        f = W'(signed'(a) >>> 5);
      default:            f = '0;
    endcase
  end

  always_comb begin
    set_cc = is_cc_fn(fn);
    cc.n   = f[W-1];
    cc.z   = (f == '0);
    cc.v   = (fn == ALU_ADDCC) && (a[W-1] == b[W-1]) && (f[W-1] != a[W-1]);
    cc.c   = (fn == ALU_ADDCC) && sum[W];
  end

endmodule
