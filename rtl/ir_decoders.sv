// ir_decoders: the decoders on the fields of the instruction register that
// give the control unit its inputs in decoded form.
//
//   format decoder  IR[31:30] -> fmt[3:0]   set_br_op (00), call_op (01),
//                                            alu_op (10), mem_op (11)
//   op2 decoder     IR[24:22] -> op2[7:0]   branch (010), sethi (100), ...
//   op3 decoder     IR[24:19] -> op3[63:0]  ld (000000), st (000100),
//                                            addcc (010000), ...
//   cond decoder    IR[28:25] -> cond[15:0] branch condition field
//
// Each is a one-hot decoder, so output bit k of a vector is high when the field
// equals k; the commonly used outputs are also brought out by name. The first
// three decoders and their field positions follow the description of the
// control unit; the fourth (branch condition) is only mentioned there and is
// built the same way. Purely combinational.
module ir_decoders
  import arc_pkg::*;
(
  input  logic [31:0] ir,
  output logic [3:0]  fmt,
  output logic [7:0]  op2,
  output logic [63:0] op3,
  output logic [15:0] cond,
  output logic        set_br_op,
  output logic        call_op,
  output logic        alu_op,
  output logic        mem_op,
  output logic        branch,
  output logic        sethi,
  output logic        ld,
  output logic        st,
  output logic        addcc
);

  decoder #(.WIDTH(2)) u_fmt  (.sel(ir[31:30]), .y(fmt));
  decoder #(.WIDTH(3)) u_op2  (.sel(ir[24:22]), .y(op2));
  decoder #(.WIDTH(6)) u_op3  (.sel(ir[24:19]), .y(op3));
  decoder #(.WIDTH(4)) u_cond (.sel(ir[28:25]), .y(cond));

  assign set_br_op = fmt[FMT_SET_BR];
  assign call_op   = fmt[FMT_CALL];
  assign alu_op    = fmt[FMT_ALU];
  assign mem_op    = fmt[FMT_MEM];
  assign branch    = op2[OP2_BRANCH];
  assign sethi     = op2[OP2_SETHI];
  assign ld        = op3[OP3_LD];
  assign st        = op3[OP3_ST];
  assign addcc     = op3[OP3_ADDCC];

endmodule
