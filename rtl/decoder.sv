// decoder: n-to-2^n one-hot decoder.
//
// Output bit y[i] is 1 exactly when sel == i, so exactly one output is high at
// all times. The ARC datapath uses three of these at WIDTH = 6 (the A-, B- and
// C-bus decoders, whose outputs select the numbered registers), the
// instruction decoders use them on IR fields, and the control unit uses one on
// its state register to produce the State_N wires. Purely combinational.
module decoder #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0]      sel,
  output logic [(1<<WIDTH)-1:0] y
);

  always_comb begin
    for (int unsigned i = 0; i < (1 << WIDTH); i++) begin
      y[i] = (sel == WIDTH'(i));
    end
  end

endmodule
