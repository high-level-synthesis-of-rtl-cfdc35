// dp_mult: one multiplier resource (M1 or M2) of the datapath.
//
// Combinational WIDTH x WIDTH multiply whose product is kept modulo
// 2**WIDTH, so that every value in the datapath, inputs, temporaries t1..t3
// and the result f, has the same width as the registers that hold them.
// The result is ready within the control step in which the operands are
// presented; the surrounding registers capture it at the end of the step.
// The two multipliers follow the allocation of the design; the width and the
// truncation of the product are this design's choices.
module dp_mult #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] op_a,
  input  logic [WIDTH-1:0] op_b,
  output logic [WIDTH-1:0] prod
);

  // The assignment context is WIDTH bits wide, so the product is evaluated
  // modulo 2**WIDTH.
  always_comb prod = op_a * op_b;

endmodule
