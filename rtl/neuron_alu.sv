// neuron_alu: the single adder/subtractor of a neural processor.
//
// The same adder serves three purposes: it adds or subtracts the shifted
// coefficient during Booth multiplication (the product goes straight into the
// potential accumulator), it passes the bias coefficient when the accumulator
// is initialised, and it forms Theta - V and V + Theta for the rejection
// test, whose sign bit is reported on 'neg'. Sharing one adder follows the
// published neuron; the width of one guard bit above the 13-bit accumulator
// is this design's choice so that the threshold comparisons cannot overflow.
//
// Purely combinational: y = a (PASS), a + b (ADD) or a - b (SUB).
module neuron_alu
  import nn_pkg::*;
#(
  parameter int unsigned W = ALU_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  alu_op_e             op,
  output logic signed [W-1:0] y,
  output logic                neg
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      default: y = a;
    endcase
  end

  assign neg = y[W-1];

endmodule
