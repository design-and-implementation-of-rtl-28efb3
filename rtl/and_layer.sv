// and_layer: the second layer, ten AND gates of nine inputs each.
//
// Gate c (digit c) is 1 when every one of the nine pair neurons involving
// class c votes for c: out_i of neuron (c/j) and out_j of neuron (j/c). An
// image whose gates are all 0 is rejected. Because a neuron can vote for at
// most one of its two classes, at most one gate can be 1. This is the
// published decision rule; the 'reject' output (NOR of the gates) makes the
// rejection explicit. Purely combinational.
module and_layer
  import nn_pkg::*;
(
  input  logic [N_PAIRS-1:0]   out_i,
  input  logic [N_PAIRS-1:0]   out_j,
  output logic [N_CLASSES-1:0] class_and,  // bit d = AND gate of digit d
  output logic                 reject
);

  for (genvar k = 0; k < N_CLASSES; k++) begin : g_gate
    logic [N_CLASSES-2:0] votes;
    for (genvar m = 0; m < N_CLASSES - 1; m++) begin : g_in
      localparam int unsigned J = (m < k) ? m : m + 1;
      if (J > k) begin : g_first
        assign votes[m] = out_i[pair_index(k, J)];
      end else begin : g_second
        assign votes[m] = out_j[pair_index(J, k)];
      end
    end
    assign class_and[class_label(k)] = &votes;
  end

  assign reject = ~|class_and;

endmodule
