// digit_recognizer: complete pairwise classifier for 16x16 handwritten digits.
//
// An image of 256 four-bit pixels is classified by 45 binary neurons, one
// per pair of digit classes, each comparing its weighted sum with +/-Theta,
// and by ten 9-input AND gates: digit c is recognised when all nine neurons
// involving c vote for it, and the image is rejected when no gate fires.
// Raising Theta trades recognised images for fewer errors.
//
// The first layer (first_layer) holds the 48 neural processors, each with its
// own 256-word coefficient memory and controller; the second layer
// (and_layer) is plain logic. The pair outputs are brought out too, since
// the published system reads them directly.
//
// Interface:
//   cfg_*     load command while idle: place 0..5 on every segment, address
//             0..255 (pixel, row-major) or 256 (bias); the eight 6-bit
//             two's complement coefficients are on seg_in[0..7], the one on
//             seg_in[g] for neuron 6*g + place
//   theta_*   rejection threshold load while idle
//   start     begins a classification
//   seg_in    the eight segment inputs: coefficients while loading, or a
//             packet of eight pixels (pixel 8p+g on seg_in[g][3:0])
//   pkt_*     image handshake, 32 packets, each taken when
//             pkt_valid && pkt_ready
//   done      results valid (stays high until the next start);
//             class_and / reject are combinational from the latched
//             neuron outputs.
// Latency: 1539 clocks from start to done when packets are never held back.
module digit_recognizer
  import nn_pkg::*;
#(
  parameter int unsigned N_PIX = nn_pkg::IMG_PIX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_valid,
  input  logic [PL_W-1:0]        cfg_place,
  input  logic [CADDR_W-1:0]     cfg_addr,
  input  logic                   theta_we,
  input  theta_t                 theta_in,
  input  logic                   start,
  input  logic                   pkt_valid,
  input  bus_t                   seg_in [N_SEG],
  output logic                   pkt_ready,
  output logic                   busy,
  output logic                   done,
  output logic [N_PAIRS-1:0]     out_i,
  output logic [N_PAIRS-1:0]     out_j,
  output logic [N_CLASSES-1:0]   class_and,
  output logic                   reject
);

  cfg_t cfg;
  acc_t potential [N_PHYS];

  assign cfg = '{valid: cfg_valid, place: cfg_place, addr: cfg_addr};

  first_layer #(.N_PIX(N_PIX)) u_layer1 (
    .clk, .rst_n, .cfg, .theta_we, .theta_in, .start, .pkt_valid, .seg_in,
    .pkt_ready, .busy, .done, .out_i, .out_j, .potential
  );

  and_layer u_layer2 (.out_i, .out_j, .class_and, .reject);

endmodule
