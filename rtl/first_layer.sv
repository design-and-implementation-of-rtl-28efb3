// first_layer: the 48 neural processors of the first layer, on two chips,
// and their ring of bus segments.
//
// The 45 pair neurons (plus 3 spares, which run but whose outputs are held at
// 0) are placed as in the published floor plan: two columns, each of four
// rows of six neurons, a row lying between two bus segments; each column is
// one chip of 24 processors (layer_chip). Eight pixels enter in parallel, one
// per segment, and at each later time step every pixel moves on to the next
// segment, so that after eight time steps every neuron has seen all eight;
// then the next packet of eight enters. A 256-pixel image is entered in 32
// packets.
//
// Ring order (this design's choice, the document prints only an arrow): the
// segments are numbered 0..7 down the first column (rows 0..3, chip 0) and
// back up the second (chip 1). Segment g is fed by the input register of the
// first neuron of segment g-1 (mod 8); the two chips pass the ring to each
// other. External input g enters at segment g. Neuron n sits at place n%6 of
// segment n/6.
//
// Loading also uses the segments, which is why they are 6 bits wide: with a
// load command (nn_pkg::cfg_t, accepted only while idle) the eight segment
// inputs carry eight coefficients at once, one for the processor at the
// commanded place of each segment. 6 places x 257 addresses = 1542 load
// clocks fill the whole layer.
//
// The common threshold Theta is held in one register here, loaded with
// 'theta_we' while the layer is idle.
//
// Timing: 'start' (while idle) begins a classification; a packet of pixels
// (on the low 4 bits of 'seg_in') is taken in the clock where 'pkt_valid'
// and 'pkt_ready' are both high; 'done' is high once all outputs are valid,
// 1 + 32*48 + 2 = 1539 clocks after 'start' when packets are never held back.
module first_layer
  import nn_pkg::*;
#(
  parameter int unsigned N_PIX = nn_pkg::IMG_PIX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_t                 cfg,
  input  logic                 theta_we,
  input  theta_t               theta_in,
  input  logic                 start,
  input  logic                 pkt_valid,
  input  bus_t                 seg_in [N_SEG],
  output logic                 pkt_ready,
  output logic                 busy,
  output logic                 done,
  output logic [N_PAIRS-1:0]   out_i,
  output logic [N_PAIRS-1:0]   out_j,
  output acc_t                 potential [N_PHYS]
);

  localparam int unsigned N_LOCAL = N_ROWS * PER_SEG;   // processors per chip

  theta_t                    theta_q;
  bus_t                      ring [N_COLS];   // last segment of each chip
  bus_t                      chip_seg_in [N_COLS][N_ROWS];
  logic [N_COLS-1:0]         ready_v, busy_v, done_v;
  logic [N_PHYS-1:0]         oi_v, oj_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 theta_q <= '0;
    else if (theta_we && !busy) theta_q <= theta_in;
  end

  // Chip c holds segments 4c..4c+3; each chip's ring input is the other
  // chip's ring output.
  for (genvar c = 0; c < N_COLS; c++) begin : g_chip
    for (genvar r = 0; r < N_ROWS; r++) begin : g_seg
      assign chip_seg_in[c][r] = seg_in[c * N_ROWS + r];
    end
    layer_chip #(.N_PIX(N_PIX), .FIRST_SEG(c * N_ROWS)) u_chip (
      .clk, .rst_n, .cfg, .theta(theta_q), .start, .pkt_valid,
      .seg_in(chip_seg_in[c]), .ring_in(ring[(c + N_COLS - 1) % N_COLS]), .ring_out(ring[c]),
      .pkt_ready(ready_v[c]), .busy(busy_v[c]), .done(done_v[c]),
      .out_i(oi_v[c*N_LOCAL +: N_LOCAL]), .out_j(oj_v[c*N_LOCAL +: N_LOCAL]),
      .potential(potential[c*N_LOCAL +: N_LOCAL])
    );
  end

  assign pkt_ready = &ready_v;
  assign busy      = |busy_v;
  assign done      = &done_v;
  assign out_i     = oi_v[N_PAIRS-1:0];
  assign out_j     = oj_v[N_PAIRS-1:0];

  // Both chips run in lock step, so they agree on the handshake.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (ready_v == '0 || ready_v == '1) && (busy_v == '0 || busy_v == '1));
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cfg.valid |-> !busy);

endmodule
