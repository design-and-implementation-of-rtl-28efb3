// layer_chip: one chip of the first layer, 24 neural processors.
//
// The published layer of 48 processors is folded into two columns and fits
// on two chips of 24 processors each; this module is one such chip, taken to
// be one column: four rows of six processors, each row on one bus segment.
// The chip holds segments FIRST_SEG .. FIRST_SEG+3 of the eight-segment ring.
// Segment FIRST_SEG is fed from 'ring_in' (the last segment of the other
// chip), each later segment from the input register of the first processor
// of the segment before it, and the first processor of the chip's last
// segment drives 'ring_out' to the other chip. 'seg_in' are the chip's four
// external segment inputs (pixels, or coefficients while loading).
//
// Processor k of the chip (k = 0..23) is global neuron FIRST_SEG*6 + k, at
// place k%6 of segment FIRST_SEG + k/6; its identification register is set
// from that. Neurons 45..47 are spares whose outputs stay 0.
//
// The handshake outputs combine the chip's processors (all in lock step):
// 'pkt_ready' and 'done' are ANDs, 'busy' an OR. Timing is that of the
// processors: see neuron_ctrl. Which column goes on which chip is this
// design's choice; the document says only that the layer fits on two chips.
module layer_chip
  import nn_pkg::*;
#(
  parameter int unsigned N_PIX     = nn_pkg::IMG_PIX,
  parameter int unsigned FIRST_SEG = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cfg_t   cfg,
  input  theta_t theta,
  input  logic   start,
  input  logic   pkt_valid,
  input  bus_t   seg_in [N_ROWS],
  input  bus_t   ring_in,
  output bus_t   ring_out,
  output logic   pkt_ready,
  output logic   busy,
  output logic   done,
  output logic [N_ROWS*PER_SEG-1:0] out_i,
  output logic [N_ROWS*PER_SEG-1:0] out_j,
  output acc_t   potential [N_ROWS*PER_SEG]
);

  localparam int unsigned N_LOCAL = N_ROWS * PER_SEG;

  bus_t                bus_out [N_LOCAL];
  logic [N_LOCAL-1:0]  ready_v, busy_v, done_v;

  for (genvar k = 0; k < N_LOCAL; k++) begin : g_neuron
    localparam int unsigned ROW = k / PER_SEG;
    localparam int unsigned N   = FIRST_SEG * PER_SEG + k;
    localparam ident_t ID = '{seg: SEG_W'(FIRST_SEG + ROW), place: PL_W'(k % PER_SEG),
                              enable: (N < N_PAIRS)};
    bus_t up;
    if (ROW == 0) begin : g_from_other_chip
      assign up = ring_in;
    end else begin : g_from_row_above
      assign up = bus_out[(ROW - 1) * PER_SEG];
    end
    neural_processor #(.N_PIX(N_PIX), .ID(ID)) u_np (
      .clk, .rst_n, .cfg, .theta, .start, .pkt_valid,
      .ext_in(seg_in[ROW]), .bus_in(up), .bus_out(bus_out[k]),
      .pkt_ready(ready_v[k]), .busy(busy_v[k]), .done(done_v[k]),
      .out_i(out_i[k]), .out_j(out_j[k]), .potential(potential[k])
    );
  end

  assign ring_out  = bus_out[(N_ROWS - 1) * PER_SEG];
  assign pkt_ready = &ready_v;
  assign busy      = |busy_v;
  assign done      = &done_v;

endmodule
