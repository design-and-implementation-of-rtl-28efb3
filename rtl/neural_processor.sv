// neural_processor: one complete neuron (i/j) of the first layer.
//
// Computes the potential V = w_bias + sum_p w_p * x_p over the N_PIX pixels
// of an image (4-bit unsigned pixels, 6-bit signed coefficients, 13-bit
// accumulator), then gives two binary outputs against the common threshold
// Theta: out_i = 1 if V > Theta (the image looks like class i), out_j = 1 if
// V < -Theta (class j), both 0 if |V| <= Theta (ambiguous, used for
// rejection). It consists of the three parts of the published processor:
// the operative part (neuron_datapath), the controller (neuron_ctrl) and the
// local memory of 256 six-bit coefficients (coef_mem).
//
// Interface: while idle, a load command on 'cfg' naming this processor's
// place writes the 6-bit word on 'ext_in' (the segment input) into the local
// memory or the bias register; 'start' begins a classification; pixels arrive one packet at a time ('pkt_valid' while
// 'pkt_ready'), this neuron taking 'ext_in' at the start of each packet and
// then 'bus_in' (the upstream segment) at each later time step; 'bus_out'
// carries its input register to the downstream segment. 'done' rises when
// out_i/out_j are valid and stays high until the next 'start'.
module neural_processor
  import nn_pkg::*;
#(
  parameter int unsigned N_PIX = nn_pkg::IMG_PIX,
  parameter ident_t      ID    = '{seg: '0, place: '0, enable: 1'b1}
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cfg_t   cfg,
  input  theta_t theta,
  input  logic   start,
  input  logic   pkt_valid,
  input  bus_t   ext_in,
  input  bus_t   bus_in,
  output bus_t   bus_out,
  output logic   pkt_ready,
  output logic   busy,
  output logic   done,
  output logic   out_i,
  output logic   out_j,
  output acc_t   potential
);

  localparam int unsigned AW = $clog2(N_PIX);

  np_ctrl_t        ctl;
  ident_t          ident;
  logic            alu_neg;
  logic            mem_en, mem_we;
  logic [AW-1:0]   mem_addr;
  logic [COEF_W-1:0] mem_rdata;

  neuron_datapath #(.ID(ID)) u_dp (
    .clk, .rst_n, .ctl, .ext_in, .bus_in,
    .coef(coef_t'(mem_rdata)), .theta,
    .bus_out, .ident, .potential, .alu_neg
  );

  neuron_ctrl #(.N_PIX(N_PIX)) u_ctrl (
    .clk, .rst_n, .ident, .cfg, .start, .pkt_valid, .alu_neg,
    .ctl, .mem_en, .mem_we, .mem_addr, .pkt_ready, .busy, .done, .out_i, .out_j
  );

  coef_mem #(.DEPTH(N_PIX), .WIDTH(COEF_W)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
    .wdata(ext_in[COEF_W-1:0]), .rdata(mem_rdata)
  );

endmodule
