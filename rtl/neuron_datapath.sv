// neuron_datapath: operative part of one neural processor (neuron i/j).
//
// Holds the input register, the identification register, the bias register
// and the 13-bit potential accumulator V, around the shared adder/subtractor
// (neuron_alu). The product pixel x coefficient is formed by radix-2 Booth
// recoding of the pixel: the unsigned 4-bit pixel x is read as the 5-bit
// signed number 0x3x2x1x0, whose Booth digits d_k = x[k-1] - x[k]
// (k = 0..4, x[-1] = x[4] = 0) are in {-1,0,+1}. In Booth step k the
// coefficient, sign-extended and shifted left by k, is added (d_k = +1),
// subtracted (d_k = -1) or skipped, directly into V, so the product is never
// held on its own. V wraps modulo 2^13, as a 13-bit register does.
//
// Rejection test: with 'th_i' the ALU forms Theta - V and with 'th_j' it
// forms V + Theta, both one bit wider than V; 'alu_neg' is the sign, so it
// is 1 when V > Theta (th_i) or V < -Theta (th_j). The controller latches it.
//
// The input register loads either the value entered from outside on this
// segment (ld_ext) or the pixel on the upstream bus segment (ld_bus), and its
// value drives 'bus_out', from which the next segment of the ring is fed.
// Bus segments are 6 bits wide so that they can also carry coefficients;
// a pixel travels on the low 4 bits. The bias register loads from the
// segment input (bias_we) during loading.
//
// Booth multiplication, the shared adder and the 4/6/13-bit widths follow the
// published neuron. The bias register (weight of the constant +1 input, which
// the 256-word memory has no room for) and the identification register being
// fixed at reset from the ID parameter are this design's choices.
// Timing: every action takes one clock; all registers are written at the
// rising edge when their control bit is high.
// In synthesis the identification register and the two upper bits of
// 'bus_out' are constants: the former never changes after reset, the latter
// are 0 because a pixel uses only the low 4 bits of a segment.
module neuron_datapath
  import nn_pkg::*;
#(
  parameter ident_t ID = '{seg: '0, place: '0, enable: 1'b1}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  np_ctrl_t         ctl,
  input  bus_t             ext_in,    // value entered from outside on this segment
  input  bus_t             bus_in,    // upstream bus segment
  input  coef_t            coef,      // coefficient read from the local memory
  input  theta_t           theta,     // common rejection threshold
  output bus_t             bus_out,   // input register, drives the downstream segment
  output ident_t           ident,
  output acc_t             potential,
  output logic             alu_neg
);

  pix_t    in_reg;
  coef_t   bias_reg;
  acc_t    acc;
  ident_t  id_reg;
  alu_t    alu_a, alu_b, alu_y;
  alu_op_e alu_op;
  logic [1:0] booth_pair;
  logic [PIX_W+1:0] x_ext;

  // {0, x, 0}: bits (k+1, k) of this vector are (x[k], x[k-1]).
  assign x_ext      = {1'b0, in_reg, 1'b0};
  assign booth_pair = x_ext[ctl.booth_k +: 2];

  always_comb begin
    alu_a  = alu_t'(acc);
    alu_b  = alu_t'(coef) <<< ctl.booth_k;
    alu_op = ALU_PASS;
    if (ctl.acc_init) begin
      alu_a  = alu_t'(bias_reg);
    end else if (ctl.th_i) begin
      alu_a  = alu_t'(theta);
      alu_b  = alu_t'(acc);
      alu_op = ALU_SUB;
    end else if (ctl.th_j) begin
      alu_b  = alu_t'(theta);
      alu_op = ALU_ADD;
    end else if (ctl.booth_en) begin
      unique case (booth_pair)
        2'b01:   alu_op = ALU_ADD;   // d_k = +1
        2'b10:   alu_op = ALU_SUB;   // d_k = -1
        default: alu_op = ALU_PASS;  // d_k = 0
      endcase
    end
  end

  neuron_alu #(.W(ALU_W)) u_alu (
    .a(alu_a), .b(alu_b), .op(alu_op), .y(alu_y), .neg(alu_neg)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_reg   <= '0;
      bias_reg <= '0;
      acc      <= '0;
      id_reg   <= ID;
    end else begin
      if (ctl.ld_ext)      in_reg <= ext_in[PIX_W-1:0];
      else if (ctl.ld_bus) in_reg <= bus_in[PIX_W-1:0];
      if (ctl.bias_we)     bias_reg <= coef_t'(ext_in[COEF_W-1:0]);
      if (ctl.acc_init || ctl.booth_en) acc <= acc_t'(alu_y);
    end
  end

  assign bus_out   = bus_t'(in_reg);
  assign ident     = id_reg;
  assign potential = acc;

endmodule
