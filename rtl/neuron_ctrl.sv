// neuron_ctrl: autonomous controller of one neural processor.
//
// A state machine that sequences one classification and handles loading:
//
//   IDLE  load commands for this neuron's place on its segment write the
//         word on the segment input into the local memory (addr < N_PIX)
//         or into the bias register (addr == N_PIX).
//         'start' initialises V with the bias and clears the outputs.
//   WAIT  waits for a packet of N_SEG pixels ('pkt_ready' high); with
//         'pkt_valid' the input register takes this segment's external pixel.
//   MUL   BOOTH_N (5) clocks of Booth steps on the pixel in the input
//         register, with the coefficient read from the local memory.
//   SHIFT the pixel moves one segment along the ring: the input register
//         takes the upstream bus. After N_SEG-1 shifts every neuron has seen
//         all pixels of the packet and the next packet is awaited.
//   TH_I, TH_J  rejection test with the shared adder; the binary outputs
//         out_i = (V > Theta) and out_j = (V < -Theta) are latched here,
//         so the neuron needs no output register; then 'done' rises.
//
// Coefficient address: in time step s of packet p the input register holds
// the pixel entered on segment (seg - s) mod N_SEG, i.e. pixel
// p*N_SEG + ((seg - s) mod N_SEG); the segment number comes from the
// identification register. The memory is therefore filled in pixel order
// whatever the neuron's place in the ring.
//
// Timing with 'pkt_valid' always high: 1 + (N_PIX/N_SEG)*N_SEG*(1+BOOTH_N) + 2
// clocks from 'start' to 'done' (1539 at the default sizes).
// The step order, the ring addressing and the sequencing are the published
// scheme (8 inputs in parallel, 8 time steps per packet, 32 packets); the
// state encoding, the handshake and the exact cycle split are this design's.
module neuron_ctrl
  import nn_pkg::*;
#(
  parameter int unsigned N_PIX = nn_pkg::IMG_PIX,
  parameter int unsigned AW    = $clog2(N_PIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ident_t        ident,
  input  cfg_t          cfg,
  input  logic          start,
  input  logic          pkt_valid,
  input  logic          alu_neg,
  output np_ctrl_t      ctl,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic          pkt_ready,
  output logic          busy,
  output logic          done,
  output logic          out_i,
  output logic          out_j
);

  localparam int unsigned N_PKT = N_PIX / N_SEG;
  localparam int unsigned PW    = AW - SEG_W;

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_MUL, S_SHIFT, S_TH_I, S_TH_J} state_e;

  state_e          state;
  logic [PW-1:0]   pkt;
  logic [SEG_W-1:0] step;
  logic [BK_W-1:0] k;
  logic            cfg_hit;

  assign cfg_hit = cfg.valid && (cfg.place == ident.place) && (state == S_IDLE);

  // Control word and memory port.
  always_comb begin
    ctl      = '0;
    mem_en   = 1'b0;
    mem_we   = 1'b0;
    mem_addr = {pkt, SEG_W'(ident.seg - step)};
    unique case (state)
      S_IDLE: begin
        ctl.acc_init = start;
        if (cfg_hit && cfg.addr < CADDR_W'(N_PIX)) begin
          mem_en   = 1'b1;
          mem_we   = 1'b1;
          mem_addr = cfg.addr[AW-1:0];
        end
        ctl.bias_we = cfg_hit && (cfg.addr == CADDR_W'(N_PIX));
      end
      S_WAIT: begin
        ctl.ld_ext = pkt_valid;
        mem_en     = pkt_valid;
        mem_addr   = {pkt, ident.seg};
      end
      S_MUL: begin
        ctl.booth_en = 1'b1;
        ctl.booth_k  = k;
      end
      S_SHIFT: begin
        ctl.ld_bus = 1'b1;
        mem_en     = 1'b1;
        mem_addr   = {pkt, SEG_W'(ident.seg - step - 1'b1)};
      end
      S_TH_I: ctl.th_i = 1'b1;
      S_TH_J: ctl.th_j = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pkt   <= '0;
      step  <= '0;
      k     <= '0;
      done  <= 1'b0;
      out_i <= 1'b0;
      out_j <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pkt   <= '0;
          done  <= 1'b0;
          out_i <= 1'b0;
          out_j <= 1'b0;
          state <= S_WAIT;
        end
        S_WAIT: if (pkt_valid) begin
          step  <= '0;
          k     <= '0;
          state <= S_MUL;
        end
        S_MUL: begin
          k <= k + 1'b1;
          if (k == BK_W'(BOOTH_N - 1)) begin
            if (step != SEG_W'(N_SEG - 1)) begin
              state <= S_SHIFT;
            end else if (pkt != PW'(N_PKT - 1)) begin
              pkt   <= pkt + 1'b1;
              state <= S_WAIT;
            end else begin
              state <= S_TH_I;
            end
          end
        end
        S_SHIFT: begin
          step  <= step + 1'b1;
          k     <= '0;
          state <= S_MUL;
        end
        S_TH_I: begin
          out_i <= alu_neg && ident.enable;
          state <= S_TH_J;
        end
        S_TH_J: begin
          out_j <= alu_neg && ident.enable;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign pkt_ready = (state == S_WAIT);
  assign busy      = (state != S_IDLE);

endmodule
