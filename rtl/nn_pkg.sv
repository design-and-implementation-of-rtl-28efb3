// nn_pkg: sizes, types and helper functions shared by the pairwise digit
// classifier.
//
// The classifier has one layer of 45 binary "pair" neurons, one for every
// pair of the ten digit classes, followed by ten 9-input AND gates. Inputs are
// 16x16 images with 4-bit unsigned gray levels; coefficients are 6-bit two's
// complement numbers; the potential is accumulated in 13 bits. These numbers
// follow the published design. The threshold width, the configuration bus
// and load command fields and the control word are choices of this
// implementation.
//
// Class order: neurons and AND gates use the class index k = 0..9, which
// stands for the digits 1,2,...,9,0 in that order. Neuron n separates class
// index a from class index b (a < b) and the neurons are numbered in
// lexicographic order of (a,b): n=0 is 1/2, n=1 is 1/3, ..., n=44 is 9/0.
package nn_pkg;

  localparam int unsigned IMG_PIX   = 256;  // pixels per image (16x16)
  localparam int unsigned PIX_W     = 4;    // gray-level bits, unsigned
  localparam int unsigned COEF_W    = 6;    // coefficient bits, two's complement
  localparam int unsigned ACC_W     = 13;   // potential accumulator bits
  localparam int unsigned ALU_W     = ACC_W + 1; // adder width (one guard bit)
  localparam int unsigned TH_W      = 12;   // rejection threshold bits, unsigned
  localparam int unsigned BUS_W     = 6;    // width of the bus segments
  localparam int unsigned N_SEG     = 8;    // bus segments = inputs entered in parallel
  localparam int unsigned SEG_W     = 3;    // log2(N_SEG)
  localparam int unsigned N_COLS    = 2;    // columns of the folded layer
  localparam int unsigned N_ROWS    = 4;    // rows per column
  localparam int unsigned PER_SEG   = 6;    // neurons attached to one bus segment
  localparam int unsigned N_PHYS    = N_SEG * PER_SEG; // 48 neural processors
  localparam int unsigned N_CLASSES = 10;
  localparam int unsigned N_PAIRS   = N_CLASSES * (N_CLASSES - 1) / 2; // 45
  localparam int unsigned CADDR_W   = 9;    // configuration address width
  localparam int unsigned BOOTH_N   = PIX_W + 1; // radix-2 Booth digits of an unsigned pixel
  localparam int unsigned BK_W      = 3;    // width of the Booth digit index

  typedef logic        [PIX_W-1:0]  pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [ALU_W-1:0]  alu_t;
  typedef logic        [TH_W-1:0]   theta_t;

  localparam int unsigned PL_W      = 3;    // width of a place number 0..PER_SEG-1

  typedef logic [BUS_W-1:0] bus_t;

  // Load command, broadcast to all neural processors. The data itself
  // travels on the bus segments: in one clock the eight segment inputs carry
  // eight coefficients, one for the processor at place 'place' of each
  // segment. addr < N_PIX writes that pixel's coefficient into the local
  // memory; addr == N_PIX writes the bias coefficient (weight of the
  // constant +1 input).
  typedef struct packed {
    logic               valid;
    logic [PL_W-1:0]    place;
    logic [CADDR_W-1:0] addr;
  } cfg_t;

  // Identification register: the bus segment this processor is attached to,
  // its place on that segment, and whether its outputs are used.
  typedef struct packed {
    logic [SEG_W-1:0] seg;
    logic [PL_W-1:0]  place;
    logic             enable;
  } ident_t;

  typedef enum logic [1:0] {ALU_PASS, ALU_ADD, ALU_SUB} alu_op_e;

  // Control word from a neuron's controller to its operative part.
  typedef struct packed {
    logic            acc_init;  // accumulator <= bias coefficient
    logic            ld_ext;    // input register <= external pixel
    logic            ld_bus;    // input register <= upstream bus segment
    logic            booth_en;  // one Booth step into the accumulator
    logic [BK_W-1:0] booth_k;   // Booth digit index 0..PIX_W
    logic            th_i;      // ALU computes Theta - V
    logic            th_j;      // ALU computes V + Theta
    logic            bias_we;   // bias register <= segment input
  } np_ctrl_t;

  // Digit printed for class index k.
  function automatic int unsigned class_label(input int unsigned k);
    return (k + 1) % N_CLASSES;
  endfunction

  // Neuron number of the pair (a,b), a < b, class indices.
  function automatic int unsigned pair_index(input int unsigned a, input int unsigned b);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < a; i++) n += N_CLASSES - 1 - i;
    return n + (b - a - 1);
  endfunction

  // Ring position (bus segment) of neural processor n.
  function automatic int unsigned seg_of(input int unsigned n);
    return n / PER_SEG;
  endfunction

endpackage
