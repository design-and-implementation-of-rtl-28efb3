// tb_digit_recognizer: end-to-end test of the classifier at its default size.
//
// Builds ten random 16x16 class templates and derives, for each pair neuron
// (a/b), coefficients w = 2*(T_a - T_b) plus noise in {-1,0,1}, and a random
// bias. All 45 x 257 coefficients are loaded eight per clock on the segment
// inputs (6 places x 257 addresses = 1542 clocks). Images of class c are
// bright (12..15) on the template of c and dark (0..3) elsewhere; noise
// images are uniform 0..15. Each image is classified and compared with a
// reference model computed here: V = bias + sum(w*x) wrapped to 13 bits,
// out_i = V > Theta, out_j = V < -Theta, and the AND rule. The start-to-done
// latency is checked against 1 + 32*8*(1+5) + 2 = 1539 clocks plus the
// clocks in which the input was held back. Counted events that must each
// happen: a recognised image, a rejected image, an ambiguous neuron, a
// held-back packet, a threshold change between images, and both Booth add
// and subtract steps.
`timescale 1ns/1ps
module tb_digit_recognizer;
  import nn_pkg::*;

  localparam int unsigned NP    = IMG_PIX;
  localparam int unsigned NPKT  = NP / N_SEG;
  localparam int unsigned LAT   = 1 + NPKT * N_SEG * (1 + BOOTH_N) + 2;

  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0;
  logic [PL_W-1:0] cfg_place = '0;
  logic [CADDR_W-1:0] cfg_addr = '0;
  logic theta_we = 0;
  theta_t theta_in = '0;
  logic start = 0, pkt_valid = 0;
  bus_t seg_in [N_SEG];
  logic pkt_ready, busy, done, reject;
  logic [N_PAIRS-1:0] out_i, out_j;
  logic [N_CLASSES-1:0] class_and;

  digit_recognizer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_recog = 0, n_reject = 0, n_ambig = 0, n_stall = 0, n_theta = 0;
  int n_booth_add = 0, n_booth_sub = 0, n_load = 0;

  bit tmpl [N_CLASSES][NP];
  int w [N_PAIRS][NP+1];   // index NP = bias
  int img [NP];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Booth activity of neuron 0, seen through its operative part.
  always @(posedge clk) if (dut.u_layer1.g_chip[0].u_chip.g_neuron[0].u_np.ctl.booth_en) begin
    case (dut.u_layer1.g_chip[0].u_chip.g_neuron[0].u_np.u_dp.alu_op)
      ALU_ADD: n_booth_add++;
      ALU_SUB: n_booth_sub++;
      default: ;
    endcase
  end

  function automatic int wrap13(input longint v);
    logic [ACC_W-1:0] t;
    t = v[ACC_W-1:0];
    return int'(signed'(t));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic make_image(input int cls);  // cls < 0: noise
    for (int p = 0; p < NP; p++) begin
      if (cls < 0)               img[p] = $urandom_range(15);
      else if (tmpl[cls][p])     img[p] = 12 + $urandom_range(3);
      else                       img[p] = $urandom_range(3);
    end
  endtask

  task automatic classify(input int unsigned theta, input bit stalls);
    int v, cyc, held, a, b, n;
    bit ri [N_PAIRS]; bit rj [N_PAIRS];
    bit gate [N_CLASSES]; bit any;
    // reference
    any = 0;
    for (a = 0; a < N_CLASSES; a++) gate[a] = 1;
    n = 0;
    for (a = 0; a < N_CLASSES; a++)
      for (b = a + 1; b < N_CLASSES; b++) begin
        longint s = w[n][NP];
        for (int p = 0; p < NP; p++) s += w[n][p] * img[p];
        v = wrap13(s);
        ri[n] = v > int'(theta);
        rj[n] = v < -int'(theta);
        if (!ri[n] && !rj[n]) n_ambig++;
        if (!ri[n]) gate[a] = 0;
        if (!rj[n]) gate[b] = 0;
        n++;
      end
    // run
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; held = 0;
    for (int q = 0; q < NPKT; q++) begin
      if (stalls && ($urandom_range(3) == 0)) begin
        int h = 1 + $urandom_range(4);
        pkt_valid = 0;
        for (int i = 0; i < h; i++) begin
          if (pkt_ready) begin held++; n_stall++; end
          @(negedge clk); cyc++;
        end
      end
      for (int g = 0; g < N_SEG; g++) seg_in[g] = bus_t'(img[q*N_SEG+g]);
      pkt_valid = 1;
      while (!pkt_ready) begin @(negedge clk); cyc++; end
      @(negedge clk); cyc++;
      pkt_valid = 0;
      for (int g = 0; g < N_SEG; g++) seg_in[g] = bus_t'($urandom);
    end
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == LAT + held, $sformatf("latency %0d expected %0d", cyc, LAT + held));
    for (n = 0; n < N_PAIRS; n++) begin
      check(out_i[n] == ri[n] && out_j[n] == rj[n],
            $sformatf("neuron %0d outputs %b%b expected %b%b", n, out_i[n], out_j[n], ri[n], rj[n]));
    end
    for (a = 0; a < N_CLASSES; a++) begin
      check(class_and[class_label(a)] == gate[a], $sformatf("gate of digit %0d", class_label(a)));
      any |= gate[a];
    end
    check(reject == !any, "reject");
    if (any) n_recog++; else n_reject++;
  endtask

  initial begin
    for (int g = 0; g < N_SEG; g++) seg_in[g] = '0;
    for (int c = 0; c < N_CLASSES; c++)
      for (int p = 0; p < NP; p++) tmpl[c][p] = $urandom_range(1);
    begin
      int n = 0;
      for (int a = 0; a < N_CLASSES; a++)
        for (int b = a + 1; b < N_CLASSES; b++) begin
          for (int p = 0; p < NP; p++)
            w[n][p] = 2 * (int'(tmpl[a][p]) - int'(tmpl[b][p])) + $urandom_range(2) - 1;
          w[n][NP] = $urandom_range(63) - 32;
          n++;
        end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // load coefficients and biases
    // eight coefficients per clock on the segment inputs (spares get 0)
    for (int pl = 0; pl < PER_SEG; pl++)
      for (int p = 0; p <= NP; p++) begin
        cfg_valid = 1; cfg_place = PL_W'(pl); cfg_addr = CADDR_W'(p);
        for (int g = 0; g < N_SEG; g++) begin
          int n;
          n = g * PER_SEG + pl;
          seg_in[g] = (n < N_PAIRS) ? bus_t'(w[n][p]) : '0;
        end
        @(negedge clk);
        n_load++;
      end
    cfg_valid = 0;
    check(n_load == PER_SEG * (NP + 1), "load clocks");
    theta_in = 12'd300; theta_we = 1; @(negedge clk); theta_we = 0;
    // one image of every class, alternating smooth and held-back input
    for (int c = 0; c < N_CLASSES; c++) begin
      make_image(c);
      classify(300, c % 2);
    end
    // noise images
    for (int i = 0; i < 2; i++) begin make_image(-1); classify(300, 1); end
    // very high threshold: everything ambiguous, image rejected
    theta_in = 12'd4000; theta_we = 1; @(negedge clk); theta_we = 0; n_theta++;
    make_image(3);
    classify(4000, 0);
    check(n_recog > 0,     "no image recognised");
    check(n_reject > 0,    "no image rejected");
    check(n_ambig > 0,     "no ambiguous neuron");
    check(n_stall > 0,     "no held-back packet");
    check(n_theta > 0,     "no threshold change");
    check(n_booth_add > 0 && n_booth_sub > 0, "Booth add/sub not both seen");
    $display("events: recognised=%0d rejected=%0d ambiguous=%0d stalls=%0d booth_add=%0d booth_sub=%0d",
             n_recog, n_reject, n_ambig, n_stall, n_booth_add, n_booth_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
