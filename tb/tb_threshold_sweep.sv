// tb_threshold_sweep: the recognition / rejection / error trade-off of the
// classifier, with coefficients quantised to 6 bits and to 4 bits.
//
// Synthetic stand-in for a digit data base: ten random class templates;
// each test image of class c copies, pixel by pixel, c's template with
// probability 0.8 (clear images) or 0.45 (ambiguous images) and the
// template of one other class otherwise, as a badly written digit would. Real-valued pair weights r = (T_a - T_b) + noise are
// quantised to 6-bit (round(6r)) and to 4-bit (round(1.5r)) integers, both
// loaded as 6-bit two's complement words, the 4-bit ones sign-extended. The
// same 20 images are classified at three thresholds per coefficient set
// (the 4-bit thresholds scaled by 1.5/6). Every result is checked against a
// reference model, and the table of well classified / rejected /
// misclassified images is printed. Because a larger threshold can only turn
// votes off, rejections must not fall and errors must not rise as the
// threshold grows; both are checked, and images must be recognised at the
// lowest threshold.
`timescale 1ns/1ps
module tb_threshold_sweep;
  import nn_pkg::*;

  localparam int unsigned NP = IMG_PIX, N_IMG = 20, N_TH = 3;

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
  bit  tmpl [N_CLASSES][NP];
  real r [N_PAIRS][NP+1];
  int  w [N_PAIRS][NP+1];
  int  img [N_IMG][NP];
  int  label [N_IMG];
  int  mix [N_IMG];

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int quant(input real x, input int lo, input int hi);
    int q;
    q = (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
    if (q < lo) q = lo;
    if (q > hi) q = hi;
    return q;
  endfunction

  task automatic load(input real scale, input int lo, input int hi);
    for (int n = 0; n < N_PAIRS; n++)
      for (int p = 0; p <= NP; p++) w[n][p] = quant(r[n][p] * scale, lo, hi);
    for (int pl = 0; pl < PER_SEG; pl++)
      for (int p = 0; p <= NP; p++) begin
        cfg_valid = 1; cfg_place = PL_W'(pl); cfg_addr = CADDR_W'(p);
        for (int g = 0; g < N_SEG; g++) begin
          int n;
          n = g * PER_SEG + pl;
          seg_in[g] = (n < N_PAIRS) ? bus_t'(w[n][p]) : '0;
        end
        @(negedge clk);
      end
    cfg_valid = 0;
  endtask

  // Classify image i; returns the recognised class index or -1.
  task automatic classify(input int i, input int th, output int result);
    bit gate [N_CLASSES];
    int n, v, hits;
    logic [ACC_W-1:0] t;
    longint s;
    for (int a = 0; a < N_CLASSES; a++) gate[a] = 1;
    n = 0;
    for (int a = 0; a < N_CLASSES; a++)
      for (int b = a + 1; b < N_CLASSES; b++) begin
        s = w[n][NP];
        for (int p = 0; p < NP; p++) s += w[n][p] * img[i][p];
        t = s[ACC_W-1:0];
        v = int'(signed'(t));
        if (!(v > th))  gate[a] = 0;
        if (!(v < -th)) gate[b] = 0;
        n++;
      end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int q = 0; q < NP / N_SEG; q++) begin
      for (int g = 0; g < N_SEG; g++) seg_in[g] = bus_t'(img[i][q*N_SEG + g]);
      pkt_valid = 1;
      @(negedge clk);
      while (!pkt_ready && !done && pkt_valid) begin
        // packet is taken at the next ready clock
        @(negedge clk);
      end
    end
    pkt_valid = 0;
    while (!done) @(negedge clk);
    result = -1; hits = 0;
    for (int a = 0; a < N_CLASSES; a++) begin
      check(class_and[class_label(a)] == gate[a], $sformatf("image %0d gate %0d", i, a));
      if (gate[a]) begin result = a; hits++; end
    end
    check(reject == (hits == 0), "reject");
    check(hits <= 1, "at most one gate");
  endtask

  initial begin
    int ths [2][N_TH];
    real scales [2];
    int lo [2], hi [2], bits [2];
    int wc [2][N_TH], rej [2][N_TH], mc [2][N_TH];
    ths[0] = '{0, 600, 1500};
    ths[1] = '{0, 150, 375};
    scales = '{6.0, 1.5};
    lo = '{-32, -8}; hi = '{31, 7}; bits = '{6, 4};
    for (int g = 0; g < N_SEG; g++) seg_in[g] = '0;
    for (int c = 0; c < N_CLASSES; c++)
      for (int p = 0; p < NP; p++) tmpl[c][p] = $urandom_range(1);
    begin
      int n;
      n = 0;
      for (int a = 0; a < N_CLASSES; a++)
        for (int b = a + 1; b < N_CLASSES; b++) begin
          for (int p = 0; p < NP; p++)
            r[n][p] = real'(int'(tmpl[a][p]) - int'(tmpl[b][p]))
                      + (real'($urandom_range(1000)) / 1000.0 - 0.5);
          r[n][NP] = real'($urandom_range(1000)) / 250.0 - 2.0;
          n++;
        end
    end
    for (int i = 0; i < N_IMG; i++) begin
      label[i] = (i / 2) % N_CLASSES;
      mix[i] = (label[i] + 1 + $urandom_range(N_CLASSES - 2)) % N_CLASSES;
      for (int p = 0; p < NP; p++) begin
        int src;
        src = ($urandom_range(99) < ((i % 2) ? 80 : 45)) ? label[i] : mix[i];
        img[i][p] = tmpl[src][p] ? 6 + $urandom_range(4) : $urandom_range(3);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int set = 0; set < 2; set++) begin
      load(scales[set], lo[set], hi[set]);
      for (int k = 0; k < N_TH; k++) begin
        theta_in = theta_t'(ths[set][k]); theta_we = 1; @(negedge clk); theta_we = 0;
        wc[set][k] = 0; rej[set][k] = 0; mc[set][k] = 0;
        for (int i = 0; i < N_IMG; i++) begin
          int res;
          classify(i, ths[set][k], res);
          if (res < 0)              rej[set][k]++;
          else if (res == label[i]) wc[set][k]++;
          else                      mc[set][k]++;
        end
        $display("coefficients %0d bits, Theta %4d: well classified %2d, rejected %2d, misclassified %2d (of %0d)",
                 bits[set], ths[set][k], wc[set][k], rej[set][k], mc[set][k], N_IMG);
        if (k > 0) begin
          check(rej[set][k] >= rej[set][k-1], "rejections fell as Theta rose");
          check(mc[set][k] <= mc[set][k-1], "errors rose as Theta rose");
        end
      end
      check(wc[set][0] > 0, "nothing recognised at the lowest threshold");
      check(rej[set][N_TH-1] > rej[set][0], "a higher threshold rejected nothing more");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
