// tb_layer_chip: the second chip of the layer (segments 4..7, holding the
// three spare processors) on its own. The test bench plays the other chip:
// before time step s of each packet it drives 'ring_in' with the pixel that
// segment 3 would pass on, p*8 + ((4-s) mod 8), one step every 1+5 clocks.
// All 24 processors are loaded with random full-range coefficients through
// the four segment inputs. Checked per image: all 24 potentials against
// bias + sum(w*x) mod 2^13, the outputs of the 21 used processors against
// +/-Theta, the spare outputs held at 0, the pixel handed on at 'ring_out'
// in every time step, and the start-to-done latency.
`timescale 1ns/1ps
module tb_layer_chip;
  import nn_pkg::*;
  localparam int unsigned NP = IMG_PIX, FS = 4, NL = N_ROWS * PER_SEG;
  localparam int unsigned LAT = 1 + (NP / N_SEG) * N_SEG * (1 + BOOTH_N) + 2;

  logic clk = 0, rst_n = 0;
  cfg_t cfg = '0;
  theta_t theta = '0;
  logic start = 0, pkt_valid = 0;
  bus_t seg_in [N_ROWS];
  bus_t ring_in = '0, ring_out;
  logic pkt_ready, busy, done;
  logic [NL-1:0] out_i, out_j;
  acc_t potential [NL];
  int checks = 0, failures = 0;
  int w [NL][NP+1];
  int img [NP];

  layer_chip #(.FIRST_SEG(FS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int th);
    int v [NL]; int cyc;
    for (int k = 0; k < NL; k++) begin
      longint s = w[k][NP];
      logic [ACC_W-1:0] t;
      for (int p = 0; p < NP; p++) s += w[k][p] * img[p];
      t = s[ACC_W-1:0];
      v[k] = int'(signed'(t));
    end
    theta = theta_t'(th);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    for (int q = 0; q < NP / N_SEG; q++) begin
      while (!pkt_ready) begin @(negedge clk); cyc++; end
      for (int r = 0; r < N_ROWS; r++) seg_in[r] = bus_t'(img[q*N_SEG + FS + r]);
      pkt_valid = 1;
      @(negedge clk); cyc++;
      pkt_valid = 0;
      for (int st = 1; st < N_SEG; st++) begin
        check(ring_out == bus_t'(img[q*N_SEG + ((FS + N_ROWS - 1 - (st - 1) + N_SEG) % N_SEG)]),
              "pixel handed on at ring_out");
        ring_in = bus_t'(img[q*N_SEG + ((FS - st + N_SEG) % N_SEG)]);
        for (int r = 0; r < N_ROWS; r++) seg_in[r] = bus_t'($urandom);
        repeat (1 + BOOTH_N) begin @(negedge clk); cyc++; end
        ring_in = bus_t'($urandom);
      end
    end
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == LAT, $sformatf("latency %0d expected %0d", cyc, LAT));
    for (int k = 0; k < NL; k++) begin
      bit used = (FS * PER_SEG + k) < N_PAIRS;
      check(int'(potential[k]) == v[k], $sformatf("processor %0d potential", k));
      check(out_i[k] == (used && v[k] > th) && out_j[k] == (used && v[k] < -th),
            $sformatf("processor %0d outputs", k));
    end
  endtask

  initial begin
    for (int r = 0; r < N_ROWS; r++) seg_in[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int pl = 0; pl < PER_SEG; pl++)
      for (int p = 0; p <= NP; p++) begin
        cfg = '{valid: 1'b1, place: 3'(pl), addr: 9'(p)};
        for (int r = 0; r < N_ROWS; r++) begin
          w[r*PER_SEG + pl][p] = $urandom_range(63) - 32;
          seg_in[r] = bus_t'(w[r*PER_SEG + pl][p]);
        end
        @(negedge clk);
      end
    cfg = '0;
    for (int t = 0; t < 3; t++) begin
      for (int p = 0; p < NP; p++) img[p] = $urandom_range(15);
      run(t == 0 ? 0 : $urandom_range(1500));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
