// tb_first_layer: the 48-processor first layer with its ring of bus segments.
// Every processor, the three spares included, gets random coefficients over
// the full 6-bit range and a random bias, loaded eight at a time on the
// segment inputs, so the potentials exercise the
// 13-bit wrap-around. Random images are entered in packets of eight, with and
// without held-back packets. Checked per image: all 48 potentials against
// bias + sum(w*x) mod 2^13, the 45 pairs of binary outputs against +/-Theta,
// the latency, and that a threshold write while busy is ignored.
`timescale 1ns/1ps
module tb_first_layer;
  import nn_pkg::*;
  localparam int unsigned NP = IMG_PIX;
  localparam int unsigned LAT = 1 + (NP / N_SEG) * N_SEG * (1 + BOOTH_N) + 2;

  logic clk = 0, rst_n = 0;
  cfg_t cfg = '0;
  logic theta_we = 0;
  theta_t theta_in = '0;
  logic start = 0, pkt_valid = 0;
  bus_t seg_in [N_SEG];
  logic pkt_ready, busy, done;
  logic [N_PAIRS-1:0] out_i, out_j;
  acc_t potential [N_PHYS];
  int checks = 0, failures = 0, n_stall = 0, n_wrap = 0;
  int w [N_PHYS][NP+1];
  int img [NP];

  first_layer dut (.*);

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

  task automatic run(input int th, input bit stalls);
    int v [N_PHYS]; int cyc, held;
    for (int n = 0; n < N_PHYS; n++) begin
      longint s = w[n][NP];
      logic [ACC_W-1:0] t;
      for (int p = 0; p < NP; p++) s += w[n][p] * img[p];
      t = s[ACC_W-1:0];
      v[n] = int'(signed'(t));
      if (longint'(v[n]) != s) n_wrap++;
    end
    theta_in = theta_t'(th); theta_we = 1;
    @(negedge clk); theta_we = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1; held = 0;
    // a threshold write while busy must not take effect
    theta_in = theta_t'(th + 1000); theta_we = 1;
    for (int q = 0; q < NP / N_SEG; q++) begin
      while (!pkt_ready) begin @(negedge clk); cyc++; end
      theta_we = 0;
      if (stalls && $urandom_range(1)) begin
        repeat (3) begin @(negedge clk); cyc++; held++; n_stall++; end
      end
      for (int g = 0; g < N_SEG; g++) seg_in[g] = bus_t'(img[q*N_SEG + g]);
      pkt_valid = 1;
      @(negedge clk); cyc++;
      pkt_valid = 0;
      for (int g = 0; g < N_SEG; g++) seg_in[g] = bus_t'($urandom);
    end
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == LAT + held, $sformatf("latency %0d expected %0d", cyc, LAT + held));
    for (int n = 0; n < N_PHYS; n++)
      check(int'(potential[n]) == v[n],
            $sformatf("neuron %0d potential %0d expected %0d", n, potential[n], v[n]));
    for (int n = 0; n < N_PAIRS; n++)
      check(out_i[n] == (v[n] > th) && out_j[n] == (v[n] < -th),
            $sformatf("neuron %0d outputs", n));
  endtask

  initial begin
    for (int g = 0; g < N_SEG; g++) seg_in[g] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // eight coefficients per clock, one per segment
    for (int pl = 0; pl < PER_SEG; pl++)
      for (int p = 0; p <= NP; p++) begin
        cfg = '{valid: 1'b1, place: 3'(pl), addr: 9'(p)};
        for (int g = 0; g < N_SEG; g++) begin
          w[g*PER_SEG + pl][p] = $urandom_range(63) - 32;
          seg_in[g] = bus_t'(w[g*PER_SEG + pl][p]);
        end
        @(negedge clk);
      end
    cfg = '0;
    for (int t = 0; t < 4; t++) begin
      for (int p = 0; p < NP; p++) img[p] = (t == 0) ? 15 : $urandom_range(15);
      run($urandom_range(2000), t % 2);
    end
    check(n_stall > 0, "no held-back packet");
    check(n_wrap > 0, "no potential wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
