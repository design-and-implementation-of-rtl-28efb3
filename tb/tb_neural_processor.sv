// tb_neural_processor: one neuron on its own, at the default 256 inputs.
// The test bench plays the rest of the ring: at the start of each packet it
// offers the pixel entered on this neuron's segment, and before each of the
// seven following time steps (one every 1+5 clocks) it puts on the upstream
// bus the pixel that the ring brings next, p*8 + ((seg-s) mod 8). Random
// coefficients and bias are loaded on the segment input, mixed with load
// commands for other places on the segment that must be ignored. Checked per image: the
// potential against bias + sum(w*x) wrapped to 13 bits, out_i/out_j against
// +/-Theta, and the start-to-done latency.
`timescale 1ns/1ps
module tb_neural_processor;
  import nn_pkg::*;
  localparam int unsigned NP = IMG_PIX;
  localparam ident_t ID = '{seg: 3'd5, place: 3'd3, enable: 1'b1};
  localparam int unsigned LAT = 1 + (NP / N_SEG) * N_SEG * (1 + BOOTH_N) + 2;

  logic clk = 0, rst_n = 0;
  cfg_t cfg = '0;
  theta_t theta = '0;
  logic start = 0, pkt_valid = 0;
  bus_t ext_in = '0, bus_in = '0, bus_out;
  logic pkt_ready, busy, done, out_i, out_j;
  acc_t potential;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0, n_amb = 0;
  int w [NP+1];
  int img [NP];

  neural_processor #(.ID(ID)) dut (.*);

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

  function automatic int wrap13(input longint v);
    logic [ACC_W-1:0] t;
    t = v[ACC_W-1:0];
    return int'(signed'(t));
  endfunction

  task automatic run(input int th);
    longint s; int v, cyc;
    s = w[NP];
    for (int p = 0; p < NP; p++) s += w[p] * img[p];
    v = wrap13(s);
    theta = theta_t'(th);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    for (int q = 0; q < NP / N_SEG; q++) begin
      while (!pkt_ready) begin @(negedge clk); cyc++; end
      ext_in = bus_t'(img[q*N_SEG + ID.seg]);
      pkt_valid = 1;
      @(negedge clk); cyc++;
      pkt_valid = 0;
      check(bus_out == bus_t'(img[q*N_SEG + ID.seg]), "external pixel entered");
      for (int st = 1; st < N_SEG; st++) begin
        bus_in = bus_t'(img[q*N_SEG + ((ID.seg - st + N_SEG) % N_SEG)]);
        repeat (1 + BOOTH_N) begin @(negedge clk); cyc++; end
        bus_in = bus_t'($urandom);
      end
    end
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == LAT, $sformatf("latency %0d expected %0d", cyc, LAT));
    check(int'(potential) == v, $sformatf("potential %0d expected %0d", potential, v));
    check(out_i == (v > th) && out_j == (v < -th),
          $sformatf("outputs %b%b V=%0d Theta=%0d", out_i, out_j, v, th));
    if (out_i) n_hi++; else if (out_j) n_lo++; else n_amb++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 6; t++) begin
      // load (again) with decoy writes for other neurons
      for (int p = 0; p <= NP; p++) begin
        w[p] = (t < 3) ? ($urandom_range(7) - 3) : ($urandom_range(63) - 32);
        cfg = '{valid: 1'b1, place: ID.place, addr: 9'(p)};
        ext_in = bus_t'(w[p]);
        @(negedge clk);
        cfg = '{valid: 1'b1, place: 3'($urandom_range(2)), addr: 9'(p)};
        ext_in = bus_t'($urandom);
        @(negedge clk);
      end
      cfg = '0;
      for (int p = 0; p < NP; p++) img[p] = $urandom_range(15);
      run(t == 0 ? 4095 : $urandom_range(150));
      run(0);
    end
    check(n_hi > 0 && n_lo > 0 && n_amb > 0, "all three output cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
