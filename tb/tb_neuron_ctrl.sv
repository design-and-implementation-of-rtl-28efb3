// tb_neuron_ctrl: checks the controller of one neural processor on its own.
// Load commands must reach the memory port (addresses < N_PIX) or the
// bias strobe (address N_PIX) only when the place number matches. During a
// classification the test records every memory read address, every Booth
// digit index and every input-register load, and compares them with the ring
// schedule: in time step s of packet p the address is p*8 + ((seg-s) mod 8),
// followed by Booth digits 0..4. The start-to-done latency is checked
// (1539 clocks plus held-back clocks), and out_i / out_j must take the value
// of alu_neg in the two threshold clocks, gated by the enable bit.
`timescale 1ns/1ps
module tb_neuron_ctrl;
  import nn_pkg::*;
  localparam int unsigned NP = IMG_PIX, AW = 8;
  localparam int unsigned LAT = 1 + (NP / N_SEG) * N_SEG * (1 + BOOTH_N) + 2;

  logic clk = 0, rst_n = 0;
  ident_t ident = '{seg: 3'd2, place: 3'd4, enable: 1'b1};
  cfg_t cfg = '0;
  logic start = 0, pkt_valid = 0, alu_neg = 0;
  np_ctrl_t ctl;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic pkt_ready, busy, done, out_i, out_j;
  int checks = 0, failures = 0;

  neuron_ctrl dut (.*);

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

  // Run one classification; returns errors through check().
  task automatic run(input bit stalls, input bit neg_i, input bit neg_j);
    int reads [$]; int ks [$]; int n_ext, n_bus, cyc, held, q;
    bit seen_i, seen_j;
    n_ext = 0; n_bus = 0; cyc = 0; held = 0; q = 0; seen_i = 0; seen_j = 0;
    @(negedge clk); start = 1;
    #1 check(ctl.acc_init, "acc_init with start");
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin
      if (pkt_ready && !pkt_valid && stalls && $urandom_range(2) == 0) held++;
      else pkt_valid = pkt_ready;
      alu_neg = ctl.th_i ? neg_i : ctl.th_j ? neg_j : 1'($urandom);
      #1;
      if (mem_en && !mem_we) reads.push_back(int'(mem_addr));
      if (ctl.booth_en) ks.push_back(int'(ctl.booth_k));
      if (ctl.ld_ext) n_ext++;
      if (ctl.ld_bus) n_bus++;
      if (ctl.th_i) seen_i = 1;
      if (ctl.th_j) seen_j = 1;
      @(negedge clk); cyc++;
      pkt_valid = 0;
      if (cyc > 5000) break;
    end
    check(cyc == LAT + held, $sformatf("latency %0d expected %0d", cyc, LAT + held));
    check(n_ext == NP / N_SEG, "one external load per packet");
    check(n_bus == NP - NP / N_SEG, "seven ring loads per packet");
    check(reads.size() == NP, "one coefficient read per pixel");
    check(ks.size() == NP * BOOTH_N, "five Booth steps per pixel");
    for (int i = 0; i < reads.size() && i < NP; i++) begin
      int p = i / N_SEG, s = i % N_SEG;
      int e = p * N_SEG + ((int'(ident.seg) - s + N_SEG) % N_SEG);
      check(reads[i] == e, $sformatf("read %0d addr %0d expected %0d", i, reads[i], e));
    end
    for (int i = 0; i < ks.size(); i++)
      if (ks[i] != i % BOOTH_N) begin check(0, "Booth digit order"); break; end
    check(seen_i && seen_j, "both threshold clocks");
    check(out_i == (neg_i && ident.enable) && out_j == (neg_j && ident.enable), "latched outputs");
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // configuration
    for (int i = 0; i < 200; i++) begin
      int a;
      bit mine;
      a = (i % 10 == 0) ? NP : $urandom_range(NP - 1);
      mine = $urandom_range(1);
      cfg = '{valid: 1'b1, place: mine ? ident.place : 3'($urandom_range(5)), addr: 9'(a)};
      if (!mine && cfg.place == ident.place) cfg.place = ident.place + 1;
      #1;
      check(mem_we == (mine && a < NP) && ctl.bias_we == (mine && a == NP), "cfg decode");
      if (mem_we) check(mem_addr == AW'(a) && mem_en, "cfg write address");
      @(negedge clk);
    end
    cfg = '0;
    run(0, 1, 0);
    run(1, 0, 1);
    ident.seg = 3'd7;
    run(1, 0, 0);
    ident.enable = 0;
    run(0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
