// tb_neuron_datapath: drives the operative part's control word directly.
// For random pixels, coefficients and biases it loads the bias, initialises
// the accumulator, enters a pixel (from the segment input or the upstream
// bus, with junk in the two upper bus bits), runs the five Booth steps and checks the accumulator against
// bias + x*w; chains of such products check accumulation and 13-bit
// wrap-around. It then checks both threshold tests (alu_neg) against
// V > Theta and V < -Theta, the bus output and the identification register.
`timescale 1ns/1ps
module tb_neuron_datapath;
  import nn_pkg::*;
  localparam ident_t ID = '{seg: 3'd5, place: 3'd2, enable: 1'b1};

  logic clk = 0, rst_n = 0;
  np_ctrl_t ctl = '0;
  bus_t ext_in = '0, bus_in = '0, bus_out;
  coef_t coef = '0;
  theta_t theta = '0;
  ident_t ident;
  acc_t potential;
  logic alu_neg;
  int checks = 0, failures = 0;

  neuron_datapath #(.ID(ID)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  task automatic pulse(input np_ctrl_t c);
    ctl = c; @(negedge clk); ctl = '0;
  endtask

  task automatic mac(input int x, input int w, input bit from_bus);
    np_ctrl_t c;
    c = '0;
    if (from_bus) begin bus_in = {2'($urandom), pix_t'(x)}; c.ld_bus = 1; end
    else          begin ext_in = {2'($urandom), pix_t'(x)}; c.ld_ext = 1; end
    pulse(c);
    check(int'(bus_out) == x, "bus output follows input register");
    coef = coef_t'(w);
    for (int k = 0; k < BOOTH_N; k++) begin
      c = '0; c.booth_en = 1; c.booth_k = BK_W'(k);
      pulse(c);
    end
    coef = coef_t'($urandom);   // memory output may change afterwards
  endtask

  initial begin
    np_ctrl_t c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ident == ID, "identification register");
    for (int t = 0; t < 300; t++) begin
      int bias, s, n, th;
      bias = $urandom_range(63) - 32;
      ext_in = BUS_W'(bias);
      c = '0; c.bias_we = 1; pulse(c);
      c = '0; c.acc_init = 1; pulse(c);
      check(int'(potential) == bias, "accumulator initialised with bias");
      s = bias;
      n = (t < 100) ? 1 : 1 + $urandom_range(40);
      for (int i = 0; i < n; i++) begin
        int x, w;
        x = $urandom_range(15);
        w = $urandom_range(63) - 32;
        mac(x, w, i % 2);
        s += x * w;
      end
      check(int'(potential) == wrap13(s),
            $sformatf("potential %0d expected %0d", potential, wrap13(s)));
      s = wrap13(s);
      th = (t % 4 == 0) ? (s < 0 ? -s : s) : $urandom_range(1500);
      theta = theta_t'(th);
      ctl = '0; ctl.th_i = 1; #1;
      check(alu_neg == (s > th), $sformatf("V>Theta V=%0d Theta=%0d", s, th));
      @(negedge clk);
      ctl = '0; ctl.th_j = 1; #1;
      check(alu_neg == (s < -th), $sformatf("V<-Theta V=%0d Theta=%0d", s, th));
      @(negedge clk);
      ctl = '0;
      check(int'(potential) == s, "thresholding leaves V unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
