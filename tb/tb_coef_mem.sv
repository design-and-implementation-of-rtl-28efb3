// tb_coef_mem: fills the 256 x 6 coefficient memory with random words, reads
// them back in random order and checks the one-clock read latency, that a
// write does not disturb the read register, and that an idle clock keeps it.
`timescale 1ns/1ps
module tb_coef_mem;
  localparam int unsigned DEPTH = 256, WIDTH = 6, AW = 8;
  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  coef_mem dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = WIDTH'($urandom);
      en = 1; we = 1; addr = AW'(i); wdata = model[i];
      @(negedge clk);
    end
    for (int i = 0; i < 600; i++) begin
      int r;
      logic [WIDTH-1:0] prev;
      r = $urandom_range(DEPTH - 1);
      en = 1; we = 0; addr = AW'(r);
      @(negedge clk);
      check(rdata == model[r], $sformatf("read %0d got %h exp %h", r, rdata, model[r]));
      prev = rdata;
      // a write or an idle clock must leave the read register alone
      if (i % 3 == 0) begin
        int wa;
        wa = $urandom_range(DEPTH - 1);
        model[wa] = WIDTH'($urandom);
        en = 1; we = 1; addr = AW'(wa); wdata = model[wa];
      end else begin
        en = 0; we = 0; addr = AW'($urandom);
      end
      @(negedge clk);
      check(rdata == prev, "read register changed without a read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
