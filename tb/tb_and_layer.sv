// tb_and_layer: checks the ten 9-input AND gates and the reject output.
// The reference enumerates the pairs (a,b), a < b, over class indices 0..9
// (digits 1..9,0) on its own. Vectors: for each class, all its votes set
// plus random others; each such vector with one vote removed; random
// vectors; all zero.
`timescale 1ns/1ps
module tb_and_layer;
  import nn_pkg::*;
  logic [N_PAIRS-1:0] out_i, out_j;
  logic [N_CLASSES-1:0] class_and;
  logic reject;
  int checks = 0, failures = 0, n_fire = 0;

  and_layer dut (.out_i, .out_j, .class_and, .reject);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic [N_CLASSES-1:0] exp_and;
    int n;
    exp_and = '1;
    n = 0;
    for (int a = 0; a < N_CLASSES; a++)
      for (int b = a + 1; b < N_CLASSES; b++) begin
        if (!out_i[n]) exp_and[(a + 1) % 10] = 1'b0;
        if (!out_j[n]) exp_and[(b + 1) % 10] = 1'b0;
        n++;
      end
    #1;
    checks++;
    if (class_and != exp_and || reject != (exp_and == '0)) begin
      failures++;
      $display("FAIL i=%h j=%h got %b/%b exp %b", out_i, out_j, class_and, reject, exp_and);
    end
    if (exp_and != '0) n_fire++;
  endtask

  // Set all votes for class index c.
  task automatic votes_for(input int c);
    int n = 0;
    for (int a = 0; a < N_CLASSES; a++)
      for (int b = a + 1; b < N_CLASSES; b++) begin
        if (a == c) begin out_i[n] = 1; out_j[n] = 0; end
        if (b == c) begin out_j[n] = 1; out_i[n] = 0; end
        n++;
      end
  endtask

  initial begin
    out_i = '0; out_j = '0;
    check_now();
    for (int c = 0; c < N_CLASSES; c++) begin
      for (int r = 0; r < 5; r++) begin
        for (int n = 0; n < N_PAIRS; n++) begin
          out_i[n] = $urandom_range(1);
          out_j[n] = out_i[n] ? 1'b0 : 1'($urandom_range(1));
        end
        votes_for(c);
        check_now();
        begin
          int k;
          k = $urandom_range(N_PAIRS - 1);
          out_i[k] = 0; out_j[k] = 0;
          check_now();
        end
      end
    end
    for (int r = 0; r < 300; r++) begin
      for (int n = 0; n < N_PAIRS; n++) begin
        out_i[n] = ($urandom_range(9) != 0);
        out_j[n] = ($urandom_range(9) != 0);
      end
      check_now();
    end
    checks++;
    if (n_fire < 10) begin failures++; $display("FAIL: gates fired only %0d times", n_fire); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
