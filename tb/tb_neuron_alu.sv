// tb_neuron_alu: checks the shared adder/subtractor on random and corner
// operands for PASS, ADD and SUB, including the sign output.
`timescale 1ns/1ps
module tb_neuron_alu;
  import nn_pkg::*;
  alu_t a, b, y;
  alu_op_e op;
  logic neg;
  int checks = 0, failures = 0;

  neuron_alu dut (.a, .b, .op, .y, .neg);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input alu_t ta, input alu_t tb_, input alu_op_e top);
    int ea, eb, e;
    a = ta; b = tb_; op = top;
    #1;
    ea = int'(ta); eb = int'(tb_);
    case (top)
      ALU_ADD: e = ea + eb;
      ALU_SUB: e = ea - eb;
      default: e = ea;
    endcase
    e = e & ((1 << ALU_W) - 1);
    if (e >= (1 << (ALU_W - 1))) e -= (1 << ALU_W);
    checks++;
    if (int'(y) != e || neg != (e < 0)) begin
      failures++;
      $display("FAIL a=%0d b=%0d op=%0d y=%0d exp=%0d neg=%b", ta, tb_, top, y, e, neg);
    end
  endtask

  initial begin
    one(alu_t'(5), alu_t'(3), ALU_SUB);
    one(alu_t'(3), alu_t'(5), ALU_SUB);
    one(alu_t'(-4096), alu_t'(4095), ALU_ADD);
    one(alu_t'(4095), alu_t'(-4096), ALU_SUB);
    one(alu_t'(-7), alu_t'(100), ALU_PASS);
    for (int i = 0; i < 2000; i++)
      one(alu_t'($urandom), alu_t'($urandom), alu_op_e'($urandom_range(2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
