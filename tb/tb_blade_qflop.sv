`timescale 1ps/1ps
// tb_blade_qflop: checks the dual-rail output: 00 before and T_RES_PS after
// the sampling edge only then 10 or 01 according to the sampled input, held
// while sample is high even if the input changes, and 00 after sample falls.
module tb_blade_qflop;
  localparam int unsigned T = 50;
  logic sample, d, e1, e0;
  int checks = 0, failures = 0;

  blade_qflop #(.T_RES_PS(T)) dut (.sample_i(sample), .d_i(d), .err1_o(e1), .err0_o(e0));

  task automatic expect_err(input logic [1:0] v, input string what);
    checks++;
    if ({e1, e0} !== v) begin
      failures++;
      $display("FAIL %s at %0t: err=%b%b expected %b", what, $time, e1, e0, v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    sample = 1'b0; d = 1'b0;
    #200 expect_err(2'b00, "idle");
    repeat (8) begin
      v = 1'($urandom);
      d = v;
      #20 sample = 1'b1;
      #(T - 1) expect_err(2'b00, "resolving");
      #2 expect_err({v, !v}, "resolved");
      d = !v;
      #100 expect_err({v, !v}, "held");
      sample = 1'b0;
      #1 expect_err(2'b00, "reset with sample");
      #200;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
