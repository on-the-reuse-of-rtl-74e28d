`timescale 1ps/1ps
// tb_blade_td: checks that both rising and falling input transitions give a
// pulse of exactly T_TD_PS on x, and that x is low otherwise.
module tb_blade_td;
  localparam int unsigned T = 40;
  logic d, x;
  int checks = 0, failures = 0;

  blade_td #(.T_TD_PS(T)) dut (.d_i(d), .x_o(x));

  task automatic expect_x(input logic v, input string what);
    checks++;
    if (x !== v) begin
      failures++;
      $display("FAIL %s at %0t: x=%b", what, $time, x);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1'b0;
    #500 expect_x(1'b0, "idle low");
    repeat (4) begin
      d = !d;
      #1 expect_x(1'b1, "pulse start");
      #(T - 2) expect_x(1'b1, "pulse end");
      #2 expect_x(1'b0, "after pulse");
      #300 expect_x(1'b0, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
