`timescale 1ps/1ps
// tb_blade_delay_line: checks that every edge, including a pulse shorter than
// the delay, reappears exactly DELAY_PS later.
module tb_blade_delay_line;
  localparam int unsigned D = 300;
  logic in_s, out_s;
  int checks = 0, failures = 0;

  blade_delay_line #(.DELAY_PS(D)) dut (.in_i(in_s), .out_o(out_s));

  task automatic expect_out(input logic v, input string what);
    checks++;
    if (out_s !== v) begin
      failures++;
      $display("FAIL %s at %0t: out=%b expected %b", what, $time, out_s, v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_s = 1'b0;
    #1000 in_s = 1'b1;              // rise at 1000
    #(D - 1) expect_out(1'b0, "before rise");
    #2       expect_out(1'b1, "after rise");
    #500  in_s = 1'b0;              // fall at 1801
    #(D - 1) expect_out(1'b1, "before fall");
    #2       expect_out(1'b0, "after fall");
    // short pulse of 50 ps
    #1000 in_s = 1'b1;
    #50   in_s = 1'b0;
    #(D - 50 - 1) expect_out(1'b0, "before short pulse");
    #2  expect_out(1'b1, "short pulse high");
    #48 expect_out(1'b1, "short pulse still high");
    #2  expect_out(1'b0, "short pulse over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
