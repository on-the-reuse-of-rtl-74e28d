`timescale 1ps/1ps
// tb_blade_celem: walks the asymmetric C-element through all input
// combinations from both stored states and compares with a reference:
// next = clk ? (x | state) : 0.
module tb_blade_celem;
  logic clk, x, c, model;
  int checks = 0, failures = 0;

  blade_celem dut (.clk_i(clk), .x_i(x), .c_o(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0; x = 1'b0; model = 1'b0;
    #10;
    repeat (200) begin
      clk = 1'($urandom);
      x   = 1'($urandom);
      model = clk ? (x | model) : 1'b0;
      #10;
      checks++;
      if (c !== model) begin
        failures++;
        $display("FAIL clk=%b x=%b c=%b expected %b", clk, x, c, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
