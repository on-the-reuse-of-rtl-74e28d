`timescale 1ps/1ps
// blade_celem: asymmetric C-element that remembers a timing violation.
//
// The output goes to 0 whenever clk_i is 0, goes to 1 when clk_i and the
// transition detector output x_i are both 1, and otherwise keeps its value.
// It therefore records any transition seen during the high phase of its
// clock, until the clock falls. It is a level-sensitive storage element by
// design, so synthesis reports it as a latch.
module blade_celem (
  input  logic clk_i,
  input  logic x_i,
  output logic c_o
);
  always_latch begin
    if (!clk_i)   c_o = 1'b0;
    else if (x_i) c_o = 1'b1;
  end
endmodule
