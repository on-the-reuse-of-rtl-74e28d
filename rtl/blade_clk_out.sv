`timescale 1ps/1ps
// blade_clk_out: the CLK output circuit of a Blade controller with the
// delay-test-mode (dtm) TRW shift.
//
// The controller raises int_clk to open the latches. In normal mode
// (dtm_i = 0) CLK follows int_clk directly. In delay test mode (dtm_i = 1)
// CLK is the AND of int_clk and int_clk delayed by DELTA_PS: the rising edge
// of CLK comes DELTA_PS later, while the falling edge still follows int_clk at
// once, so the window keeps its width and is only shifted. A multiplexer
// selected by dtm_i chooses between the two. CLK then runs through the
// controller's own Delta line to give delay_o; the controller lowers int_clk
// when delay_o rises, which makes CLK high for DELTA_PS (the TRW) in both modes.
// This is the published structure: AND gate, multiplexer, extra Delta line.
// dtm_i must only change while int_clk is low.
module blade_clk_out #(
  parameter int unsigned DELTA_PS = blade_pkg::DELTA_PS
) (
  input  logic int_clk_i,
  input  logic dtm_i,
  output logic clk_o,
  output logic delay_o
);
  logic int_clk_dly;
  logic shifted;

  // Additional Delta line of the TRW shift
  blade_delay_line #(.DELAY_PS(DELTA_PS)) u_shift_line (
    .in_i (int_clk_i),
    .out_o(int_clk_dly)
  );

  always_comb begin
    shifted = int_clk_i & int_clk_dly;
    clk_o   = dtm_i ? shifted : int_clk_i;
  end

  // Original Delta line that tells the controller to close the window
  blade_delay_line #(.DELAY_PS(DELTA_PS)) u_trw_line (
    .in_i (clk_o),
    .out_o(delay_o)
  );
endmodule
