`timescale 1ps/1ps
// blade_td: transition detector of an error detecting latch.
//
// x_o is a pulse of width T_TD_PS after every transition, rising or falling,
// of the latch input d_i: the XOR of d_i and d_i delayed by T_TD_PS.
module blade_td #(
  parameter int unsigned T_TD_PS = blade_pkg::T_TD_PS
) (
  input  logic d_i,
  output logic x_o
);
  logic d_dly;

  blade_delay_line #(.DELAY_PS(T_TD_PS)) u_td_line (
    .in_i (d_i),
    .out_o(d_dly)
  );

  assign x_o = d_i ^ d_dly;
endmodule
