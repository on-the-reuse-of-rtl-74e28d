`timescale 1ps/1ps
// blade_qflop: behavioural model of a Q-Flop, a metastability-filtered
// sampling element with dual-rail output.
//
// Behavioural model, not synthesizable logic: the real cell is a latch with
// an internal metastability filter whose outputs change only once the stored
// value is stable. The model samples d_i on the rising edge of sample_i and,
// T_RES_PS later (a fixed resolution time standing in for the filter), drives
// err1_o = d_i, err0_o = !d_i. Both outputs return to 0 when sample_i falls,
// so {err1_o, err0_o} = 00 means "not resolved".
module blade_qflop #(
  parameter int unsigned T_RES_PS = blade_pkg::T_RES_PS
) (
  input  logic sample_i,
  input  logic d_i,
  output logic err1_o,
  output logic err0_o
);
  logic captured;

  initial begin
    err1_o   = 1'b0;
    err0_o   = 1'b0;
    captured = 1'b0;
  end

  always begin
    @(posedge sample_i);
    captured = d_i;
    #(T_RES_PS);
    if (sample_i) begin
      err1_o = captured;
      err0_o = !captured;
    end
    wait (!sample_i);
    err1_o = 1'b0;
    err0_o = 1'b0;
  end
endmodule
