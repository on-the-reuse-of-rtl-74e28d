`timescale 1ps/1ps
// blade_error_or: the error_o pin logic of the delay test method.
//
// One OR gate over the Err1 signals of every controller of the pipeline. In
// delay test mode any pulse on error_o means a delay fault was caught in a
// critical path; in normal mode it shows recovered timing violations, whose
// rate can serve as an ageing indicator.
module blade_error_or #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] err1_i,
  output logic         error_o
);
  assign error_o = |err1_i;
endmodule
