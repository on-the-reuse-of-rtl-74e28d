`timescale 1ps/1ps
// blade_delay_line: behavioural model of a matched delay line.
//
// Behavioural model, not synthesizable logic: in silicon this is a chain of
// buffers and inverters sized to a delay. The model delays every transition
// of in_i by DELAY_PS picoseconds (transport delay, so pulses shorter than the
// delay still pass). The Blade pipeline uses it for the delta line on the
// request, the Delta line that times the TRW, the extra Delta line of the
// TRW shift, and the t_TD and t_comp elements inside the error detection
// logic. The value the input has at time 0 is taken as steady, so the
// output starts equal to it.
module blade_delay_line #(
  parameter int unsigned DELAY_PS = 300
) (
  input  logic in_i,
  output logic out_o
);
  logic q;

  // the level present at time 0 counts as having been there forever
  initial begin
    q = 1'b0;
    #0 q = in_i;
  end

  // every input edge starts its own timer, so edges never cancel each other
  always begin
    @(in_i);
    fork
      begin
        automatic logic v = in_i;
        #(DELAY_PS) q = v;
      end
    join_none
  end

  assign out_o = q;
endmodule
