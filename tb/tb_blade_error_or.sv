`timescale 1ps/1ps
// tb_blade_error_or: exhaustive check of error_o = OR of all Err1 inputs.
module tb_blade_error_or;
  localparam int unsigned N = 4;
  logic [N-1:0] e;
  logic         o;
  int checks = 0, failures = 0;

  blade_error_or #(.N(N)) dut (.err1_i(e), .error_o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      e = N'(v);
      #1;
      checks++;
      if (o !== (v != 0)) begin
        failures++;
        $display("FAIL err1=%b error_o=%b", e, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
