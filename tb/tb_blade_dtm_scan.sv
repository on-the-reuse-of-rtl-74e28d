`timescale 1ps/1ps
// tb_blade_dtm_scan: shifts random patterns through the DTM scan chain and
// checks the per-controller bits, the scan output, hold while scan_en is low
// and the reset value.
module tb_blade_dtm_scan;
  localparam int unsigned N = 5;
  logic scan_clk, rst_n, scan_en, din, dout;
  logic [N-1:0] q, model;
  int checks = 0, failures = 0;

  blade_dtm_scan #(.N(N)) dut (
    .scan_clk_i(scan_clk), .rst_ni(rst_n), .scan_en_i(scan_en),
    .dtm_i(din), .dtm_o(dout), .dtm_q_o(q));

  initial begin
    scan_clk = 1'b0;
    forever #500 scan_clk = !scan_clk;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1; scan_en = 1'b0; din = 1'b0; model = '0;
    #10 rst_n = 1'b0;
    #1190;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %b", q); end
    rst_n = 1'b1;
    repeat (60) begin
      @(negedge scan_clk);
      scan_en = 1'($urandom);
      din     = 1'($urandom);
      @(posedge scan_clk);
      if (scan_en) model = {model[N-2:0], din};
      #1;
      checks++;
      if (q !== model || dout !== model[N-1]) begin
        failures++;
        $display("FAIL q=%b dtm_o=%b expected %b", q, dout, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
