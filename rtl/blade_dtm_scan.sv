`timescale 1ps/1ps
// blade_dtm_scan: auxiliary scan chain of DTM registers, one per controller.
//
// Optional part of the pipeline (DTM_SCAN = 1) that replaces the single
// global dtm input: each controller gets its own delay-test-mode enable, so
// a fault can be located to one stage, and a slow stage can be kept in the
// shifted-TRW mode permanently. Bits enter at dtm_i into DTM 1 and leave from
// DTM N at dtm_o, one position per rising edge of scan_clk_i while
// scan_en_i = 1. The registers hold their value while scan_en_i = 0 and clear
// on the asynchronous active-low reset. dtm_o[k] drives controller k+1.
// Scan clock, enable and reset are this design's choices.
module blade_dtm_scan #(
  parameter int unsigned N = 3
) (
  input  logic         scan_clk_i,
  input  logic         rst_ni,
  input  logic         scan_en_i,
  input  logic         dtm_i,
  output logic         dtm_o,
  output logic [N-1:0] dtm_q_o
);
  logic [N-1:0] chain;

  always_ff @(posedge scan_clk_i or negedge rst_ni) begin
    if (!rst_ni)        chain <= '0;
    else if (scan_en_i) chain <= (chain << 1) | N'(dtm_i);
  end

  assign dtm_q_o = chain;
  assign dtm_o   = chain[N-1];
endmodule
