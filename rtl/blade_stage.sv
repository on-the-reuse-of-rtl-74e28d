`timescale 1ps/1ps
// blade_stage: one stage of a Blade timing-resilient asynchronous pipeline.
//
// The incoming request l_req_i runs through the delta delay line, which
// matches the combinational logic up to the opening of the timing resiliency
// window (TRW). The controller then opens the stage latches (clk) for Delta,
// speculatively sends r_req_o, samples the error detection logic at the end
// of the window and passes the dual-rail result on through the error channel.
// The combinational logic of the stage is outside this module: it drives d_i
// from the previous stage's data, and q_o (the latch outputs) is the stage's
// data to the right. err1_o is the stage's Err1 for the error_o pin; dtm_i
// shifts the TRW by Delta (delay test mode). Channels are four-phase:
// L (l_req_i/l_ack_o), LE (le_req_o/le_ack_i), R (r_req_o/r_ack_i),
// RE (re_req_i/re_ack_o).
module blade_stage #(
  parameter int unsigned      WIDTH          = 32,
  parameter logic [WIDTH-1:0] EDL_MASK       = '1,
  parameter int unsigned      QGROUP         = 8,
  parameter int unsigned      SMALL_DELAY_PS = blade_pkg::SMALL_DELAY_PS,
  parameter int unsigned      DELTA_PS       = blade_pkg::DELTA_PS
) (
  input  logic             rst_ni,
  input  logic             dtm_i,
  input  logic             l_req_i,
  output logic             l_ack_o,
  output logic             le_req_o,
  input  logic             le_ack_i,
  output logic             r_req_o,
  input  logic             r_ack_i,
  input  logic             re_req_i,
  output logic             re_ack_o,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o,
  output logic             clk_o,
  output logic             err1_o
);
  logic               l_req_dly, sample;
  blade_pkg::err_dr_t err;

  blade_delay_line #(.DELAY_PS(SMALL_DELAY_PS)) u_small_delta (
    .in_i (l_req_i),
    .out_o(l_req_dly)
  );

  blade_controller #(.DELTA_PS(DELTA_PS)) u_ctrl (
    .rst_ni  (rst_ni),
    .dtm_i   (dtm_i),
    .l_req_i (l_req_dly),
    .l_ack_o (l_ack_o),
    .le_req_o(le_req_o),
    .le_ack_i(le_ack_i),
    .r_req_o (r_req_o),
    .r_ack_i (r_ack_i),
    .re_req_i(re_req_i),
    .re_ack_o(re_ack_o),
    .clk_o   (clk_o),
    .sample_o(sample),
    .err_i   (err)
  );

  blade_edl #(
    .WIDTH   (WIDTH),
    .EDL_MASK(EDL_MASK),
    .QGROUP  (QGROUP)
  ) u_edl (
    .clk_i   (clk_o),
    .sample_i(sample),
    .d_i     (d_i),
    .q_o     (q_o),
    .err1_o  (err.err1),
    .err0_o  (err.err0)
  );

  assign err1_o = err.err1;
endmodule
