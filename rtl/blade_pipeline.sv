`timescale 1ps/1ps
// blade_pipeline: linear Blade asynchronous pipeline with online delay
// testing of its critical paths.
//
// NUM_STAGES Blade stages (controllers C1..Cn, each with its delta line,
// Delta line and error detection logic) are chained through their data (L/R)
// and error (LE/RE) channels. The combinational logic between the stages is
// the user's design and is outside this module: stage_q_o[k] (latch outputs
// of stage k) feeds the logic, whose result comes back on stage_d_i[k+1];
// stage_d_i[0] is the logic driven by the pipeline's input data.
//
// Delay test: each controller has a dtm input that shifts its timing
// resiliency window (TRW) by Delta. With DTM_SCAN = 0 (default) one primary
// input, global_dtm_i, drives all of them; scan_clk_i, scan_en_i and dtm_i
// are then unused and dtm_o is 0. With DTM_SCAN = 1 an auxiliary
// scan chain (dtm_i -> DTM 1 .. DTM n -> dtm_o, clocked by scan_clk_i while
// scan_en_i = 1) holds one dtm bit per controller instead, for locating a
// faulty stage or keeping a slow stage in the shifted mode, and global_dtm_i
// is unused. error_o is the OR
// of every stage's Err1: with dtm set, any pulse on it is a path delay fault
// in a critical path; without dtm it shows recovered timing violations.
//
// Environment channels (four-phase): in_req_i/in_ack_o is the left data
// channel of stage 0, in_le_req_o/in_le_ack_i its error channel, which the
// environment should answer at once; out_req_o/out_ack_i and
// out_re_req_i/out_re_ack_o are the right channels of the last stage. The
// output data stage_q_o[NUM_STAGES-1] is final once out_re_ack_o has
// answered. stage_clk_o exposes each stage's latch enable for observation.
module blade_pipeline #(
  parameter int unsigned      NUM_STAGES     = 3,
  parameter int unsigned      WIDTH          = 32,
  parameter logic [WIDTH-1:0] EDL_MASK       = '1,
  parameter int unsigned      QGROUP         = 8,
  parameter bit               DTM_SCAN       = 1'b0,
  parameter int unsigned      SMALL_DELAY_PS = blade_pkg::SMALL_DELAY_PS,
  parameter int unsigned      DELTA_PS       = blade_pkg::DELTA_PS
) (
  input  logic                                rst_ni,
  // delay test mode
  input  logic                                global_dtm_i,
  input  logic                                scan_clk_i,
  input  logic                                scan_en_i,
  input  logic                                dtm_i,
  output logic                                dtm_o,
  output logic                                error_o,
  // left environment
  input  logic                                in_req_i,
  output logic                                in_ack_o,
  output logic                                in_le_req_o,
  input  logic                                in_le_ack_i,
  // right environment
  output logic                                out_req_o,
  input  logic                                out_ack_i,
  input  logic                                out_re_req_i,
  output logic                                out_re_ack_o,
  // combinational logic between the stages
  input  logic [NUM_STAGES-1:0][WIDTH-1:0]    stage_d_i,
  output logic [NUM_STAGES-1:0][WIDTH-1:0]    stage_q_o,
  output logic [NUM_STAGES-1:0]               stage_clk_o
);
  // channel k sits to the left of stage k; channel NUM_STAGES is the output
  logic [NUM_STAGES:0]   req, ack, ereq, eack;
  logic [NUM_STAGES-1:0] dtm, err1;

  if (DTM_SCAN) begin : g_scan
    blade_dtm_scan #(.N(NUM_STAGES)) u_dtm_scan (
      .scan_clk_i(scan_clk_i),
      .rst_ni    (rst_ni),
      .scan_en_i (scan_en_i),
      .dtm_i     (dtm_i),
      .dtm_o     (dtm_o),
      .dtm_q_o   (dtm)
    );
  end else begin : g_global
    assign dtm   = {NUM_STAGES{global_dtm_i}};
    assign dtm_o = 1'b0;
  end

  assign req[0]      = in_req_i;
  assign in_ack_o    = ack[0];
  assign in_le_req_o = ereq[0];
  assign eack[0]     = in_le_ack_i;

  for (genvar k = 0; k < NUM_STAGES; k++) begin : g_stage
    blade_stage #(
      .WIDTH         (WIDTH),
      .EDL_MASK      (EDL_MASK),
      .QGROUP        (QGROUP),
      .SMALL_DELAY_PS(SMALL_DELAY_PS),
      .DELTA_PS      (DELTA_PS)
    ) u_stage (
      .rst_ni  (rst_ni),
      .dtm_i   (dtm[k]),
      .l_req_i (req[k]),
      .l_ack_o (ack[k]),
      .le_req_o(ereq[k]),
      .le_ack_i(eack[k]),
      .r_req_o (req[k+1]),
      .r_ack_i (ack[k+1]),
      .re_req_i(ereq[k+1]),
      .re_ack_o(eack[k+1]),
      .d_i     (stage_d_i[k]),
      .q_o     (stage_q_o[k]),
      .clk_o   (stage_clk_o[k]),
      .err1_o  (err1[k])
    );
  end

  assign out_req_o           = req[NUM_STAGES];
  assign ack[NUM_STAGES]     = out_ack_i;
  assign ereq[NUM_STAGES]    = out_re_req_i;
  assign out_re_ack_o        = eack[NUM_STAGES];

  blade_error_or #(.N(NUM_STAGES)) u_error_or (
    .err1_i (err1),
    .error_o(error_o)
  );
endmodule
