`timescale 1ps/1ps
// tb_blade_pipeline_scan: the pipeline built with the DTM scan chain
// (DTM_SCAN = 1), one dtm bit per controller.
//
// A path delay fault (path ends after the normal window, inside the shifted
// one) is put into the logic of one stage. The test then runs a diagnosis:
// for each stage j it shifts a one-hot pattern into the chain so that only
// controller j has its window shifted, runs an x / ~x pair of items and
// looks at error_o. Only the faulty stage must report, which locates the
// fault. It also checks the chain output dtm_o, that only the selected stage
// is Delta slower, and that keeping the faulty stage's dtm set in normal
// operation gives right results (the slower-stage repair).
module tb_blade_pipeline_scan;
  import blade_pkg::*;
  localparam int unsigned N = 3, W = 32;
  localparam time SD = time'(SMALL_DELAY_PS), D = time'(DELTA_PS);
  localparam int unsigned NOM = 600;

  logic rst_n, gdtm, scan_clk, scan_en, dtm_in, dtm_out, error_o;
  logic in_req, in_ack, in_le_req, out_req, out_ack, out_re_req, out_re_ack;
  logic [N-1:0][W-1:0] stage_d, stage_q;
  logic [N-1:0]        stage_clk;
  logic [W-1:0]        in_data, last_out;
  int                  fault_stage, fault_bit, n_err_pulses, n_out;
  int unsigned         fault_dly;
  time                 t_out_req;
  int checks = 0, failures = 0;
  int m_diag = 0, m_repair = 0, m_scan_out = 0, m_one_slow = 0;

  blade_pipeline #(.DTM_SCAN(1'b1)) dut (
    .rst_ni(rst_n), .global_dtm_i(gdtm), .scan_clk_i(scan_clk), .scan_en_i(scan_en),
    .dtm_i(dtm_in), .dtm_o(dtm_out), .error_o(error_o),
    .in_req_i(in_req), .in_ack_o(in_ack), .in_le_req_o(in_le_req), .in_le_ack_i(in_le_req),
    .out_req_o(out_req), .out_ack_i(out_ack), .out_re_req_i(out_re_req), .out_re_ack_o(out_re_ack),
    .stage_d_i(stage_d), .stage_q_o(stage_q), .stage_clk_o(stage_clk));

  tb_blade_comb #(.N(N), .W(W), .NOM_PS(NOM)) u_comb (
    .src_i(in_data), .stage_q_i(stage_q), .fault_stage_i(fault_stage),
    .fault_bit_i(fault_bit), .fault_dly_i(fault_dly), .stage_d_o(stage_d));

  function automatic logic [W-1:0] golden(input logic [W-1:0] x);
    logic [W-1:0] v = x;
    for (int k = 0; k < N; k++) v = {v[W-2:0], v[W-1]} ^ W'(32'h9E3779B9 * (k + 1));
    return v;
  endfunction

  always @(posedge error_o) n_err_pulses++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    out_ack = 1'b0; out_re_req = 1'b0; n_out = 0;
    forever begin
      wait (out_req);
      t_out_req  = $time;
      out_re_req = 1'b1;
      wait (out_re_ack);
      last_out   = stage_q[N-1];
      n_out++;
      out_re_req = 1'b0;
      wait (!out_re_ack);
      out_ack = 1'b1;
      wait (!out_req);
      out_ack = 1'b0;
    end
  end

  // shift a pattern into the chain; pat[k] ends in controller k+1
  task automatic load(input logic [N-1:0] pat);
    for (int i = N - 1; i >= 0; i--) begin
      dtm_in  = pat[i];
      scan_en = 1'b1;
      #500 scan_clk = 1'b1;
      #500 scan_clk = 1'b0;
    end
    scan_en = 1'b0;
    check(dut.dtm == pat, "scan chain holds the pattern");
    check(dtm_out == pat[N-1], "dtm_o shows the last register");
    if (dtm_out == pat[N-1]) m_scan_out++;
  endtask

  task automatic one(input logic [W-1:0] x, output logic [W-1:0] res, output time lat);
    time t0;
    int  n0;
    #2000;
    n0 = n_out;
    t0 = $time;
    in_data = x;
    in_req  = 1'b1;
    wait (in_ack);
    in_req = 1'b0;
    wait (!in_ack);
    wait (n_out == n0 + 1);
    res = last_out;
    lat = t_out_req - t0;
    #3000;
  endtask

  // x then ~x with the fault active on the second item
  task automatic pair(output int errs, output bit right, output time lat);
    logic [W-1:0] x, r;
    int           f;
    f = fault_stage;
    fault_stage = -1;
    x = $urandom;
    one(x, r, lat);
    fault_stage  = f;
    n_err_pulses = 0;
    one(~x, r, lat);
    errs  = n_err_pulses;
    right = (r == golden(~x));
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  errs, found, hits;
    bit  right;
    time lat;
    // give the scan registers a reset edge
    rst_n = 1'b1; gdtm = 1'b0; scan_clk = 1'b0; scan_en = 1'b0; dtm_in = 1'b0;
    in_req = 1'b0; in_data = '0; fault_stage = -1; fault_bit = 0; fault_dly = 32'(SD + D + D / 2);
    #10 rst_n = 1'b0;
    #1000 rst_n = 1'b1;

    // global_dtm_i has no effect in this configuration
    gdtm = 1'b1;
    pair(errs, right, lat);
    check(lat == N * SD, "global_dtm_i ignored with the scan chain");
    gdtm = 1'b0;

    for (int fs = 0; fs < N; fs++) begin
      fault_stage = fs;
      fault_bit   = $urandom_range(W - 1, 0);
      found = -1;
      hits  = 0;
      // diagnosis: shift the window of one controller at a time
      for (int j = 0; j < N; j++) begin
        load(N'(1) << j);
        pair(errs, right, lat);
        // a detected error also makes the next stage wait Delta
        check(lat == N * SD + D + ((errs != 0 && j < N - 1) ? D : 0),
              "only the selected stage is Delta slower");
        if (lat == N * SD + D) m_one_slow++;
        if (errs != 0) begin
          found = j;
          hits++;
        end
        check((errs != 0) == (j == fs), "error_o only for the stage with the fault");
      end
      check(found == fs && hits == 1, "diagnosis locates the faulty stage");
      if (found == fs && hits == 1) m_diag++;
      // repair: keep only the faulty stage shifted; results are right
      load(N'(1) << fs);
      for (int r = 0; r < 3; r++) begin
        pair(errs, right, lat);
        check(right, "faulty stage kept in shifted mode gives right results");
        if (right) m_repair++;
      end
      // without the repair the same fault corrupts the result
      load('0);
      pair(errs, right, lat);
      check(!right && errs == 0, "without dtm the fault escapes and corrupts data");
    end
    fault_stage = -1;

    check(m_diag > 0,     "mechanism: diagnosis");
    check(m_repair > 0,   "mechanism: repair by a permanently slower stage");
    check(m_scan_out > 0, "mechanism: scan out");
    check(m_one_slow > 0, "mechanism: single stage slowed");
    $display("INFO mechanisms: diagnosis=%0d repair=%0d scan_out=%0d one_slow=%0d",
             m_diag, m_repair, m_scan_out, m_one_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
