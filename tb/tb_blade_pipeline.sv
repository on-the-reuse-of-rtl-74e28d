`timescale 1ps/1ps
// tb_blade_pipeline: end-to-end test of the Blade pipeline at its default
// size (3 stages, 32 bits, global dtm) with a model of the combinational
// logic between the stages.
//
// Phase 1 streams random items back to back in normal mode and in delay test
// mode and checks every result against a reference model. Phase 2 sends one
// item at a time, alternating x and ~x so every path toggles, and checks
// timing and error_o for each case of the delay test method:
//   normal      nominal paths: no error, latency 3*delta (+Delta+T_RES to the
//               final error answer)
//   dtm         nominal paths: no error, every stage Delta slower
//   violation   path ends inside the normal window: Err1 in normal mode,
//               result still right, next stage opens Delta later; no error
//               in delay test mode
//   fault       path ends after the normal window but inside the shifted
//               one: in normal mode a wrong result and no error (the fault
//               escapes); in delay test mode error_o pulses and the result
//               is right (fault detected)
//   too large   path ends after the shifted window: escapes in both modes
//   no toggle   same item twice: a fault on a path without a transition is
//               not seen
// Every mechanism is counted, and one that never happened counts a failure.
module tb_blade_pipeline;
  import blade_pkg::*;
  localparam int unsigned N = 3, W = 32;
  localparam int unsigned SD = SMALL_DELAY_PS, D = DELTA_PS, NOM = 600;

  logic rst_n, gdtm, scan_clk, scan_en, dtm_in, dtm_out, error_o;
  logic in_req, in_ack, in_le_req, out_req, out_ack, out_re_req, out_re_ack;
  logic [N-1:0][W-1:0] stage_d, stage_q;
  logic [N-1:0]        stage_clk;
  logic [W-1:0]        in_data;
  int                  fault_stage, fault_bit;
  int unsigned         fault_dly;

  int checks = 0, failures = 0;
  int n_err_pulses;
  // mechanisms
  int m_stream = 0, m_dtm_shift = 0, m_violation = 0, m_recover_delay = 0;
  int m_detect = 0, m_escape_normal = 0, m_escape_large = 0, m_no_toggle = 0;

  blade_pipeline dut (
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

  // ---------------- environment ----------------
  logic [W-1:0] exp_q[$];
  int           n_out = 0;
  time          t_out_req, t_final;
  bit           check_data = 1'b1;
  logic [W-1:0] last_out;

  // consumer: ask the last stage for its error status, then take the data
  initial begin
    out_ack = 1'b0; out_re_req = 1'b0;
    forever begin
      wait (out_req);
      t_out_req  = $time;
      out_re_req = 1'b1;
      wait (out_re_ack);
      t_final  = $time;
      last_out = stage_q[N-1];
      if (check_data) begin
        logic [W-1:0] e;
        e = exp_q.pop_front();
        check(last_out == e, "streamed result");
      end else void'(exp_q.pop_front());
      n_out++;
      out_re_req = 1'b0;
      wait (!out_re_ack);
      out_ack = 1'b1;
      wait (!out_req);
      out_ack = 1'b0;
    end
  end

  task automatic send(input logic [W-1:0] x);
    in_data = x;
    exp_q.push_back(golden(x));
    in_req = 1'b1;
    wait (in_ack);
    in_req = 1'b0;
    wait (!in_ack);
  endtask

  // one item through the empty pipeline; returns result, latency, error pulses
  task automatic one(input logic [W-1:0] x, output logic [W-1:0] res,
                     output time lat_req, output time lat_final, output int errs);
    time t0;
    int  n0;
    #2000;
    n0 = n_out;
    n_err_pulses = 0;
    t0 = $time;
    send(x);
    wait (n_out == n0 + 1);
    res       = last_out;
    lat_req   = t_out_req - t0;
    lat_final = t_final - t0;
    #3000;
    errs = n_err_pulses;
  endtask

  // a pair x, ~x so that the faulty path toggles on the second item
  task automatic pair(input bit mode, input int stg, input int unsigned dly,
                      output logic [W-1:0] res, output time lat_req,
                      output time lat_final, output int errs);
    logic [W-1:0] x, r0;
    time          a, b;
    int           e0;
    gdtm        = mode;
    fault_stage = -1;
    x = $urandom;
    one(x, r0, a, b, e0);
    fault_stage = stg;
    fault_bit   = $urandom_range(W - 1, 0);
    fault_dly   = dly;
    one(~x, res, lat_req, lat_final, errs);
    fault_stage = -1;
    check_data  = 1'b1;
    res = res ^ golden(~x);   // 0 when right
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] diff;
    time          lr, lf;
    int           errs;
    rst_n = 1'b0; gdtm = 1'b0; scan_clk = 1'b0; scan_en = 1'b0; dtm_in = 1'b0;
    in_req = 1'b0; in_data = '0; fault_stage = -1; fault_bit = 0; fault_dly = NOM;
    #1000 rst_n = 1'b1;

    // ---- phase 1: streaming, both modes ----
    for (int m = 0; m < 2; m++) begin
      gdtm = 1'(m);
      #2000;
      n_err_pulses = 0;
      for (int i = 0; i < 20; i++) send($urandom);
      wait (exp_q.size() == 0);
      #3000;
      check(n_err_pulses == 0, "no error while streaming nominal paths");
      m_stream++;
    end

    // ---- phase 2: single items, timing and fault cases ----
    for (int stg = 0; stg < N; stg++) begin
      // normal mode, nominal paths
      pair(1'b0, -1, NOM, diff, lr, lf, errs);
      check(diff == 0 && errs == 0, "normal: right result, no error");
      check(lr == N * SD, "normal: latency N*delta");
      check(lf == N * SD + D + T_RES_PS, "normal: final answer latency");
      // delay test mode, nominal paths: each stage Delta slower
      pair(1'b1, -1, NOM, diff, lr, lf, errs);
      check(diff == 0 && errs == 0, "dtm: right result, no error");
      check(lr == N * (SD + D), "dtm: every stage Delta slower");
      if (lr == N * (SD + D)) m_dtm_shift++;
      // timing violation inside the normal window: recovered
      pair(1'b0, stg, SD + D / 2, diff, lr, lf, errs);
      check(diff == 0, "violation: result still right");
      check(errs == 1, "violation: flagged on error_o in normal mode");
      check(lf == N * SD + 2 * D + T_RES_PS, "violation: next stage opens Delta later");
      if (errs == 1) m_violation++;
      if (lf == N * SD + 2 * D + T_RES_PS) m_recover_delay++;
      pair(1'b1, stg, SD + D / 2, diff, lr, lf, errs);
      check(diff == 0 && errs == 0, "violation in dtm: before shifted window, no error");
      // path delay fault: beyond the normal window, inside the shifted one
      check_data = 1'b0;
      pair(1'b0, stg, SD + D + D / 2, diff, lr, lf, errs);
      check(diff != 0 && errs == 0, "fault in normal mode: wrong result, not flagged");
      if (diff != 0 && errs == 0) m_escape_normal++;
      pair(1'b1, stg, SD + D + D / 2, diff, lr, lf, errs);
      check(diff == 0 && errs == 1, "fault in dtm: detected on error_o, result right");
      if (diff == 0 && errs == 1) m_detect++;
      // fault larger than the shifted window
      check_data = 1'b0;
      pair(1'b1, stg, SD + 2 * D + D / 2, diff, lr, lf, errs);
      check(diff != 0 && errs == 0, "fault past shifted window: not captured");
      if (diff != 0 && errs == 0) m_escape_large++;
      // fault on a path without a transition: same item twice
      begin
        logic [W-1:0] x, r;
        time a, b;
        int  e;
        gdtm = 1'b1;
        x = $urandom;
        one(x, r, a, b, e);
        fault_stage = stg; fault_bit = 3; fault_dly = SD + D + D / 2;
        one(x, r, a, b, e);
        fault_stage = -1;
        check(r == golden(x) && e == 0, "no transition: fault not excited");
        if (e == 0) m_no_toggle++;
      end
    end

    check(m_stream > 0,        "mechanism: streaming");
    check(m_dtm_shift > 0,     "mechanism: TRW shift");
    check(m_violation > 0,     "mechanism: recovered timing violation");
    check(m_recover_delay > 0, "mechanism: error channel delays next stage");
    check(m_detect > 0,        "mechanism: delay fault detected in dtm");
    check(m_escape_normal > 0, "mechanism: delay fault escapes normal mode");
    check(m_escape_large > 0,  "mechanism: fault past shifted window");
    check(m_no_toggle > 0,     "mechanism: unexcited path");
    $display("INFO mechanisms: stream=%0d dtm_shift=%0d violation=%0d recover_delay=%0d detect=%0d escape_normal=%0d escape_large=%0d no_toggle=%0d",
             m_stream, m_dtm_shift, m_violation, m_recover_delay, m_detect, m_escape_normal,
             m_escape_large, m_no_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
