`timescale 1ps/1ps
// tb_blade_fault_coverage: delay fault coverage of a functional stimulus on
// the default pipeline (3 stages x 32 latches = 96 monitored paths).
//
// For every path (stage k, bit b) in turn, the path gets a delay fault: its
// delay grows from the nominal 600 ps to delta + 1.5*Delta, which puts its
// transitions inside the shifted window. The stimulus is then run in delay
// test mode, and the path counts as detected if error_o pulses. A path can
// only be detected if the stimulus makes it toggle, so the testbench works
// out independently, from a reference model of the logic, which paths
// toggle, and requires detected == toggled for every path. Two stimuli are
// run:
//   random   eight random 32-bit words, as a crypto core would see;
//   narrow   the values 0..7, like a register whose high-order bits never
//            change; coverage falls well below 100 %.
// It prints the coverage of each stimulus and also checks that every result
// stays right, since in delay test mode a caught fault is also corrected.
module tb_blade_fault_coverage;
  import blade_pkg::*;
  localparam int unsigned N = 3, W = 32, NOM = 600;
  localparam int unsigned FAULT = SMALL_DELAY_PS + DELTA_PS + DELTA_PS / 2;
  localparam int unsigned NITEMS = 8;

  logic rst_n, gdtm, error_o, dtm_out;
  logic in_req, in_ack, in_le_req, out_req, out_ack, out_re_req, out_re_ack;
  logic [N-1:0][W-1:0] stage_d, stage_q;
  logic [N-1:0]        stage_clk;
  logic [W-1:0]        in_data, last_out;
  int                  fault_stage, fault_bit, n_err_pulses, n_out;
  int unsigned         fault_dly;
  int checks = 0, failures = 0;

  blade_pipeline dut (
    .rst_ni(rst_n), .global_dtm_i(gdtm), .scan_clk_i(1'b0), .scan_en_i(1'b0),
    .dtm_i(1'b0), .dtm_o(dtm_out), .error_o(error_o),
    .in_req_i(in_req), .in_ack_o(in_ack), .in_le_req_o(in_le_req), .in_le_ack_i(in_le_req),
    .out_req_o(out_req), .out_ack_i(out_ack), .out_re_req_i(out_re_req), .out_re_ack_o(out_re_ack),
    .stage_d_i(stage_d), .stage_q_o(stage_q), .stage_clk_o(stage_clk));

  tb_blade_comb #(.N(N), .W(W), .NOM_PS(NOM)) u_comb (
    .src_i(in_data), .stage_q_i(stage_q), .fault_stage_i(fault_stage),
    .fault_bit_i(fault_bit), .fault_dly_i(fault_dly), .stage_d_o(stage_d));

  function automatic logic [W-1:0] f(input int k, input logic [W-1:0] x);
    return {x[W-2:0], x[W-1]} ^ W'(32'h9E3779B9 * (k + 1));
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
      out_re_req = 1'b1;
      wait (out_re_ack);
      last_out = stage_q[N-1];
      n_out++;
      out_re_req = 1'b0;
      wait (!out_re_ack);
      out_ack = 1'b1;
      wait (!out_req);
      out_ack = 1'b0;
    end
  end

  task automatic one(input logic [W-1:0] x);
    int n0;
    #1000;
    n0 = n_out;
    in_data = x;
    in_req  = 1'b1;
    wait (in_ack);
    in_req = 1'b0;
    wait (!in_ack);
    wait (n_out == n0 + 1);
    check(last_out == f(2, f(1, f(0, x))), "result right in delay test mode");
    #2000;
  endtask

  // run one stimulus against every path; returns the number detected
  task automatic campaign(input logic [W-1:0] stim[NITEMS], input string name,
                          output int detected, output int excited);
    logic [N-1:0][W-1:0] toggled, prev, cur;
    logic [W-1:0]        v;
    // which logic outputs toggle, starting from the last item (see below)
    toggled = '0;
    v = stim[NITEMS-1];
    for (int k = 0; k < N; k++) begin
      v = f(k, v);
      prev[k] = v;
    end
    for (int i = 0; i < NITEMS; i++) begin
      v = stim[i];
      for (int k = 0; k < N; k++) begin
        v = f(k, v);
        cur[k] = v;
      end
      toggled |= cur ^ prev;
      prev = cur;
    end
    detected = 0;
    excited  = 0;
    for (int k = 0; k < N; k++) begin
      for (int b = 0; b < W; b++) begin
        fault_stage = -1;
        one(stim[NITEMS-1]);          // start every run from the same state
        fault_stage  = k;
        fault_bit    = b;
        n_err_pulses = 0;
        for (int i = 0; i < NITEMS; i++) one(stim[i]);
        fault_stage = -1;
        if (n_err_pulses != 0) detected++;
        if (toggled[k][b]) excited++;
        check((n_err_pulses != 0) == toggled[k][b], $sformatf("%s: stage %0d bit %0d detected iff toggled", name, k, b));
      end
    end
    $display("INFO %s stimulus: %0d of %0d paths detected, coverage %0.2f %%",
             name, detected, N * W, 100.0 * detected / (N * W));
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] stim[NITEMS];
    int det, exc;
    rst_n = 1'b0; gdtm = 1'b1; in_req = 1'b0; in_data = '0;
    fault_stage = -1; fault_bit = 0; fault_dly = FAULT;
    #1000 rst_n = 1'b1;

    for (int i = 0; i < NITEMS; i++) stim[i] = $urandom;
    campaign(stim, "random", det, exc);
    check(det == exc && det > (N * W) * 9 / 10, "random stimulus covers almost every path");

    for (int i = 0; i < NITEMS; i++) stim[i] = W'(i);
    campaign(stim, "narrow", det, exc);
    check(det == exc && det < N * W, "narrow stimulus leaves paths untested");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
