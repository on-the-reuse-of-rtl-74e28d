`timescale 1ps/1ps
// tb_blade_controller: drives every channel of one controller by hand and
// plays the error detection logic (dual-rail Err answers 50 ps after
// Sample). For each item it checks: CLK opens when both the delayed request
// and the left error answer are in (Delta later in delay test mode), R.Req is
// raised speculatively when CLK rises and before Err resolves, CLK stays high
// for exactly Delta, Sample rises as CLK falls, L.Ack waits for Err, and the
// answer to the right stage's error request comes at once without a violation
// and Delta later with one.
module tb_blade_controller;
  import blade_pkg::*;
  localparam int unsigned D = 300;
  logic rst_n, dtm, l_req, l_ack, le_req, le_ack, r_req, r_ack, re_req, re_ack, clk, sample;
  err_dr_t err;
  int checks = 0, failures = 0;
  time t_clk_rise, t_clk_fall, t_rreq, t_sample, t_err;

  blade_controller #(.DELTA_PS(D)) dut (
    .rst_ni(rst_n), .dtm_i(dtm), .l_req_i(l_req), .l_ack_o(l_ack),
    .le_req_o(le_req), .le_ack_i(le_ack), .r_req_o(r_req), .r_ack_i(r_ack),
    .re_req_i(re_req), .re_ack_o(re_ack), .clk_o(clk), .sample_o(sample), .err_i(err));

  always @(posedge clk)    t_clk_rise = $time;
  always @(negedge clk)    t_clk_fall = $time;
  always @(posedge r_req)  t_rreq     = $time;
  always @(posedge sample) t_sample   = $time;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic item(input bit mode, input bit viol, input time le_dly);
    time t_req, t_open, t_ans;
    bit   rreq_before_err;
    dtm = mode;
    #200;
    t_req = $time;
    l_req = 1'b1;
    wait (le_req);
    #(le_dly) le_ack = 1'b1;
    t_open = $time;
    // play the EDL: resolve Err 50 ps after Sample
    wait (sample);
    check(r_req && t_rreq == t_clk_rise, "R.Req raised speculatively with CLK");
    rreq_before_err = r_req && !(err.err1 || err.err0);
    #50 err = '{err1: viol, err0: !viol};
    t_err = $time;
    check(rreq_before_err, "R.Req before Err resolved");
    check(t_clk_rise == t_open + (mode ? D : 0), "CLK opening time");
    check(t_clk_fall - t_clk_rise == D, "TRW width is Delta");
    check(t_sample == t_clk_fall, "Sample with end of TRW");
    wait (l_ack);
    check($time == t_err, "L.Ack once Err resolved");
    err = '{err1: 1'b0, err0: 1'b0};
    l_req = 1'b0;
    wait (!le_req);
    le_ack = 1'b0;
    wait (!l_ack);
    // right stage asks for the error status
    #100;
    t_ans = $time;
    re_req = 1'b1;
    wait (re_ack);
    check($time - t_ans == (viol ? D : 0), "error answer delayed by Delta after violation");
    re_req = 1'b0;
    wait (!re_ack);
    check(r_req == 1'b1, "R.Req held until R.Ack");
    r_ack = 1'b1;
    wait (!r_req);
    r_ack = 1'b0;
    #10;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; dtm = 1'b0; l_req = 1'b0; le_ack = 1'b0; r_ack = 1'b0; re_req = 1'b0;
    err = '{err1: 1'b0, err0: 1'b0};
    #500 rst_n = 1'b1;
    for (int i = 0; i < 24; i++)
      item(1'($urandom), 1'($urandom), time'($urandom_range(200, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
