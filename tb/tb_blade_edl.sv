`timescale 1ps/1ps
// tb_blade_edl: opens the latch window [1000, 1300] ps of each cycle, raises
// Sample with the closing edge and changes one data bit at a chosen offset.
// Checks: a change before the window or within the compensation time is not
// flagged; a change inside the window gives Err1 and the new value is latched;
// a change after the window is not latched and not flagged; a bit without
// error detection (EDL_MASK = 0) is never flagged; err0/err1 stay 00 until
// the Q-Flops have resolved and return to 00 when Sample falls.
module tb_blade_edl;
  localparam int unsigned W = 16, QG = 4, TCOMP = 60, TRES = 50;
  localparam logic [W-1:0] MASK = 16'h7FFF;
  localparam time OPEN = 1000, CLOSE = 1300;
  logic clk, sample, e1, e0;
  logic [W-1:0] d, q, q_model;
  int checks = 0, failures = 0;

  blade_edl #(.WIDTH(W), .EDL_MASK(MASK), .QGROUP(QG), .T_TD_PS(40),
              .T_COMP_PS(TCOMP), .T_RES_PS(TRES)) dut (
    .clk_i(clk), .sample_i(sample), .d_i(d), .q_o(q), .err1_o(e1), .err0_o(e0));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t q=%h exp %h err=%b%b)", what, $time, q, q_model, e1, e0);
    end
  endtask

  // one latch cycle: bit b toggles at offset t_chg from the cycle start
  task automatic cycle(input int b, input time t_chg, input bit exp_err, input string what);
    time t0;
    logic [W-1:0] nd;
    t0 = $time;
    nd = d ^ (W'(1) << b);
    fork
      begin
        automatic logic [W-1:0] v = nd;
        automatic time          tc = t_chg;
        #(tc) d = v;
      end
    join_none
    #(OPEN) clk = 1'b1;
    #(CLOSE - OPEN);
    clk = 1'b0; sample = 1'b1;
    // latched value: d as it was at the closing edge
    q_model = (t_chg < CLOSE) ? nd : q_model;
    #(TRES - 1);
    check({e1, e0} == 2'b00, {what, ": not resolved before T_RES"});
    #2;
    check({e1, e0} == {exp_err, !exp_err}, {what, ": error flag"});
    check(q == q_model, {what, ": latched data"});
    if (t_chg >= CLOSE) begin
      wait (d == nd);
      check(q != d, {what, ": late data not latched"});
    end
    #100 sample = 1'b0;
    #1 check({e1, e0} == 2'b00, {what, ": flags cleared"});
    #(t0 + 2000 - $time);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0; sample = 1'b0; d = 16'h1234;
    #10 clk = 1'b1;
    #200 clk = 1'b0;       // load a known value
    q_model = d;
    #800;
    for (int i = 0; i < 6; i++) begin
      int b;
      b = $urandom_range(W - 2, 0);
      cycle(b, 500,                    1'b0, "change before window");
      cycle(b, OPEN - 20,              1'b0, "change just before window");
      cycle(b, OPEN + TCOMP + 40,      1'b1, "change inside window");
      cycle(b, CLOSE - 30,             1'b1, "change late in window");
      cycle(b, CLOSE + 150,            1'b0, "change after window");
      cycle(W - 1, OPEN + 150,         1'b0, "plain latch bit inside window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
