`timescale 1ps/1ps
// tb_blade_stage: one Blade stage between a producer and a consumer, with a
// path of the stage's combinational logic modelled as a transport delay
// from the producer's data to the stage's latch input (x + 1, one path for
// all bits). Checks for each item: the result, the opening of CLK delta after
// the request (plus Delta in delay test mode), Err1 for a path that ends
// inside the window and the consumer's error answer Delta later, no Err1
// for a nominal path, and detection of a path delay fault only in delay
// test mode.
module tb_blade_stage;
  import blade_pkg::*;
  localparam int unsigned W = 16, SD = 1000, D = 300;
  logic rst_n, dtm, l_req, l_ack, le_req, r_req, r_ack, re_req, re_ack, clk, err1;
  logic [W-1:0] src, d, q;
  int unsigned path_dly;
  int checks = 0, failures = 0, n_err1;
  time t_clk_rise;

  blade_stage #(.WIDTH(W), .SMALL_DELAY_PS(SD), .DELTA_PS(D)) dut (
    .rst_ni(rst_n), .dtm_i(dtm), .l_req_i(l_req), .l_ack_o(l_ack),
    .le_req_o(le_req), .le_ack_i(le_req), .r_req_o(r_req), .r_ack_i(r_ack),
    .re_req_i(re_req), .re_ack_o(re_ack), .d_i(d), .q_o(q), .clk_o(clk), .err1_o(err1));

  // combinational logic: d = src + 1 after path_dly
  initial begin
    d = '0;
    #0 d = src + 1'b1;
  end
  always begin
    @(src);
    fork
      begin
        automatic logic [W-1:0] v = src + 1'b1;
        automatic int unsigned  t = path_dly;
        #(t) d = v;
      end
    join_none
  end

  always @(posedge clk)  t_clk_rise = $time;
  always @(posedge err1) n_err1++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (q=%h)", what, $time, q);
    end
  endtask

  // send x with the given mode and path delay; return error count and data
  task automatic item(input logic [W-1:0] x, input bit mode, input int unsigned pd,
                      input bit exp_err, input bit exp_right, input string what);
    time t0, t_ask;
    dtm = mode;
    path_dly = pd;
    n_err1 = 0;
    #500;
    t0 = $time;
    src = x;
    l_req = 1'b1;
    wait (r_req);
    check(t_clk_rise == t0 + SD + (mode ? D : 0), {what, ": CLK opening"});
    #(D + 200);
    t_ask = $time;
    re_req = 1'b1;
    wait (re_ack);
    check($time - t_ask == (exp_err ? D : 0), {what, ": error answer timing"});
    check((q == x + 1'b1) == exp_right, {what, ": latched data"});
    check((n_err1 != 0) == exp_err, {what, ": Err1"});
    re_req = 1'b0;
    wait (!re_ack);
    r_ack = 1'b1;
    wait (!r_req);
    r_ack = 1'b0;
    wait (l_ack);
    l_req = 1'b0;
    wait (!l_ack);
    #(SD + 2 * D);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] x;
    rst_n = 1'b0; dtm = 1'b0; l_req = 1'b0; r_ack = 1'b0; re_req = 1'b0;
    src = '0; path_dly = 600;
    #1000 rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      x = W'($urandom);   // successive items differ, so the path toggles
      item(x,      1'b0, 600,            1'b0, 1'b1, "normal, nominal path");
      item(x + 2,  1'b1, 600,            1'b0, 1'b1, "dtm, nominal path");
      item(x + 4,  1'b0, SD + D / 2,     1'b1, 1'b1, "normal, violation in window");
      item(x + 6,  1'b0, SD + 3 * D / 2, 1'b0, 1'b0, "normal, delay fault escapes");
      item(x + 8,  1'b1, SD + 3 * D / 2, 1'b1, 1'b1, "dtm, delay fault detected");
      item(x + 10, 1'b1, SD + D / 2,     1'b0, 1'b1, "dtm, violation before shifted window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
