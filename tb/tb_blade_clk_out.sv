`timescale 1ps/1ps
// tb_blade_clk_out: checks the CLK output circuit in normal mode (CLK follows
// int_clk, delay is CLK delayed by Delta) and in delay test mode (CLK rises
// Delta after int_clk and falls with it). int_clk is lowered when delay rises,
// as the controller does, and the edge times are compared with the expected
// ones.
module tb_blade_clk_out;
  localparam int unsigned D = 300;
  logic int_clk, dtm, clk, delay_s;
  int checks = 0, failures = 0;
  time t_clk_rise, t_clk_fall, t_delay_rise, t_delay_fall;

  blade_clk_out #(.DELTA_PS(D)) dut (
    .int_clk_i(int_clk), .dtm_i(dtm), .clk_o(clk), .delay_o(delay_s));

  always @(posedge clk)     t_clk_rise   = $time;
  always @(negedge clk)     t_clk_fall   = $time;
  always @(posedge delay_s) t_delay_rise = $time;
  always @(negedge delay_s) t_delay_fall = $time;

  task automatic check_time(input time got, input time exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0t expected %0t", what, got, exp);
    end
  endtask

  // one controller cycle starting at the current time
  task automatic cycle(input logic mode);
    time t0;
    dtm = mode;
    #100;
    t0 = $time;
    int_clk = 1'b1;
    wait (delay_s);
    int_clk = 1'b0;
    wait (!delay_s);
    #10;
    if (!mode) begin
      check_time(t_clk_rise,   t0,         "normal: CLK rise");
      check_time(t_delay_rise, t0 + D,     "normal: delay rise");
      check_time(t_clk_fall,   t0 + D,     "normal: CLK fall (TRW = Delta)");
      check_time(t_delay_fall, t0 + 2 * D, "normal: delay fall");
    end else begin
      check_time(t_clk_rise,   t0 + D,     "dtm: CLK rise shifted by Delta");
      check_time(t_delay_rise, t0 + 2 * D, "dtm: delay rise");
      check_time(t_clk_fall,   t0 + 2 * D, "dtm: CLK fall with int_clk");
      check_time(t_delay_fall, t0 + 3 * D, "dtm: delay fall");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int_clk = 1'b0;
    dtm     = 1'b0;
    #1000;
    cycle(1'b0);
    cycle(1'b1);
    cycle(1'b0);
    cycle(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
