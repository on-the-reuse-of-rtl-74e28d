`timescale 1ps/1ps
// tb_blade_xtea: XTEA workload on a 3-stage, 64-bit Blade pipeline, with the
// delay fault coverage experiment run on it.
//
// The 64-bit block is {v1, v0}. The logic in front of stage k is one XTEA
// cycle (two Feistel half-rounds) with the running sum of cycle k:
//   v0 += (((v1 << 4) ^ (v1 >> 5)) + v1) ^ (sum + key[sum & 3]);
//   sum += 32'h9E3779B9;
//   v1 += (((v0 << 4) ^ (v0 >> 5)) + v0) ^ (sum + key[(sum >> 11) & 3]);
// so the pipeline output is XTEA encryption reduced to 3 cycles, and it is
// checked against a reference XTEA model. The reference is first checked on
// its own against a published 32-cycle test vector. The full cipher has 32
// cycles; 3 stages run the first 3 of them, which exercise the same logic.
//
// Each output bit of the logic follows its source with a transport delay of
// 600 ps. For the coverage experiment, each of the 192 paths (stage k, bit b)
// gets a delay fault in turn: its delay grows to delta + 1.5*Delta, inside
// the shifted window. Eight random blocks then run in delay test mode, as a
// testbench generating random data for a crypto core would do. A path is
// detected if error_o pulses. The testbench works out from the reference
// model which paths toggle and requires detected == toggled for each path.
// Every result must also be right, since delay test mode corrects what it
// catches. A short normal-mode run without faults comes first.
module tb_blade_xtea;
  import blade_pkg::*;
  localparam int unsigned N = 3, W = 64, NOM = 600;
  localparam int unsigned FAULT = SMALL_DELAY_PS + DELTA_PS + DELTA_PS / 2;
  localparam int unsigned NITEMS = 8;
  localparam logic [31:0] XDELTA = 32'h9E3779B9;

  logic rst_n, gdtm, error_o, dtm_out;
  logic in_req, in_ack, in_le_req, out_req, out_ack, out_re_req, out_re_ack;
  logic [N-1:0][W-1:0] stage_d, stage_q;
  logic [N-1:0]        stage_clk;
  logic [W-1:0]        in_data, last_out;
  logic [31:0]         key[4];
  int                  fault_stage, fault_bit, n_err_pulses, n_out;
  int checks = 0, failures = 0;

  blade_pipeline #(.NUM_STAGES(N), .WIDTH(W)) dut (
    .rst_ni(rst_n), .global_dtm_i(gdtm), .scan_clk_i(1'b0), .scan_en_i(1'b0),
    .dtm_i(1'b0), .dtm_o(dtm_out), .error_o(error_o),
    .in_req_i(in_req), .in_ack_o(in_ack), .in_le_req_o(in_le_req), .in_le_ack_i(in_le_req),
    .out_req_o(out_req), .out_ack_i(out_ack), .out_re_req_i(out_re_req), .out_re_ack_o(out_re_ack),
    .stage_d_i(stage_d), .stage_q_o(stage_q), .stage_clk_o(stage_clk));

  // one XTEA cycle, the one numbered k (0 = first)
  function automatic logic [W-1:0] xtea_cycle(input int k, input logic [W-1:0] x);
    logic [31:0] v0, v1, sum;
    v0  = x[31:0];
    v1  = x[63:32];
    sum = XDELTA * k;
    v0  = v0 + ((((v1 << 4) ^ (v1 >> 5)) + v1) ^ (sum + key[sum & 3]));
    sum = sum + XDELTA;
    v1  = v1 + ((((v0 << 4) ^ (v0 >> 5)) + v0) ^ (sum + key[(sum >> 11) & 3]));
    return {v1, v0};
  endfunction

  function automatic logic bit_of(input logic [W-1:0] x, input int b);
    return x[b];
  endfunction

  // the logic between the stages, one transport delay per output bit
  for (genvar k = 0; k < N; k++) begin : g_logic
    logic [W-1:0] src;
    if (k == 0) begin : g_first
      assign src = in_data;
    end else begin : g_next
      assign src = stage_q[k-1];
    end
    for (genvar b = 0; b < W; b++) begin : g_bit
      initial begin
        stage_d[k][b] = 1'b0;
        #0 stage_d[k][b] = bit_of(xtea_cycle(k, src), b);
      end
      always begin
        @(src);
        fork
          begin
            automatic logic        v = bit_of(xtea_cycle(k, src), b);
            automatic int unsigned t = (fault_stage == k && fault_bit == b) ? FAULT : NOM;
            #(t) stage_d[k][b] = v;
          end
        join_none
      end
    end
  end

  function automatic logic [W-1:0] xtea_ref(input int cycles, input logic [W-1:0] x);
    for (int k = 0; k < cycles; k++) x = xtea_cycle(k, x);
    return x;
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

  task automatic one(input logic [W-1:0] x, input string mode);
    int n0;
    #1000;
    n0 = n_out;
    in_data = x;
    in_req  = 1'b1;
    wait (in_ack);
    in_req = 1'b0;
    wait (!in_ack);
    wait (n_out == n0 + 1);
    check(last_out == xtea_ref(N, x), {"XTEA result right in ", mode});
    #2000;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0]        stim[NITEMS], v;
    logic [N-1:0][W-1:0] toggled, prev, cur;
    int det, exc;
    rst_n = 1'b0; gdtm = 1'b0; in_req = 1'b0; in_data = '0;
    fault_stage = -1; fault_bit = 0;

    // reference model against the published vector: key 00010203..0c0d0e0f,
    // plaintext 41424344 45464748, ciphertext 497df3d0 72612cb5
    key = '{32'h00010203, 32'h04050607, 32'h08090a0b, 32'h0c0d0e0f};
    v = xtea_ref(32, {32'h45464748, 32'h41424344});
    check(v == {32'h72612cb5, 32'h497df3d0}, "reference XTEA matches test vector");

    for (int i = 0; i < 4; i++) key[i] = $urandom;
    #1000 rst_n = 1'b1;

    // normal mode, no faults: right results and no error
    n_err_pulses = 0;
    for (int i = 0; i < 4; i++) one({$urandom, $urandom}, "normal mode");
    check(n_err_pulses == 0, "no error without faults in normal mode");

    // coverage experiment in delay test mode
    gdtm = 1'b1;
    for (int i = 0; i < NITEMS; i++) stim[i] = {$urandom, $urandom};
    toggled = '0;
    for (int k = 0; k < N; k++) prev[k] = xtea_ref(k + 1, stim[NITEMS-1]);
    for (int i = 0; i < NITEMS; i++) begin
      for (int k = 0; k < N; k++) cur[k] = xtea_ref(k + 1, stim[i]);
      toggled |= cur ^ prev;
      prev = cur;
    end
    det = 0;
    exc = 0;
    for (int k = 0; k < N; k++) begin
      for (int b = 0; b < W; b++) begin
        fault_stage = -1;
        one(stim[NITEMS-1], "delay test mode");   // same start for every path
        fault_stage  = k;
        fault_bit    = b;
        n_err_pulses = 0;
        for (int i = 0; i < NITEMS; i++) one(stim[i], "delay test mode");
        fault_stage = -1;
        if (n_err_pulses != 0) det++;
        if (toggled[k][b]) exc++;
        check((n_err_pulses != 0) == toggled[k][b],
              $sformatf("stage %0d bit %0d detected iff toggled", k, b));
      end
    end
    $display("INFO XTEA random data: %0d of %0d paths detected, coverage %0.2f %%",
             det, N * W, 100.0 * det / (N * W));
    check(det == exc && det > (N * W) * 9 / 10, "random XTEA data covers almost every path");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
