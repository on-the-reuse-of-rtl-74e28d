`timescale 1ps/1ps
// blade_controller: behavioural model of the Blade stage controller with the
// delay-test-mode CLK output circuit.
//
// Behavioural model, not synthesizable logic: the silicon controller is a set
// of three interacting burst-mode asynchronous state machines that are not
// reproduced here. The model keeps their division into three concurrent
// processes and the speculative handshake, with four-phase signalling on
// every channel:
//
//  * Latch process. When the request l_req_i (already delayed by the stage's
//    delta line) arrives, it asks the left stage for the error status of the
//    data (le_req_o / le_ack_i). It then waits until the previous item has
//    been taken by the right stage and its error status reported, raises
//    int_clk, and once CLK has risen the item is handed to the right process.
//    When the Delta line reports delay, it raises sample_o and lowers int_clk
//    together, waits for the dual-rail Err to resolve (err1_i or err0_i),
//    records it, lowers sample_o and acknowledges the left stage (l_ack_o).
//  * Right process. Speculative request: r_req_o rises as soon as the latch
//    opens, before the error status is known, and completes a four-phase
//    cycle with r_ack_i.
//  * Error process. When the right stage asks (re_req_i) for the status of
//    the last item, re_ack_o answers at once if there was no violation and
//    DELTA_PS later if there was one. The right stage waits for this answer
//    before opening its latch, which is how a violation makes the next stage
//    open its latch Delta later.
//
// CLK and delay come from blade_clk_out, so with dtm_i = 1 the window is
// shifted by DELTA_PS while the rest of the controller is unchanged; the
// stage is then Delta slower. The choice of processes, the order of the
// handshakes and the timed error answer are this design's own; the
// speculative request, the error channel that delays the next stage by Delta,
// the sampling at the end of the window and the dtm circuit follow the
// published method. rst_ni must be low at time 0 and rise once; the
// processes start on its first rising edge. Assertions check that the
// neighbours keep to the four-phase order on every channel.
module blade_controller #(
  parameter int unsigned DELTA_PS = blade_pkg::DELTA_PS
) (
  input  logic rst_ni,
  input  logic dtm_i,
  // left data channel (request after the delta line)
  input  logic l_req_i,
  output logic l_ack_o,
  // left error channel
  output logic le_req_o,
  input  logic le_ack_i,
  // right data channel
  output logic r_req_o,
  input  logic r_ack_i,
  // right error channel
  input  logic re_req_i,
  output logic re_ack_o,
  // error detection logic
  output logic clk_o,
  output logic sample_o,
  input  blade_pkg::err_dr_t err_i
);
  logic int_clk, delay_s;
  logic l_ack, le_req, r_req, re_ack, sample;
  logic err_last;
  int unsigned n_open, n_rdone, n_err, n_ans;

  blade_clk_out #(.DELTA_PS(DELTA_PS)) u_clk_out (
    .int_clk_i(int_clk),
    .dtm_i    (dtm_i),
    .clk_o    (clk_o),
    .delay_o  (delay_s)
  );

  initial begin
    int_clk  = 1'b0;
    sample   = 1'b0;
    l_ack    = 1'b0;
    le_req   = 1'b0;
    err_last = 1'b0;
    n_open   = 0;
    n_err    = 0;
    r_req    = 1'b0;
    n_rdone  = 0;
    re_ack   = 1'b0;
    n_ans    = 0;
  end

  // Latch process
  always begin
    wait (rst_ni);
    wait (l_req_i);
    le_req = 1'b1;
    wait (le_ack_i);
    wait (n_rdone == n_open && n_ans == n_err && !delay_s);
    int_clk = 1'b1;
    @(posedge clk_o);
    n_open = n_open + 1;
    wait (delay_s);
    sample  = 1'b1;
    int_clk = 1'b0;
    wait (err_i.err1 || err_i.err0);
    err_last = err_i.err1;
    n_err    = n_err + 1;
    sample   = 1'b0;
    l_ack    = 1'b1;
    le_req   = 1'b0;
    wait (!l_req_i && !le_ack_i);
    l_ack = 1'b0;
  end

  // Right process: speculative request
  always begin
    wait (n_open != n_rdone);
    r_req = 1'b1;
    wait (r_ack_i);
    r_req = 1'b0;
    wait (!r_ack_i);
    n_rdone = n_rdone + 1;
  end

  // Error process: answer the right stage, Delta late after a violation
  always begin
    wait (re_req_i && n_ans != n_err);
    if (err_last) #(DELTA_PS);
    re_ack = 1'b1;
    wait (!re_req_i);
    re_ack = 1'b0;
    n_ans  = n_ans + 1;
  end

  // Four-phase rules of the neighbours: a request is withdrawn only after it
  // was acknowledged, an acknowledge only after its request was withdrawn.
  // Edges are counted and compared 1 ps after the withdrawing edge, so a
  // zero-delay response in the same time step is not taken for a violation.
  // Edges at time 0 (start-up values) and during reset are ignored.
  int unsigned n_lreq_up, n_lack_up, n_rereq_up, n_reack_up;
  int unsigned n_rreq_dn, n_rack_up, n_lereq_dn, n_leack_up;

  initial begin
    n_lreq_up  = 0; n_lack_up  = 0; n_rereq_up = 0; n_reack_up = 0;
    n_rreq_dn  = 0; n_rack_up  = 0; n_lereq_dn = 0; n_leack_up = 0;
  end

  wire live = rst_ni && ($time > 0);

  always @(posedge l_req_i)  if (live) n_lreq_up <= n_lreq_up + 1;
  always @(posedge l_ack)    if (live) n_lack_up <= n_lack_up + 1;
  always @(posedge re_req_i) if (live) n_rereq_up <= n_rereq_up + 1;
  always @(posedge re_ack)   if (live) n_reack_up <= n_reack_up + 1;
  always @(negedge r_req)    if (live) n_rreq_dn <= n_rreq_dn + 1;
  always @(posedge r_ack_i)  if (live) n_rack_up <= n_rack_up + 1;
  always @(negedge le_req)   if (live) n_lereq_dn <= n_lereq_dn + 1;
  always @(posedge le_ack_i) if (live) n_leack_up <= n_leack_up + 1;

  always @(negedge l_req_i) if (live) begin
    #1;
    assert (n_lack_up == n_lreq_up) else $error("L.Req withdrawn before L.Ack");
  end
  always @(negedge re_req_i) if (live) begin
    #1;
    assert (n_reack_up == n_rereq_up) else $error("RE.Req withdrawn before RE.Ack");
  end
  always @(negedge r_ack_i) if (live) begin
    #1;
    assert (n_rreq_dn == n_rack_up) else $error("R.Ack withdrawn before R.Req");
  end
  always @(negedge le_ack_i) if (live) begin
    #1;
    assert (n_lereq_dn == n_leack_up) else $error("LE.Ack withdrawn before LE.Req");
  end

  assign l_ack_o  = l_ack;
  assign le_req_o = le_req;
  assign r_req_o  = r_req;
  assign re_ack_o = re_ack;
  assign sample_o = sample;
endmodule
