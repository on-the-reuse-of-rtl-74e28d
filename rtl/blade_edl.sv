`timescale 1ps/1ps
// blade_edl: error detection logic (EDL) of one Blade stage.
//
// WIDTH latches, transparent while clk_i is 1, hold the stage output. The
// latches of critical paths (EDL_MASK bit = 1) are error detecting latches:
// a transition detector on the latch input produces a pulse X on every
// transition, and an asymmetric C-element, clocked by clk_i delayed by
// T_COMP_PS, remembers a pulse seen while its clock is high. Delaying the
// C-element clock keeps a transition that happens just before clk_i rises
// from being flagged. The C-elements are ORed in groups of QGROUP; each group
// feeds one Q-Flop, which samples on the rising edge of sample_i. The
// dual-rail result is err1_o = OR of the Q-Flops' err1 and err0_o = AND of
// their err0, so err0_o only rises once every Q-Flop has resolved to "no
// violation", and {err1_o, err0_o} = 00 means "not yet resolved". Latches
// with EDL_MASK bit = 0 are plain latches.
//
// Timing: a data transition is flagged when it comes between
// clk_i rise + T_COMP_PS and the rising edge of sample_i, which the
// controller raises together with the falling edge of clk_i. The outputs are
// valid T_RES_PS after sample_i rises and return to 00 when sample_i falls.
// The C-elements and latches are level-sensitive storage by design. An
// assertion flags the illegal dual-rail code {1,1}.
module blade_edl #(
  parameter int unsigned      WIDTH     = 32,
  parameter logic [WIDTH-1:0] EDL_MASK  = '1,
  parameter int unsigned      QGROUP    = 8,
  parameter int unsigned      T_TD_PS   = blade_pkg::T_TD_PS,
  parameter int unsigned      T_COMP_PS = blade_pkg::T_COMP_PS,
  parameter int unsigned      T_RES_PS  = blade_pkg::T_RES_PS
) (
  input  logic             clk_i,
  input  logic             sample_i,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o,
  output logic             err1_o,
  output logic             err0_o
);
  localparam int unsigned NQ = (WIDTH + QGROUP - 1) / QGROUP;

  logic             clk_c;
  logic [WIDTH-1:0] celem;
  logic [NQ-1:0]    group_or, q_err1, q_err0;

  // Data latches
  always_latch begin
    if (clk_i) q_o = d_i;
  end

  // Compensation delay on the C-element clock
  blade_delay_line #(.DELAY_PS(T_COMP_PS)) u_tcomp (
    .in_i (clk_i),
    .out_o(clk_c)
  );

  for (genvar b = 0; b < WIDTH; b++) begin : g_bit
    if (EDL_MASK[b]) begin : g_edl
      logic x;
      blade_td #(.T_TD_PS(T_TD_PS)) u_td (
        .d_i(d_i[b]),
        .x_o(x)
      );
      blade_celem u_celem (
        .clk_i(clk_c),
        .x_i  (x),
        .c_o  (celem[b])
      );
    end else begin : g_plain
      assign celem[b] = 1'b0;
    end
  end

  for (genvar g = 0; g < NQ; g++) begin : g_q
    localparam int unsigned LO = g * QGROUP;
    localparam int unsigned HI = (LO + QGROUP > WIDTH) ? WIDTH - 1 : LO + QGROUP - 1;
    assign group_or[g] = |celem[HI:LO];
    blade_qflop #(.T_RES_PS(T_RES_PS)) u_qflop (
      .sample_i(sample_i),
      .d_i     (group_or[g]),
      .err1_o  (q_err1[g]),
      .err0_o  (q_err0[g])
    );
  end

  assign err1_o = |q_err1;
  assign err0_o = &q_err0;

  // dual-rail code: both rails high is illegal
  always @(err1_o or err0_o)
    assert final (!(err1_o && err0_o)) else $error("Err1 and Err0 both high");
endmodule
