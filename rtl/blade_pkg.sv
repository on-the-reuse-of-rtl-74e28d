`timescale 1ps/1ps
// blade_pkg: timing constants and the dual-rail error type shared by the
// Blade pipeline modules.
//
// All delays are in picoseconds. The values are example numbers of this
// design; the method only requires that the delta line covers the
// combinational logic up to the start of the timing resiliency window (TRW),
// that DELTA is the TRW width, that T_COMP is at least T_TD, and that the
// Q-Flop resolves well inside one delta.
package blade_pkg;
  localparam int unsigned SMALL_DELAY_PS = 1000; // delta: request delay line
  localparam int unsigned DELTA_PS       = 300;  // Delta: TRW width and TRW shift
  localparam int unsigned T_TD_PS        = 40;   // transition detector pulse width
  localparam int unsigned T_COMP_PS      = 60;   // C-element clock compensation
  localparam int unsigned T_RES_PS       = 50;   // Q-Flop resolution time

  // Dual-rail error indication from the Q-Flops: {err1, err0}.
  // 2'b00 = not yet resolved, 2'b01 = no timing violation,
  // 2'b10 = timing violation, 2'b11 = illegal.
  typedef struct packed {
    logic err1;
    logic err0;
  } err_dr_t;
endpackage
