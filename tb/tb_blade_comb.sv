`timescale 1ps/1ps
// tb_blade_comb: testbench model of the combinational logic between Blade
// stages, with per-bit path delays for delay fault injection.
//
// Stage k computes f_k(x) = rotate_left(x, 1) ^ (32'h9E3779B9 * (k + 1)) on
// its source (src_i for stage 0, stage_q_i[k-1] otherwise). Every output bit
// follows its source with a transport delay of NOM_PS, except bit fault_bit_i
// of stage fault_stage_i, whose delay is fault_dly_i (a path delay fault, or a
// timing violation when it lands inside the resiliency window). Because f_k
// maps complements to complements, alternating x and ~x makes every bit of
// every stage toggle, which the error detection needs to see a fault.
module tb_blade_comb #(
  parameter int unsigned N      = 3,
  parameter int unsigned W      = 32,
  parameter int unsigned NOM_PS = 600
) (
  input  logic [W-1:0]        src_i,
  input  logic [N-1:0][W-1:0] stage_q_i,
  input  int                  fault_stage_i,
  input  int                  fault_bit_i,
  input  int unsigned         fault_dly_i,
  output logic [N-1:0][W-1:0] stage_d_o
);
  function automatic logic [W-1:0] f(input int k, input logic [W-1:0] x);
    return {x[W-2:0], x[W-1]} ^ W'(32'h9E3779B9 * (k + 1));
  endfunction

  function automatic logic bit_of(input logic [W-1:0] x, input int b);
    return x[b];
  endfunction

  for (genvar k = 0; k < N; k++) begin : g_stage
    logic [W-1:0] src;
    if (k == 0) begin : g_first
      assign src = src_i;
    end else begin : g_next
      assign src = stage_q_i[k-1];
    end
    for (genvar b = 0; b < W; b++) begin : g_bit
      initial begin
        stage_d_o[k][b] = 1'b0;
        #0 stage_d_o[k][b] = bit_of(f(k, src), b);
        forever begin
          @(src);
          fork
            begin
              automatic logic        v = bit_of(f(k, src), b);
              automatic int unsigned t = (fault_stage_i == k && fault_bit_i == b) ? fault_dly_i : NOM_PS;
              #(t) stage_d_o[k][b] = v;
            end
          join_none
        end
      end
    end
  end
endmodule
