`timescale 1ps / 1fs
// tad_sub_adder: per-phase subtractors and the four-phase adder.
//
// Each of the four phases delivers a 15-bit word x[n] = {count, position}:
// the total number of ring stages the pulse has passed, modulo 2^15, at that
// phase's sampling instant. On every rising edge of ck (CK1) the previous
// word of each phase is kept in a latch and the difference of the new and
// the kept word is latched, modulo 2^15: the number of stages passed during
// one sampling period. The adder sums the four differences into the 17-bit
// output dt, which carries two more bits of resolution than one phase.
//
// Published: latch, subtractor and latch per phase, the common CK1 clock and
// the adder. This design's choices: the adder is combinational after the
// difference latches, the asynchronous active-low reset, and dt_valid, which
// rises on the third CK1 edge after reset, when both operands of the
// differences are real samples. Timing: x[n] must be stable at the CK1 edge
// (it is the sample of the previous period); dt follows that edge.
module tad_sub_adder
  import tad_pkg::*;
#(
  parameter int unsigned NP = N_PHASE,
  parameter int unsigned CW = CH_W,
  localparam int unsigned OW = CW + $clog2(NP)
) (
  input  logic                   ck,
  input  logic                   rst_n,
  input  logic [NP-1:0][CW-1:0]  x,
  output logic [NP-1:0][CW-1:0]  diff,
  output logic [OW-1:0]          dt,
  output logic                   dt_valid
);

  logic [NP-1:0][CW-1:0] prev;
  logic [1:0]            fill;

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0;
      diff <= '0;
      fill <= '0;
    end else begin
      for (int n = 0; n < NP; n++) begin
        prev[n] <= x[n];
        diff[n] <= x[n] - prev[n];
      end
      if (fill != 2'd3) fill <= fill + 1'b1;
    end
  end

  assign dt_valid = (fill == 2'd3);

  always_comb begin
    dt = '0;
    for (int n = 0; n < NP; n++) dt = dt + OW'(diff[n]);
  end

endmodule
