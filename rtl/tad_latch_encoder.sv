`timescale 1ps / 1fs
// tad_latch_encoder: latch and encoder of the ring-delay-line taps.
//
// On each rising edge of its sampling clock ck the 32 taps P1..P32 of the
// ring are captured, and the captured pattern is encoded into the 5-bit
// position e of the circulating pulse: the index i (0 = P1 .. 31 = P32) of
// the high tap whose next tap (cyclically) is low. e[4] is therefore 0 while
// the pulse is in P1..P16 and 1 while it is in P17..P32, which the counter
// latch uses to reject a metastable counter sample. If several positions
// match (a bubble), the lowest one wins; if none does (ring idle) e reads
// N-1, the position just before P1, so that an idle ring reads as one step
// before the first one.
//
// Published: 32 taps, 5-bit output, position encoding, E[4] meaning.
// This design's choices: a rising-edge flip-flop as the latch, the
// leading-edge rule, the bubble rule and the asynchronous active-low reset.
// Timing: e is valid after the ck edge, from the register, through the
// combinational encoder.
module tad_latch_encoder
  import tad_pkg::*;
#(
  parameter int unsigned NS = N_STAGES,
  localparam int unsigned EW = $clog2(NS)
) (
  input  logic          ck,
  input  logic          rst_n,
  input  logic [NS-1:0] p,
  output logic [EW-1:0] e
);

  logic [NS-1:0] p_q;

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) p_q <= '0;
    else        p_q <= p;
  end

  always_comb begin
    e = EW'(NS - 1);
    for (int i = NS - 1; i >= 0; i--) begin
      if (p_q[i] && !p_q[(i + 1) % NS]) e = EW'(i);
    end
  end

endmodule
