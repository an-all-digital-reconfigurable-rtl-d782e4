`timescale 1ps / 1fs
// tad_counter: 10-bit frequency counter of ring laps.
//
// Counts rising edges of clk, which is tap P32 of the ring after the buffers
// that postpone the count by about a quarter of a ring period. It wraps
// modulo 2^W; only differences of successive samples are used downstream, so
// the wrap is harmless as long as fewer than 2^W laps fit in one sampling
// period. Width 10 is published; the asynchronous active-low reset is this
// design's choice. Timing: c changes just after each rising edge of clk.
module tad_counter
  import tad_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] c
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= '0;
    else        c <= c + 1'b1;
  end

endmodule
