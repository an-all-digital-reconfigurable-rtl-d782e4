`timescale 1ps / 1fs
// tad_count_latch: metastability cancellation for the counter latch.
//
// The lap counter runs asynchronously to the sampling clock. Its value is
// captured twice: by latch A on ck (CKn) and by latch B on ckd (CKnD, the
// same clock half a ring period later). Because the counter is updated about
// a quarter ring period after the pulse leaves P32, a sample taken by ck can
// only be caught mid-update while the pulse is in the first half of the ring
// (e_msb = 0). In that case latch B, taken half a period later when the
// counter is quiet and already includes this lap, is used; otherwise latch A:
//   c_sel = e_msb ? c1 : c2.
// The two-latch scheme and the selection rule are published; flip-flops for
// latches and the asynchronous active-low reset are this design's choices.
// Timing: c_sel is final after ckd, which is half a ring period after ck.
module tad_count_latch
  import tad_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         ck,
  input  logic         ckd,
  input  logic         rst_n,
  input  logic [W-1:0] c,
  input  logic         e_msb,
  output logic [W-1:0] c1,
  output logic [W-1:0] c2,
  output logic [W-1:0] c_sel
);

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) c1 <= '0;
    else        c1 <= c;
  end

  always_ff @(posedge ckd or negedge rst_n) begin
    if (!rst_n) c2 <= '0;
    else        c2 <= c;
  end

  assign c_sel = e_msb ? c1 : c2;

endmodule
