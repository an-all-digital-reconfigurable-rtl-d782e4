`timescale 1ps / 1fs
// tad_time_quantizer: the digital part of one 4CKES time-domain ADC.
//
// Inputs are the 32 ring taps p, the delayed P32 that clocks the lap
// counter (cnt_clk), the four shifted sampling clocks ck[0..3] (CK1..CK4)
// and their half-ring-period delayed copies ckd[0..3] (CK1D..CK4D). For each
// phase n a latch-and-encoder gives the 5-bit pulse position E and a pair of
// counter latches with E[4]-controlled selection gives the metastability-free
// 10-bit lap count; together they form the 15-bit word {count, E}. The
// subtract/adder, clocked by CK1, turns the four words into the 17-bit
// number of quarter-stages the pulse travelled during one sampling period.
//
// The structure (four encoders sharing one counter, per-phase counter
// latches, subtractors and adder) is published. Applying the two-latch
// counter scheme, which is published for CK1, to every phase is this
// design's reading. Timing: a sample taken at CK1 edge k appears on dt after
// CK1 edge k+1, as the difference to the sample of edge k-1; dt_valid rises
// after the third CK1 edge following reset.
module tad_time_quantizer
  import tad_pkg::*;
#(
  parameter int unsigned NS = N_STAGES,
  parameter int unsigned CW = CNT_W,
  parameter int unsigned NP = N_PHASE,
  localparam int unsigned EW = $clog2(NS),
  localparam int unsigned XW = CW + EW,
  localparam int unsigned OW = XW + $clog2(NP)
) (
  input  logic                  rst_n,
  input  logic [NS-1:0]         p,
  input  logic                  cnt_clk,
  input  logic [NP-1:0]         ck,
  input  logic [NP-1:0]         ckd,
  output logic [NP-1:0][XW-1:0] x,
  output logic [OW-1:0]         dt,
  output logic                  dt_valid
);

  logic [CW-1:0]         c;
  logic [NP-1:0][EW-1:0] e;
  logic [NP-1:0][CW-1:0] c1, c2, c_sel;
  logic [NP-1:0][XW-1:0] diff;

  tad_counter #(.W(CW)) u_counter (
    .clk   (cnt_clk),
    .rst_n (rst_n),
    .c     (c)
  );

  for (genvar n = 0; n < NP; n++) begin : g_phase
    tad_latch_encoder #(.NS(NS)) u_enc (
      .ck    (ck[n]),
      .rst_n (rst_n),
      .p     (p),
      .e     (e[n])
    );

    tad_count_latch #(.W(CW)) u_cnt_latch (
      .ck    (ck[n]),
      .ckd   (ckd[n]),
      .rst_n (rst_n),
      .c     (c),
      .e_msb (e[n][EW-1]),
      .c1    (c1[n]),
      .c2    (c2[n]),
      .c_sel (c_sel[n])
    );

    assign x[n] = {c_sel[n], e[n]};
  end

  tad_sub_adder #(.NP(NP), .CW(XW)) u_sub_adder (
    .ck       (ck[0]),
    .rst_n    (rst_n),
    .x        (x),
    .diff     (diff),
    .dt       (dt),
    .dt_valid (dt_valid)
  );

endmodule
