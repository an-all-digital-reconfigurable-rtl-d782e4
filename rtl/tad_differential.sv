`timescale 1ps / 1fs
// tad_differential: differential-setup 4CKES time-domain ADC (top level).
//
// Two identical 4CKES ADCs (tad_4ckes) share the sampling clock cks and the
// start signal; one is supplied by vin_p, the other by vin_n. Their rings
// run at nominally equal frequencies for a zero differential input, so the
// difference of their 17-bit outputs is proportional to vin_p - vin_n, and
// the even-order distortion of the voltage-to-delay law cancels.
// tad_diff_sub subtracts the two outputs and a stored offset, measured while
// cal_en is high with both inputs at the common-mode voltage.
//
// Published: two identical ADCs, common CKs, output subtraction, offset
// register. This design's choices: the subtraction is on-chip logic clocked
// by cks, the offset calibration control (cal_en), the reset, and that each
// single-ended output is also brought out. The two rings can be given
// different delay constants (BCL_N_PS) to model a frequency offset.
// Timing: dout is registered on the cks edge after both ADC outputs updated.
module tad_differential
  import tad_pkg::*;
#(
  parameter real BCL_P_PS = 30.19,
  parameter real BCL_N_PS = 30.19,
  parameter real VTH      = 0.3875,
  parameter real ALPHA    = 1.5
) (
  input  real                     vin_p,
  input  real                     vin_n,
  input  logic                    start_p,
  input  logic                    cks,
  input  logic                    rst_n,
  input  logic                    cal_en,
  output logic [DT_W-1:0]         dt_p,
  output logic [DT_W-1:0]         dt_n,
  output logic signed [DT_W+1:0]  offset,
  output logic signed [DT_W+1:0]  dout,
  output logic                    dout_valid
);

  logic valid_p, valid_n;

  tad_4ckes #(.BCL_PS(BCL_P_PS), .VTH(VTH), .ALPHA(ALPHA)) u_tad_p (
    .vin      (vin_p),
    .start_p  (start_p),
    .cks      (cks),
    .rst_n    (rst_n),
    .dt       (dt_p),
    .dt_valid (valid_p)
  );

  tad_4ckes #(.BCL_PS(BCL_N_PS), .VTH(VTH), .ALPHA(ALPHA)) u_tad_n (
    .vin      (vin_n),
    .start_p  (start_p),
    .cks      (cks),
    .rst_n    (rst_n),
    .dt       (dt_n),
    .dt_valid (valid_n)
  );

  tad_diff_sub #(.IW(DT_W)) u_diff (
    .clk        (cks),
    .rst_n      (rst_n),
    .dt_p       (dt_p),
    .dt_n       (dt_n),
    .in_valid   (valid_p && valid_n),
    .cal_en     (cal_en),
    .offset     (offset),
    .dout       (dout),
    .dout_valid (dout_valid)
  );

endmodule
