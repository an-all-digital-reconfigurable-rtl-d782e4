`timescale 1ps / 1fs
// tad_diff_sub: output subtractor of the differential-setup ADC, with offset
// calibration.
//
// Two identical ADCs quantize the positive and negative inputs; their
// outputs dt_p and dt_n are subtracted, which removes the even-order part of
// the nonlinear voltage-to-delay law. A residual offset (free-running
// frequency mismatch of the two rings) is removed by calibration: while
// cal_en is high the inputs are meant to be shorted to the common-mode
// voltage, and each valid difference is stored in the offset register;
// in normal operation the stored offset is subtracted:
//   dout = (dt_p - dt_n) - offset.
// The subtraction and the stored offset are published as functions. This
// design's choices: registers on the rising edge of clk (the common sampling
// clock CKs; the ADC outputs, updated shortly after the previous edge, are
// stable then), a signed result two bits wider than the inputs so it never
// overflows, the last calibration sample being the one kept, and the
// asynchronous active-low reset that clears the offset. Timing: dout and
// dout_valid are registered, one clk after their operands.
module tad_diff_sub
  import tad_pkg::*;
#(
  parameter int unsigned IW = DT_W,
  localparam int unsigned OW = IW + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IW-1:0]        dt_p,
  input  logic [IW-1:0]        dt_n,
  input  logic                 in_valid,
  input  logic                 cal_en,
  output logic signed [OW-1:0] offset,
  output logic signed [OW-1:0] dout,
  output logic                 dout_valid
);

  logic signed [OW-1:0] raw;

  assign raw = $signed({2'b00, dt_p}) - $signed({2'b00, dt_n});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset     <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      if (in_valid && cal_en) offset <= raw;
      dout       <= raw - offset;
      dout_valid <= in_valid && !cal_en;
    end
  end

endmodule
