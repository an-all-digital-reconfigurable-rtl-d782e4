`timescale 1ps / 1fs
// tad_ckes_gen: behavioural model of the 4-clock-edge-shift (CKES) generator.
//
// Four buffer chains powered by Vin derive CK1..CK4 from the sampling clock
// CKs. Each chain is four inverters followed by a VDDL buffer; in chains 2..4
// one inverter has a shifted switching level, so CKn+1 lags CKn by
// dt = Td(Vin)/4 on average, one quarter of a delay-unit delay. The four
// clocks therefore sample the ring at four sub-stage offsets. Analog block:
// this is a behavioural model. The common insertion delay of each chain is
// BASE_DU delay units (four inverters = two delay units, this design's
// choice); the shift is exactly Td(Vin)/4, with no jitter, evaluated at
// each CKs edge.
module tad_ckes_gen
  import tad_pkg::*;
#(
  parameter int unsigned NP      = N_PHASE,
  parameter real         BASE_DU = 2.0,
  parameter real         BCL_PS  = 30.19,
  parameter real         VTH     = 0.3875,
  parameter real         ALPHA   = 1.5
) (
  input  real           vin,
  input  logic          cks,
  output logic [NP-1:0] ck
);

  initial ck = '0;

  for (genvar n = 0; n < NP; n++) begin : g_ph
    always @(cks) begin
      ck[n] <= #((BASE_DU + real'(n) / real'(NP)) * td_ps(vin, BCL_PS, VTH, ALPHA)) cks;
    end
  end

endmodule
