`timescale 1ps / 1fs
// tad_rdl: behavioural model of the 32-stage ring delay line (RDL).
//
// This is an analog block (inverter-based delay units whose supply is the
// input voltage Vin), so this file is a behavioural model, not synthesizable
// logic. While start_p is high a pulse circulates round the ring; every
// td_ps(vin) picoseconds its leading edge moves on by one delay unit, so the
// number of stages passed within a sampling period is Ts/Td(Vin). Taps
// p[0]..p[N_STAGES-1] stand for P1..P32.
//
// Tap pattern (this design's reading of the pulse ring): the circulating
// pulse is half a ring wide, so a tap is high from the moment the leading
// edge reaches it until the edge has moved N_STAGES/2 stages further. At any
// time 16 neighbouring taps are high and the position of the leading edge is
// the last high tap before a low one. P32 is thus high for half of each lap,
// as in the published timing chart. When start_p is low the ring is
// suspended: it stops and all taps go low. The gate-level ring (start gate
// and the three delay-unit types) is not modelled; their delays are taken
// as equal, which the published design aims for.
//
// Td(Vin) follows the published delay law Td = b*CL*Vin/(Vin-Vth)^a with
// a = 1.5; BCL_PS and VTH are fitted by this design so that Td = 400 ps at
// 0.5 V and 185 ps at 0.6 V, which reproduces the published resolution of the
// prototype (about 2.9 delay units per ns more at 0.6 V than at 0.5 V).
// Vin is read afresh at every step, so the model integrates Vin over time.
module tad_rdl
  import tad_pkg::*;
#(
  parameter int unsigned NS     = N_STAGES,
  parameter real         BCL_PS = 30.19,
  parameter real         VTH    = 0.3875,
  parameter real         ALPHA  = 1.5
) (
  input  real              vin,
  input  logic             start_p,
  output logic [NS-1:0]    p
);

  longint steps = 0;   // leading-edge steps since start_p rose

  function automatic logic [NS-1:0] taps(longint s);
    logic [NS-1:0] t;
    for (int i = 0; i < NS; i++) begin
      longint d;
      d = s - 1 - longint'(i);
      t[i] = (d >= 0) && ((d % longint'(NS)) < (longint'(NS) / 2));
    end
    return t;
  endfunction

  // Self-timed step generator: every transition of step_tgl schedules the
  // next one Td(Vin) later, for as long as start_p is high.
  logic step_tgl  = 1'b0;
  logic step_seen = 1'b0;

  always @(step_tgl or start_p) begin
    if (start_p) step_tgl <= #(td_ps(vin, BCL_PS, VTH, ALPHA)) ~step_tgl;
  end

  // Each step moves the leading edge on by one tap.
  always @(step_tgl or start_p) begin
    if (!start_p) begin
      steps     = 0;
      p         = '0;
      step_seen = step_tgl;
    end else if (step_tgl != step_seen) begin
      step_seen = step_tgl;
      steps     = steps + 1;
      p         = taps(steps);
    end
  end

endmodule
