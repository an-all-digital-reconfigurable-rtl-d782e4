`timescale 1ps / 1fs
// tad_delay_line: behavioural model of a short delay line of Vin-powered
// delay units.
//
// Two such lines appear in the counter path of the 4CKES ADC: the buffers in
// front of the counter, which together with the counter postpone its update
// by about a quarter of the ring period (N_DU = 8 of 32 stages), and the
// line that derives CKnD from CKn half a ring period later (N_DU = 16). They
// are built from the same delay units as the ring, so their delay is
// N_DU * Td(Vin) and tracks the ring period. Analog block: this is a
// behavioural model. The delay is a transport delay evaluated at each input
// edge; the output starts low. INVERT selects an inverting line; the
// published figures show the half-period line as an inverter chain, and this
// design uses an even chain (non-inverting) for both.
module tad_delay_line
  import tad_pkg::*;
#(
  parameter int unsigned N_DU   = 8,
  parameter bit          INVERT = 1'b0,
  parameter real         BCL_PS = 30.19,
  parameter real         VTH    = 0.3875,
  parameter real         ALPHA  = 1.5
) (
  input  real  vin,
  input  logic in,
  output logic out
);

  initial out = INVERT;

  always @(in) begin
    out <= #(real'(N_DU) * td_ps(vin, BCL_PS, VTH, ALPHA)) (in ^ INVERT);
  end

endmodule
