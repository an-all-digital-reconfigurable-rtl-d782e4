`timescale 1ps / 1fs
// tad_pkg: sizes and the delay-unit model shared by the 4CKES time-domain ADC.
//
// The ring delay line (RDL) has 32 stages, so a pulse position needs 5 bits;
// the lap counter has 10 bits; one sampling phase therefore yields a 15-bit
// word {count, position}, and the sum of four phases is 17 bits wide. These
// numbers are the published ones.
//
// td_ps() is the delay of one delay unit (two inverters) as a function of its
// supply voltage Vin, Td = b*CL*Vin / (Vin - Vth)^a. The form is the published
// one; the constants used by the behavioural models are fitted by this design
// (see tad_rdl) and are not silicon data.
package tad_pkg;

  localparam int unsigned N_STAGES = 32;                  // RDL stages P1..P32
  localparam int unsigned ENC_W    = $clog2(N_STAGES);    // 5-bit encoder
  localparam int unsigned CNT_W    = 10;                  // 10-bit frequency counter
  localparam int unsigned CH_W     = CNT_W + ENC_W;       // 15-bit data per phase
  localparam int unsigned N_PHASE  = 4;                   // CK1..CK4
  localparam int unsigned DT_W     = CH_W + $clog2(N_PHASE); // 17-bit output

  typedef logic [CH_W-1:0] ch_word_t;
  typedef logic [DT_W-1:0] dt_word_t;

  // Delay of one delay unit in ps. Below the threshold the unit does not
  // switch; a very large delay stands for that.
  function automatic real td_ps(real vin, real bcl_ps, real vth, real alpha);
    if (vin <= vth + 0.001) return 1.0e9;
    return bcl_ps * vin / ((vin - vth) ** alpha);
  endfunction

endpackage
