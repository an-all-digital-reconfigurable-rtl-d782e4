`timescale 1ps / 1fs
// tad_4ckes: one 17-bit 4-clock-edge-shift time-domain ADC (4CKES-TAD).
//
// The input voltage vin supplies a 32-stage ring delay line; once start_p is
// high a pulse circulates without dead time, faster for a higher vin. The
// ADC counts how many delay units the pulse passes within each period of
// the sampling clock cks: a 10-bit lap counter gives the coarse part and the
// latched tap pattern the 5-bit position. Four copies of cks shifted by a
// quarter of a delay-unit delay (CK1..CK4) sample the position four times;
// the sum of the four per-period stage counts is the 17-bit output dt, with
// 2 bits more resolution than one phase. dt is the time integral of the
// ring frequency over one period, so it is a moving average of vin, with
// first-order shaping of the quantization error. Its value is about
// 4*Ts/Td(vin); the resolution grows with Ts, which is how the resolution is
// reconfigured: by the cks rate alone.
//
// The ring, the clock-shift generator and the two delay lines are analog
// blocks and appear here as behavioural models; tad_time_quantizer is the
// synthesizable digital part. Ports: vin (V), start_p (low suspends the
// ring), cks (sampling clock), rst_n (asynchronous, active low, this
// design's addition), dt and dt_valid (CK1 domain). Timing: the sample of
// CK1 edge k is on dt after CK1 edge k+1; CK1 lags cks by about two delay
// units.
//
// Lint notes: the ring taps are, by design, both sampled as data by the four
// encoders and (tap P32, through the buffers) used as the counter clock, so a
// lint tool reports them as flopped both synchronously and asynchronously.
// That is the nature of a time-to-digital converter, not an error.
module tad_4ckes
  import tad_pkg::*;
#(
  parameter real BCL_PS = 30.19,
  parameter real VTH    = 0.3875,
  parameter real ALPHA  = 1.5
) (
  input  real            vin,
  input  logic           start_p,
  input  logic           cks,
  input  logic           rst_n,
  output logic [DT_W-1:0] dt,
  output logic           dt_valid
);

  logic [N_STAGES-1:0]         p;
  logic                        cnt_clk;
  logic [N_PHASE-1:0]          ck, ckd;
  logic [N_PHASE-1:0][CH_W-1:0] x;

  tad_rdl #(.NS(N_STAGES), .BCL_PS(BCL_PS), .VTH(VTH), .ALPHA(ALPHA)) u_rdl (
    .vin     (vin),
    .start_p (start_p),
    .p       (p)
  );

  // Buffers in front of the counter: a quarter of the ring period.
  tad_delay_line #(.N_DU(N_STAGES / 4), .BCL_PS(BCL_PS), .VTH(VTH), .ALPHA(ALPHA)) u_cnt_dly (
    .vin (vin),
    .in  (p[N_STAGES-1]),
    .out (cnt_clk)
  );

  tad_ckes_gen #(.NP(N_PHASE), .BCL_PS(BCL_PS), .VTH(VTH), .ALPHA(ALPHA)) u_ckes (
    .vin (vin),
    .cks (cks),
    .ck  (ck)
  );

  // CKnD: each sampling clock half a ring period later.
  for (genvar n = 0; n < N_PHASE; n++) begin : g_ckd
    tad_delay_line #(.N_DU(N_STAGES / 2), .BCL_PS(BCL_PS), .VTH(VTH), .ALPHA(ALPHA)) u_ckd_dly (
      .vin (vin),
      .in  (ck[n]),
      .out (ckd[n])
    );
  end

  tad_time_quantizer #(.NS(N_STAGES), .CW(CNT_W), .NP(N_PHASE)) u_tq (
    .rst_n    (rst_n),
    .p        (p),
    .cnt_clk  (cnt_clk),
    .ck       (ck),
    .ckd      (ckd),
    .x        (x),
    .dt       (dt),
    .dt_valid (dt_valid)
  );

endmodule
