`timescale 1ps / 1fs
// tb_tad_differential: end-to-end test of the differential-setup ADC at its
// default parameters.
//  1. Offset calibration: both inputs at the 0.55 V common mode with cal_en
//     high; the stored offset must be within 8 codes of 0 (identical rings).
//  2. 10 MS/s: differential inputs +-d around the common mode; each dout
//     must be within 10 codes of 4*Ts*(1/Td(vp) - 1/Td(vn)) - offset,
//     computed here from the delay law, and dout(+d) must equal -dout(-d)
//     within 12 codes (the even-order part cancels).
//  3. 200 kS/s: the same check at one differential input (the resolution
//     mode switch).
//  4. Suspend: with start_p low both single-ended outputs fall to 0.
// Each mechanism is counted (calibration samples, rejected counter samples
// in either ADC, samples per rate, suspended samples); one that never
// happened is a failure.
module tb_tad_differential;
  real                vin_p = 0.55, vin_n = 0.55;
  logic               start_p = 0, cks = 0, rst_n = 1, cal_en = 0;
  logic [16:0]        dt_p, dt_n;
  logic signed [18:0] offset, dout;
  logic               dout_valid;
  int checks = 0, failures = 0;
  int n_cal = 0, n_rej = 0, n_fast = 0, n_slow = 0, n_susp = 0;
  realtime ts = 100000.0;

  tad_differential dut (.vin_p(vin_p), .vin_n(vin_n), .start_p(start_p), .cks(cks),
                        .rst_n(rst_n), .cal_en(cal_en), .dt_p(dt_p), .dt_n(dt_n),
                        .offset(offset), .dout(dout), .dout_valid(dout_valid));

  function automatic real td_ref(real v);
    return 30.19 * v / ((v - 0.3875) ** 1.5);
  endfunction

  always @(negedge dut.u_tad_p.ckd[0])
    if (dut.u_tad_p.u_tq.e[0][4] == 1'b0 && dut.u_tad_p.u_tq.c1[0] != dut.u_tad_p.u_tq.c2[0]) n_rej++;
  always @(negedge dut.u_tad_n.ckd[0])
    if (dut.u_tad_n.u_tq.e[0][4] == 1'b0 && dut.u_tad_n.u_tq.c1[0] != dut.u_tad_n.u_tq.c2[0]) n_rej++;

  task automatic period();
    #(ts / 2) cks = 1;
    #(ts / 2) cks = 0;
    if (cal_en && dut.u_diff.in_valid) n_cal++;
  endtask

  // Apply +-d, settle, return the mean of n outputs after checking each.
  task automatic measure(real d, int n, output real mean);
    real exp;
    vin_p = 0.55 + d;
    vin_n = 0.55 - d;
    repeat (5) period();
    exp = 4.0 * ts * (1.0 / td_ref(vin_p) - 1.0 / td_ref(vin_n)) - real'(offset);
    mean = 0.0;
    for (int k = 0; k < n; k++) begin
      period();
      checks++;
      if (!dout_valid || real'(dout) - exp > 10.0 || exp - real'(dout) > 10.0) begin
        failures++;
        $display("FAIL d=%f dout=%0d exp=%f", d, dout, exp);
      end
      if (ts < 1000000.0) n_fast++; else n_slow++;
      mean += real'(dout) / n;
    end
  endtask

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mp, mn;
    #1 rst_n = 0;
    #1000 rst_n = 1;
    start_p = 1;
    // 1. calibration at the common mode
    cal_en = 1;
    repeat (8) period();
    cal_en = 0;
    period();
    checks++;
    if (offset > 8 || offset < -8) begin
      failures++;
      $display("FAIL offset=%0d", offset);
    end
    $display("stored offset %0d", offset);
    // 2. 10 MS/s, symmetric inputs
    for (int j = 1; j <= 5; j++) begin
      measure(0.01 * j, 4, mp);
      measure(-0.01 * j, 4, mn);
      checks++;
      if (mp + mn > 12.0 || mp + mn < -12.0) begin
        failures++;
        $display("FAIL asymmetry d=%f: %f vs %f", 0.01 * j, mp, mn);
      end
    end
    $display("10 MS/s: dout(+50 mV) = %f", mp);
    // 3. 200 kS/s
    ts = 5000000.0;
    measure(0.03, 2, mp);
    $display("200 kS/s: dout(+30 mV) = %f", mp);
    // 4. suspend
    ts = 100000.0;
    start_p = 0;
    repeat (4) period();
    for (int k = 0; k < 3; k++) begin
      period();
      checks++;
      if (dt_p !== '0 || dt_n !== '0) failures++;
      else n_susp++;
    end
    $display("mechanisms: cal=%0d rejected=%0d fast=%0d slow=%0d suspended=%0d",
             n_cal, n_rej, n_fast, n_slow, n_susp);
    checks++; if (n_cal == 0)  failures++;
    checks++; if (n_rej == 0)  failures++;
    checks++; if (n_fast == 0) failures++;
    checks++; if (n_slow == 0) failures++;
    checks++; if (n_susp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
