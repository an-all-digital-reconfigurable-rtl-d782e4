`timescale 1ps / 1fs
// tb_tad_sine: sine input with high-frequency supply ripple, at the published
// test conditions (0.5..0.6 V input, 10 MS/s with an 8.54 kHz tone and
// 1 MS/s with a 9.98 kHz tone, one full tone period each).
// The input is vin(t) = 0.55 + 0.045*sin(2*pi*f_in*t) + 0.01*sin(2*pi*f_r*t)
// with the ripple f_r at twice the sampling rate, updated every 250 ps. The
// testbench integrates 1/Td(vin(t)) itself and checks:
//  - every output is within 6 codes of 4 x the integral over its period
//    (the output is the moving average of the input over the period);
//  - the running sum of outputs stays within 8 codes of 4 x the running
//    integral (the quantization error does not accumulate: first-order
//    noise shaping);
//  - every output is within 8 codes of the same integral without the ripple
//    (ripple at multiples of the sampling rate integrates away);
//  - the output swings over at least 90 % of the computed range.
module tb_tad_sine;
  real         vin = 0.55;
  logic        start_p = 0, cks = 0, rst_n = 1;
  logic [16:0] dt;
  logic        dt_valid;
  int checks = 0, failures = 0;
  realtime     ts = 100000.0;
  real         f_in = 8.54e3;
  real         acc = 0.0, acc_slow = 0.0;   // integrals of 1/Td in stages
  real         at_ck [$];
  real         at_ck_slow [$];
  localparam real PI = 3.14159265358979;
  localparam realtime DT_STEP = 250.0;

  tad_4ckes dut (.vin(vin), .start_p(start_p), .cks(cks), .rst_n(rst_n),
                 .dt(dt), .dt_valid(dt_valid));

  function automatic real td_ref(real v);
    return 30.19 * v / ((v - 0.3875) ** 1.5);
  endfunction

  // Input generator and integrator (midpoint rule over each update step).
  initial begin
    forever begin
      real t, v_slow;
      t = ($realtime + DT_STEP / 2.0) * 1.0e-12;
      v_slow = 0.55 + 0.045 * $sin(2.0 * PI * f_in * t);
      vin = v_slow + 0.01 * $sin(2.0 * PI * (2.0e12 / ts) * t);
      if (start_p) begin
        acc      += DT_STEP / td_ref(vin);
        acc_slow += DT_STEP / td_ref(v_slow);
      end
      #(DT_STEP);
    end
  end

  always @(posedge dut.ck[0]) begin
    at_ck.push_back(acc);
    at_ck_slow.push_back(acc_slow);
  end

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_tone(int n_samples);
    real exp, exp_slow, sum_dt, sum_exp, lo, hi, lo_exp, hi_exp;
    int k0;
    at_ck.delete();
    at_ck_slow.delete();
    // align the phase windows: cks edges fall on multiples of ts
    #(ts - ($realtime - ts * $floor($realtime / ts)));
    sum_dt = 0.0; sum_exp = 0.0;
    lo = 1.0e9; hi = 0.0; lo_exp = 1.0e9; hi_exp = 0.0;
    for (int k = 1; k <= n_samples; k++) begin
      #(ts / 2) cks = 1;
      #(ts / 2) cks = 0;
      if (k >= 4) begin
        exp      = 4.0 * (at_ck[k-2] - at_ck[k-3]);
        exp_slow = 4.0 * (at_ck_slow[k-2] - at_ck_slow[k-3]);
        sum_dt  += real'(dt);
        sum_exp += exp;
        checks++;
        if (!dt_valid || real'(dt) - exp > 6.0 || exp - real'(dt) > 6.0) begin
          failures++;
          $display("FAIL k=%0d dt=%0d exp=%f", k, dt, exp);
        end
        checks++;
        if (sum_dt - sum_exp > 8.0 || sum_exp - sum_dt > 8.0) begin
          failures++;
          $display("FAIL k=%0d running sum %f vs %f", k, sum_dt, sum_exp);
        end
        checks++;
        if (real'(dt) - exp_slow > 8.0 || exp_slow - real'(dt) > 8.0) begin
          failures++;
          $display("FAIL k=%0d ripple not rejected dt=%0d slow=%f", k, dt, exp_slow);
        end
        if (real'(dt) < lo) lo = real'(dt);
        if (real'(dt) > hi) hi = real'(dt);
        if (exp < lo_exp) lo_exp = exp;
        if (exp > hi_exp) hi_exp = exp;
      end
    end
    $display("Ts=%0.0f ns f_in=%0.0f Hz: dt %0.0f..%0.0f (computed %0.1f..%0.1f), final sum error %0.2f",
             ts / 1000.0, f_in, lo, hi, lo_exp, hi_exp, sum_dt - sum_exp);
    checks++;
    if (hi - lo < 0.9 * (hi_exp - lo_exp)) failures++;
  endtask

  initial begin
    #1 rst_n = 0;
    #1000 rst_n = 1;
    start_p = 1;
    #(ts);
    run_tone(int'(1.0 / (f_in * ts * 1.0e-12)) + 4);
    // 1 MS/s with a 9.98 kHz tone
    ts   = 1000000.0;
    f_in = 9.98e3;
    rst_n = 0;
    #1000 rst_n = 1;
    run_tone(int'(1.0 / (f_in * ts * 1.0e-12)) + 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
