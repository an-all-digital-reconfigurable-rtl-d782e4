`timescale 1ps / 1fs
// tb_tad_static: static characteristic at 10 MS/s. A slow ramp from 0.5 V to
// 0.6 V (about 0.3 LSB per sample) is converted; every code between the
// first and the last must occur (no missing codes), the output must never
// step back by more than 1 code, and the code-density DNL (hits per code
// against the mean, over the inner codes) must stay within -1..+1 LSB.
// The published prototype measured DNL of +0.96/-0.80 LSB at this rate;
// the model has no stage mismatch, so only the curvature of the delay law
// and the noise-shaped quantization show here.
module tb_tad_static;
  real         vin = 0.5;
  logic        start_p = 0, cks = 0, rst_n = 1;
  logic [16:0] dt;
  logic        dt_valid;
  int checks = 0, failures = 0;
  localparam realtime TS = 100000.0;
  localparam int N = 4000;
  int hist [int];

  tad_4ckes dut (.vin(vin), .start_p(start_p), .cks(cks), .rst_n(rst_n),
                 .dt(dt), .dt_valid(dt_valid));

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first, last, prev, missing, n_in;
    real mean, dnl, dnl_min, dnl_max;
    #1 rst_n = 0;
    #1000 rst_n = 1;
    start_p = 1;
    repeat (4) begin
      #(TS / 2) cks = 1;
      #(TS / 2) cks = 0;
    end
    prev = int'(dt);
    first = prev;
    for (int k = 0; k < N; k++) begin
      vin = 0.5 + 0.1 * k / N;
      #(TS / 2) cks = 1;
      #(TS / 2) cks = 0;
      if (k >= 4) begin
        if (hist.exists(int'(dt))) hist[int'(dt)]++; else hist[int'(dt)] = 1;
        checks++;
        if (int'(dt) < prev - 1) begin
          failures++;
          $display("FAIL k=%0d step back %0d -> %0d", k, prev, dt);
        end
        prev = int'(dt);
        if (k == 4) first = prev;
      end
    end
    last = prev;
    missing = 0;
    n_in = 0;
    for (int c = first + 2; c <= last - 2; c++) begin
      if (!hist.exists(c)) missing++;
      else n_in += hist[c];
    end
    mean = real'(n_in) / real'(last - first - 3);
    dnl_min = 1.0e9; dnl_max = -1.0e9;
    for (int c = first + 2; c <= last - 2; c++) begin
      dnl = (hist.exists(c) ? real'(hist[c]) : 0.0) / mean - 1.0;
      if (dnl < dnl_min) dnl_min = dnl;
      if (dnl > dnl_max) dnl_max = dnl;
    end
    $display("codes %0d..%0d, missing %0d, DNL %0.2f..%0.2f LSB", first, last, missing, dnl_min, dnl_max);
    checks++;
    if (missing != 0) failures++;
    checks++;
    if (dnl_min < -1.0 || dnl_max > 1.0) failures++;
    checks++;
    if (last - first < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
