`timescale 1ps / 1fs
// tb_tad_resolution: the published measurement of output resolution against
// conversion rate. A 0.5..0.6 V input (0.6 V supply) is quantized at
// 200 kS/s, 1 MS/s and 10 MS/s; the output span DT(0.6 V) - DT(0.5 V) gives
// resolution = log2(span) and sensitivity = 100 mV / span. They are checked
// against the published 15.7, 13.5 and 10.2 bit (1.96, 8.6, 82.7 uV/LSB)
// within 0.2 bit and 15 %; the ring model's delay constants were fitted to
// this measurement, so the test ties the model to it. The 17-bit output must
// not overflow at the slowest rate.
module tb_tad_resolution;
  real         vin = 0.5;
  logic        start_p = 0, cks = 0, rst_n = 1;
  logic [16:0] dt;
  logic        dt_valid;
  int checks = 0, failures = 0;
  realtime     ts = 100000.0;

  tad_4ckes dut (.vin(vin), .start_p(start_p), .cks(cks), .rst_n(rst_n),
                 .dt(dt), .dt_valid(dt_valid));

  task automatic period();
    #(ts / 2) cks = 1;
    #(ts / 2) cks = 0;
  endtask

  task automatic level(real v, output real mean);
    vin = v;
    repeat (4) period();
    mean = 0.0;
    repeat (2) begin
      period();
      mean += real'(dt) / 2.0;
    end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime rate_ts [3] = '{5000000.0, 1000000.0, 100000.0};
    real     res_pub [3] = '{15.7, 13.5, 10.2};
    real     sen_pub [3] = '{1.96, 8.6, 82.7};
    real lo, hi, res, sen;
    #1 rst_n = 0;
    #1000 rst_n = 1;
    start_p = 1;
    for (int r = 0; r < 3; r++) begin
      ts = rate_ts[r];
      level(0.5, lo);
      level(0.6, hi);
      res = $ln(hi - lo) / $ln(2.0);
      sen = 0.1e6 / (hi - lo);
      $display("Ts=%0.0f ns: DT %0.1f..%0.1f, %0.2f bit, %0.2f uV/LSB", ts / 1000.0, lo, hi, res, sen);
      checks++;
      if (res - res_pub[r] > 0.2 || res_pub[r] - res > 0.2) failures++;
      checks++;
      if (sen > 1.15 * sen_pub[r] || sen < 0.85 * sen_pub[r]) failures++;
      checks++;
      if (hi <= lo || hi > 131071.0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
