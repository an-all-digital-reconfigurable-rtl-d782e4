`timescale 1ps / 1fs
// tb_tad_4ckes: self-checking test of one complete 4CKES ADC (ring, clock
// shift generator, delay lines and digital quantizer).
//  - 10 MS/s: for input voltages across 0.5..0.6 V, each settled output must
//    be within 4 codes of 4*Ts/Td(Vin), computed here from the delay law, and
//    the sum of 8 outputs within 6 codes of 8 times that (the quantization
//    error does not accumulate: first-order shaping); codes must rise with Vin.
//  - 1 MS/s and 200 kS/s: the same at 10 and 50 times longer periods
//    (higher resolution).
//  - suspend: with start_p low the output falls to 0.
//  - the counter-latch selection must have rejected at least one sample.
module tb_tad_4ckes;
  real         vin = 0.5;
  logic        start_p = 0, cks = 0, rst_n = 1;
  logic [16:0] dt;
  logic        dt_valid;
  int checks = 0, failures = 0, rejected = 0;
  realtime     ts = 100000.0;

  tad_4ckes dut (.vin(vin), .start_p(start_p), .cks(cks), .rst_n(rst_n),
                 .dt(dt), .dt_valid(dt_valid));

  function automatic real td_ref(real v);
    return 30.19 * v / ((v - 0.3875) ** 1.5);
  endfunction

  always @(negedge dut.ckd[0])
    if (dut.u_tq.e[0][4] == 1'b0 && dut.u_tq.c1[0] != dut.u_tq.c2[0]) rejected++;

  task automatic period();
    #(ts / 2) cks = 1;
    #(ts / 2) cks = 0;
  endtask

  task automatic check_level(real v, int n_sum);
    real exp, sum;
    vin = v;
    repeat (4) period();
    exp = 4.0 * ts / td_ref(v);
    sum = 0.0;
    for (int k = 0; k < n_sum; k++) begin
      period();
      checks++;
      if (!dt_valid || real'(dt) - exp > 4.0 || exp - real'(dt) > 4.0) begin
        failures++;
        $display("FAIL vin=%f dt=%0d exp=%f", v, dt, exp);
      end
      sum += real'(dt);
    end
    checks++;
    if (sum - n_sum * exp > 6.0 || n_sum * exp - sum > 6.0) begin
      failures++;
      $display("FAIL vin=%f sum=%f exp=%f", v, sum, n_sum * exp);
    end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last;
    #1 rst_n = 0;
    #1000 rst_n = 1;
    start_p = 1;
    // 10 MS/s sweep
    last = 0;
    for (int j = 0; j <= 10; j++) begin
      check_level(0.5 + 0.01 * j, 8);
      checks++;
      if (int'(dt) <= last) begin
        failures++;
        $display("FAIL not monotonic at %f", 0.5 + 0.01 * j);
      end
      last = int'(dt);
    end
    $display("10 MS/s: dt(0.5 V)..dt(0.6 V) span measured, last code %0d", last);
    // 1 MS/s
    ts = 1000000.0;
    check_level(0.55, 2);
    // 200 kS/s
    ts = 5000000.0;
    check_level(0.5, 2);
    check_level(0.6, 2);
    // suspend
    ts = 100000.0;
    start_p = 0;
    repeat (4) period();
    checks++;
    if (dt !== '0) begin
      failures++;
      $display("FAIL suspended dt=%0d", dt);
    end
    checks++;
    if (rejected == 0) begin
      failures++;
      $display("FAIL no counter sample rejected");
    end
    $display("rejected counter samples: %0d", rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
