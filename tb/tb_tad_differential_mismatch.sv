`timescale 1ps / 1fs
// tb_tad_differential_mismatch: offset calibration with mismatched rings.
// The negative-side ring is given 5 % more delay per unit, so for equal
// inputs the two ADCs disagree by a large offset. After calibration at the
// 0.55 V common mode the stored offset must be within 10 codes of the
// mismatch computed here from the delay law, zero differential input must
// then read within 10 codes of 0, and a +-20 mV input must match the
// computed difference less the offset. Runs at 10 MS/s.
module tb_tad_differential_mismatch;
  localparam real BCL_N = 30.19 * 1.05;
  real                vin_p = 0.55, vin_n = 0.55;
  logic               start_p = 0, cks = 0, rst_n = 1, cal_en = 0;
  logic [16:0]        dt_p, dt_n;
  logic signed [18:0] offset, dout;
  logic               dout_valid;
  int checks = 0, failures = 0;
  localparam realtime TS = 100000.0;

  tad_differential #(.BCL_N_PS(BCL_N)) dut (
    .vin_p(vin_p), .vin_n(vin_n), .start_p(start_p), .cks(cks), .rst_n(rst_n),
    .cal_en(cal_en), .dt_p(dt_p), .dt_n(dt_n), .offset(offset), .dout(dout),
    .dout_valid(dout_valid));

  function automatic real rate(real v, real bcl);
    return 4.0 * TS * ((v - 0.3875) ** 1.5) / (bcl * v);
  endfunction

  task automatic period();
    #(TS / 2) cks = 1;
    #(TS / 2) cks = 0;
  endtask

  task automatic expect_near(string what, real got, real exp, real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got=%f exp=%f", what, got, exp);
    end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real off_exp;
    #1 rst_n = 0;
    #1000 rst_n = 1;
    start_p = 1;
    cal_en = 1;
    repeat (8) period();
    cal_en = 0;
    period();
    off_exp = rate(0.55, 30.19) - rate(0.55, BCL_N);
    expect_near("offset", real'(offset), off_exp, 10.0);
    $display("stored offset %0d (expected about %f)", offset, off_exp);
    for (int k = 0; k < 6; k++) begin
      period();
      checks++; if (!dout_valid) failures++;
      expect_near("zero input", real'(dout), 0.0, 10.0);
    end
    vin_p = 0.57; vin_n = 0.53;
    repeat (4) period();
    for (int k = 0; k < 6; k++) begin
      period();
      expect_near("+20 mV", real'(dout), rate(0.57, 30.19) - rate(0.53, BCL_N) - real'(offset), 10.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
