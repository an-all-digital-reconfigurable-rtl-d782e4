`timescale 1ps / 1fs
// tb_tad_diff_sub: self-checking test of the differential output subtractor
// and offset calibration: random 17-bit operands, a calibration phase that
// must store the last valid difference, and normal operation that must
// output (dt_p - dt_n) - offset one clock later, with dout_valid only for
// valid, non-calibration inputs.
module tb_tad_diff_sub;
  logic        clk = 0, rst_n = 1, in_valid = 0, cal_en = 0;
  logic [16:0] dt_p = '0, dt_n = '0;
  logic signed [18:0] offset, dout;
  logic        dout_valid;
  int checks = 0, failures = 0;

  tad_diff_sub #(.IW(17)) dut (.clk(clk), .rst_n(rst_n), .dt_p(dt_p), .dt_n(dt_n),
                               .in_valid(in_valid), .cal_en(cal_en), .offset(offset),
                               .dout(dout), .dout_valid(dout_valid));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_off, raw;
    #1 rst_n = 0;
    #3 rst_n = 1;
    exp_off = 0;
    for (int k = 0; k < 600; k++) begin
      cal_en   = (k % 100) < 10;
      in_valid = ($urandom_range(0, 9) != 0);
      dt_p = 17'($urandom);
      dt_n = (k % 2) ? 17'($urandom) : 17'(int'(dt_p) + $urandom_range(0, 40) - 20);
      raw = int'(dt_p) - int'(dt_n);
      #5 clk = 1; #5 clk = 0; #1;
      checks++;
      if (dout_valid !== (in_valid && !cal_en)) failures++;
      checks++;
      if (dout !== 19'(raw - exp_off)) begin
        failures++;
        $display("FAIL k=%0d dout=%0d exp=%0d", k, dout, raw - exp_off);
      end
      if (in_valid && cal_en) exp_off = raw;
      checks++;
      if (offset !== 19'(exp_off)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
