`timescale 1ps / 1fs
// tb_tad_sub_adder: self-checking test of the per-phase subtractors and the
// adder. Feeds random 15-bit running totals (including wrap-around past
// 2^15) and checks that, from the third clock after reset, dt equals the sum
// of the four modulo-2^15 differences of the last two words, and that
// dt_valid rises exactly on the third clock.
module tb_tad_sub_adder;
  logic                 ck = 0, rst_n = 1;
  logic [3:0][14:0]     x = '0, diff;
  logic [16:0]          dt;
  logic                 dt_valid;
  int checks = 0, failures = 0;
  int unsigned tot [4];
  int unsigned prv [4];

  tad_sub_adder #(.NP(4), .CW(15)) dut (.ck(ck), .rst_n(rst_n), .x(x),
                                        .diff(diff), .dt(dt), .dt_valid(dt_valid));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp;
    for (int n = 0; n < 4; n++) tot[n] = $urandom_range(0, 32767);
    #1 rst_n = 0;
    #3 rst_n = 1;
    for (int k = 1; k <= 400; k++) begin
      for (int n = 0; n < 4; n++) begin
        prv[n] = tot[n];
        tot[n] = tot[n] + $urandom_range(0, 32767);
        x[n]   = 15'(tot[n]);
      end
      #5 ck = 1; #5 ck = 0;
      #1;
      checks++;
      if (dt_valid !== (k >= 3)) begin
        failures++;
        $display("FAIL valid k=%0d", k);
      end
      if (k >= 2) begin
        exp = 0;
        for (int n = 0; n < 4; n++) exp += (tot[n] - prv[n]) % 32768;
        checks++;
        if (dt !== 17'(exp)) begin
          failures++;
          $display("FAIL k=%0d dt=%0d exp=%0d", k, dt, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
