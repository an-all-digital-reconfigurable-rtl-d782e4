`timescale 1ps / 1fs
// tb_tad_time_quantizer: self-checking test of the digital quantizer of one
// ADC. The testbench plays the analog parts itself: an ideal 32-tap pulse
// ring stepping every td ps (td changes from sample to sample, like a
// varying input), P32 delayed by 8 steps as counter clock, four sampling
// clocks shifted by td/4 and their copies 16 steps later. It records the
// true number of ring steps at each sampling edge and checks every dt
// against the sum of the four per-phase step differences, and counts how
// often the counter latch on CKn was stale or mid-update (a rejected sample)
// so that the selection of the CKnD copy is exercised.
module tb_tad_time_quantizer;
  localparam int NS = 32;
  logic          rst_n = 1;
  logic [NS-1:0] p = '0;
  logic          cnt_clk = 0, cks = 0;
  logic [3:0]    ck = '0, ckd = '0;
  logic [3:0][14:0] x;
  logic [16:0]   dt;
  logic          dt_valid;
  int checks = 0, failures = 0, rejected = 0;
  real    td = 187.0;
  longint steps = 0;
  longint at_ck [4][$];

  tad_time_quantizer #(.NS(NS), .CW(10), .NP(4)) dut (
    .rst_n(rst_n), .p(p), .cnt_clk(cnt_clk), .ck(ck), .ckd(ckd),
    .x(x), .dt(dt), .dt_valid(dt_valid));

  function automatic logic [NS-1:0] pattern(longint s);
    logic [NS-1:0] t = '0;
    for (int i = 0; i < NS; i++) begin
      longint d = s - 1 - i;
      t[i] = (d >= 0) && ((d % NS) < NS / 2);
    end
    return t;
  endfunction

  // Ideal ring.
  initial begin
    #50000;
    forever begin
      #(td);
      steps++;
      p = pattern(steps);
    end
  end
  always @(p[NS-1]) cnt_clk <= #(8.0 * td) p[NS-1];
  for (genvar n = 0; n < 4; n++) begin : g_ck
    always @(cks) ck[n] <= #((2.0 + n / 4.0) * td) cks;
    always @(ck[n]) ckd[n] <= #(16.0 * td) ck[n];
    always @(posedge ck[n]) at_ck[n].push_back(steps);
  end

  // Rejected-sample counter: E[4] = 0 and the CKn copy differs.
  always @(negedge ckd[0])
    if (dut.e[0][4] == 1'b0 && dut.c1[0] != dut.c2[0]) rejected++;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k = 0;
    #1 rst_n = 0;
    #1000 rst_n = 1;
    repeat (400) begin
      #(50000 + $urandom_range(0, 997)) cks = 1;
      k++;
      #(50000) cks = 0;
      td = 185.0 + $urandom_range(0, 215);   // 185..400 ps
      if (k >= 4) begin
        longint exp;
        exp = 0;
        for (int n = 0; n < 4; n++) exp += at_ck[n][k-2] - at_ck[n][k-3];
        checks++;
        if (!dt_valid || dt !== 17'(exp)) begin
          failures++;
          $display("FAIL k=%0d dt=%0d exp=%0d valid=%b", k, dt, exp, dt_valid);
        end
      end
    end
    checks++;
    if (rejected == 0) begin
      failures++;
      $display("FAIL no counter sample was rejected");
    end
    $display("rejected counter samples: %0d", rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
