`timescale 1ps / 1fs
// tb_tad_latch_encoder: self-checking test of the tap latch and position
// encoder. Builds the half-ring pulse pattern for every leading-edge
// position, during start-up (fewer than 16 taps high) and with the ring idle,
// and checks the 5-bit position, that e holds between clock edges, and the
// meaning of e[4] (P1..P16 -> 0, P17..P32 -> 1).
module tb_tad_latch_encoder;
  localparam int NS = 32;
  logic          ck = 0, rst_n = 1;
  logic [NS-1:0] p = '0;
  logic [4:0]    e;
  int checks = 0, failures = 0;

  tad_latch_encoder #(.NS(NS)) dut (.ck(ck), .rst_n(rst_n), .p(p), .e(e));

  // Pattern after s leading-edge steps: tap i high if the edge passed it
  // less than 16 steps ago.
  function automatic logic [NS-1:0] pattern(int s);
    logic [NS-1:0] t = '0;
    for (int i = 0; i < NS; i++) begin
      int d = s - 1 - i;
      t[i] = (d >= 0) && ((d % NS) < NS / 2);
    end
    return t;
  endfunction

  task automatic sample_and_check(int s, int exp);
    p = pattern(s);
    #5 ck = 1; #5 ck = 0;
    p = ~p;  // must not reach e before the next edge
    #1;
    checks++;
    if (e !== 5'(exp)) begin
      failures++;
      $display("FAIL steps=%0d e=%0d exp=%0d", s, e, exp);
    end
    checks++;
    if (e[4] !== (exp >= 16)) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #3 rst_n = 1;
    sample_and_check(0, NS - 1);                 // idle ring
    for (int s = 1; s <= 16; s++) sample_and_check(s, s - 1);   // start-up
    for (int k = 0; k < 300; k++) begin
      int s;
      s = 16 + int'($urandom_range(0, 5000));
      sample_and_check(s, (s - 1) % NS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
