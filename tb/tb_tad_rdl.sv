`timescale 1ps / 1fs
// tb_tad_rdl: self-checking test of the ring-delay-line model. For several
// input voltages it checks the time between rising edges of P32 against
// 32*Td(Vin) computed here from the delay law, that 16 taps are high in
// steady state, that the leading edge advances one tap per step, and that a
// low start pulse suspends the ring with all taps low.
module tb_tad_rdl;
  real         vin = 0.55;
  logic        start_p = 0;
  logic [31:0] p;
  int checks = 0, failures = 0;
  realtime     t_last;

  tad_rdl dut (.vin(vin), .start_p(start_p), .p(p));

  function automatic real td_ref(real v);
    return 30.19 * v / ((v - 0.3875) ** 1.5);
  endfunction

  function automatic int lead(logic [31:0] t);
    for (int i = 0; i < 32; i++) if (t[i] && !t[(i + 1) % 32]) return i;
    return -1;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v [4] = '{0.5, 0.55, 0.6, 0.52};
    realtime t0, t1;
    int l0, l1;
    #1000;
    checks++; if (p !== '0) failures++;
    foreach (v[j]) begin
      vin = v[j];
      start_p = 1;
      @(posedge p[31]); t0 = $realtime;
      @(posedge p[31]); t1 = $realtime;
      checks++;
      if ((t1 - t0) - 32.0 * td_ref(vin) > 0.05 || 32.0 * td_ref(vin) - (t1 - t0) > 0.05) begin
        failures++;
        $display("FAIL vin=%f period=%f exp=%f", vin, t1 - t0, 32.0 * td_ref(vin));
      end
      repeat (20) begin
        l0 = lead(p);
        @(p);
        l1 = lead(p);
        checks++;
        if ($countones(p) != 16 || l1 != (l0 + 1) % 32) begin
          failures++;
          $display("FAIL ones=%0d lead %0d -> %0d", $countones(p), l0, l1);
        end
      end
      start_p = 0;
      #1000;
      checks++; if (p !== '0) failures++;
      #5000;
      checks++; if (p !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
