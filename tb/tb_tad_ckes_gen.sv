`timescale 1ps / 1fs
// tb_tad_ckes_gen: self-checking test of the clock-edge-shift generator
// model: at several input voltages, CKn (n = 1..4) must follow each CKs edge
// after (2 + (n-1)/4)*Td(Vin), so successive clocks are Td/4 apart.
module tb_tad_ckes_gen;
  real        vin = 0.55;
  logic       cks = 0;
  logic [3:0] ck;
  int checks = 0, failures = 0;
  realtime    t_edge [4];

  tad_ckes_gen dut (.vin(vin), .cks(cks), .ck(ck));

  function automatic real td_ref(real v);
    return 30.19 * v / ((v - 0.3875) ** 1.5);
  endfunction

  logic [3:0] ck_last = '0;
  always @(ck) begin
    for (int n = 0; n < 4; n++) if (ck[n] != ck_last[n]) t_edge[n] = $realtime;
    ck_last = ck;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v [3] = '{0.5, 0.56, 0.6};
    realtime t0;
    #10000;
    foreach (v[j]) begin
      for (int edge_i = 0; edge_i < 2; edge_i++) begin
        vin = v[j];
        cks = ~cks; t0 = $realtime;
        #5000;
        for (int n = 0; n < 4; n++) begin
          real exp;
          exp = (2.0 + n / 4.0) * td_ref(vin);
          checks++;
          if (ck[n] !== cks || t_edge[n] - t0 - exp > 0.01 || exp - (t_edge[n] - t0) > 0.01) begin
            failures++;
            $display("FAIL vin=%f n=%0d delay=%f exp=%f", vin, n, t_edge[n] - t0, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
