`timescale 1ps / 1fs
// tb_tad_delay_line: self-checking test of the delay-line model: both edges
// of a quarter-ring (8 units) and a half-ring (16 units, inverting variant)
// line are measured at several input voltages against N*Td(Vin) computed
// here from the delay law.
module tb_tad_delay_line;
  real  vin = 0.55;
  logic in = 0, out8, out16;
  int checks = 0, failures = 0;

  tad_delay_line #(.N_DU(8))                   dut8  (.vin(vin), .in(in), .out(out8));
  tad_delay_line #(.N_DU(16), .INVERT(1'b1))   dut16 (.vin(vin), .in(in), .out(out16));

  function automatic real td_ref(real v);
    return 30.19 * v / ((v - 0.3875) ** 1.5);
  endfunction

  task automatic check_delay(real got, real exp);
    checks++;
    if (got - exp > 0.01 || exp - got > 0.01) begin
      failures++;
      $display("FAIL vin=%f delay=%f exp=%f", vin, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v [3] = '{0.5, 0.57, 0.6};
    realtime t0;
    #10000;
    checks++; if (out8 !== 1'b0 || out16 !== 1'b1) failures++;
    foreach (v[j]) begin
      vin = v[j];
      in = 1; t0 = $realtime;
      fork
        begin @(posedge out8);  check_delay($realtime - t0, 8.0 * td_ref(vin)); end
        begin @(negedge out16); check_delay($realtime - t0, 16.0 * td_ref(vin)); end
      join
      #20000;
      in = 0; t0 = $realtime;
      fork
        begin @(negedge out8);  check_delay($realtime - t0, 8.0 * td_ref(vin)); end
        begin @(posedge out16); check_delay($realtime - t0, 16.0 * td_ref(vin)); end
      join
      #20000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
