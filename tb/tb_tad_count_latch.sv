`timescale 1ps / 1fs
// tb_tad_count_latch: self-checking test of the two counter latches and the
// E[4]-controlled selection. A counter value is latched on ck, the counter
// moves on, and a later value is latched on ckd; the output must follow the
// ck copy when e_msb = 1 and the ckd copy when e_msb = 0.
module tb_tad_count_latch;
  logic       ck = 0, ckd = 0, rst_n = 1, e_msb = 0;
  logic [9:0] c = '0, c1, c2, c_sel;
  int checks = 0, failures = 0;

  tad_count_latch #(.W(10)) dut (.ck(ck), .ckd(ckd), .rst_n(rst_n), .c(c),
                                 .e_msb(e_msb), .c1(c1), .c2(c2), .c_sel(c_sel));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] a, b;
    #1 rst_n = 0;
    #3 rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      a = 10'($urandom);
      b = 10'($urandom);
      c = a;      #5 ck = 1;  #5 ck = 0;
      c = b;      #5 ckd = 1; #5 ckd = 0;
      c = ~b;     // later counter changes must not show
      e_msb = 1'b1; #1;
      checks++; if (c1 !== a || c_sel !== a) failures++;
      e_msb = 1'b0; #1;
      checks++; if (c2 !== b || c_sel !== b) begin
        failures++;
        $display("FAIL k=%0d c_sel=%0d exp=%0d", k, c_sel, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
