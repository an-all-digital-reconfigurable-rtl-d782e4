`timescale 1ps / 1fs
// tb_tad_counter: self-checking test of the 10-bit lap counter: counts
// 1500 clock edges, checking the value after each one, including the wrap
// from 1023 to 0, and the asynchronous reset.
module tb_tad_counter;
  logic       clk = 0, rst_n = 1;
  logic [9:0] c;
  int checks = 0, failures = 0;

  tad_counter #(.W(10)) dut (.clk(clk), .rst_n(rst_n), .c(c));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #3;
    checks++; if (c !== 10'd0) failures++;
    rst_n = 1;
    for (int n = 1; n <= 1500; n++) begin
      #5 clk = 1; #5 clk = 0;
      checks++;
      if (c !== 10'(n % 1024)) begin
        failures++;
        $display("FAIL n=%0d c=%0d", n, c);
      end
    end
    rst_n = 0; #1;
    checks++; if (c !== 10'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
