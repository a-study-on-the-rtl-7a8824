// tb_bist_clock_counter: random enable and clear against a reference count,
// including saturation at the top (4-bit counter for the test).
`timescale 1ns/1ps
module tb_bist_clock_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [3:0] count;
  always #5 clk = ~clk;
  bist_clock_counter #(.CNT_W(4)) dut (.clk, .rst_n, .clr, .en, .count);

  int checks = 0, failures = 0, ref_cnt = 0;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != ref_cnt) begin
        failures++; $display("FAIL: cycle %0d count %0d expected %0d", i, count, ref_cnt);
      end
      clr = ($urandom_range(0, 49) == 0);
      en  = ($urandom_range(0, 3) != 0);
      if (clr) ref_cnt = 0;
      else if (en && ref_cnt < 15) ref_cnt++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
