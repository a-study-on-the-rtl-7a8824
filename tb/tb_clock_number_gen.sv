// tb_clock_number_gen: errors at random times store {clock number, info} in
// order until the store is full (depth 4); later errors are dropped; clr
// empties it.
`timescale 1ns/1ps
module tb_clock_number_gen;
  logic clk = 0, rst_n = 0, clr = 0, err = 0;
  logic [31:0] clk_num = 0;
  logic [23:0] info = 0;
  logic [3:0][55:0] entries;
  logic [2:0] count;
  always #5 clk = ~clk;
  clock_number_gen #(.FAIL_DEPTH(4), .CNT_W(32), .INFO_W(24)) dut (.clk, .rst_n, .clr, .err,
    .clk_num, .info, .entries, .count);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) clk_num <= clk_num + 1;

  initial begin
    logic [55:0] exp_e [4];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      check(count == 0 && entries == '0, "empty after clr");
      for (int k = 0; k < 7; k++) begin
        repeat ($urandom_range(1, 20)) @(negedge clk);
        info = 24'($urandom); err = 1;
        if (k < 4) exp_e[k] = {clk_num, info};
        @(negedge clk); err = 0;
        check(int'(count) == (k < 4 ? k + 1 : 4), $sformatf("count %0d after %0d errors", count, k + 1));
      end
      for (int k = 0; k < 4; k++) check(entries[k] == exp_e[k], $sformatf("entry %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
