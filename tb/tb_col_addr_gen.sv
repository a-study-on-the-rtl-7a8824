// tb_col_addr_gen: loads in both directions, random steps, and the `last`
// flag at the end of each direction, against a reference counter (4-bit).
`timescale 1ns/1ps
module tb_col_addr_gen;
  logic clk = 0, rst_n = 0, load = 0, down = 0, step = 0, last;
  logic [3:0] a;
  always #5 clk = ~clk;
  col_addr_gen #(.COL_W(4)) dut (.clk, .rst_n, .load, .down, .step, .col(a), .last);

  int checks = 0, failures = 0, ref_a = 0, wraps = 0;
  bit ref_dir = 0;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks += 2;
      if (int'(a) != ref_a) begin failures++; $display("FAIL: addr %0d expected %0d", a, ref_a); end
      if (last != (ref_dir ? ref_a == 0 : ref_a == 15)) begin failures++; $display("FAIL: last at %0d", a); end
      load = ($urandom_range(0, 79) == 0);
      down = $urandom_range(0, 1);
      step = $urandom_range(0, 2) != 0;
      if (load) begin ref_dir = down; ref_a = down ? 15 : 0; end
      else if (step) begin
        if (last) wraps++;
        ref_a = ref_dir ? (ref_a + 15) % 16 : (ref_a + 1) % 16;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: end of range never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
