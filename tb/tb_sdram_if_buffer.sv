// tb_sdram_if_buffer: strobes at NOP after reset, then every input appears
// at its output exactly one memory clock later, in both directions.
`timescale 1ns/1ps
module tb_sdram_if_buffer;
  import bist_pkg::*;
  logic mclk = 0, rst_n = 0;
  logic [8:0] in_row, out_row;
  logic [7:0] in_col, out_col;
  strobe_t [1:0] in_stb, out_stb;
  logic [63:0] in_din, out_din, mem_dout, dout;
  always #5 mclk = ~mclk;
  sdram_if_buffer dut (.mclk, .rst_n, .in_row, .in_col, .in_stb, .in_din, .out_row, .out_col,
    .out_stb, .out_din, .mem_dout, .dout);
  int checks = 0, failures = 0;
  initial begin
    logic [150:0] prev;
    in_row = '0; in_col = '0; in_stb = '0; in_din = '0; mem_dout = '0;
    repeat (2) @(negedge mclk);
    checks++;
    if (out_stb != {2{STB_NOP}}) begin failures++; $display("FAIL: strobes not NOP in reset"); end
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      in_row = 9'($urandom); in_col = 8'($urandom); in_stb = 6'($urandom);
      in_din = {$urandom, $urandom}; mem_dout = {$urandom, $urandom};
      prev = {in_row, in_col, in_stb, in_din, mem_dout};
      @(negedge mclk);
      checks++;
      if ({out_row, out_col, out_stb, out_din, dout} != prev) begin
        failures++; $display("FAIL: cycle %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
