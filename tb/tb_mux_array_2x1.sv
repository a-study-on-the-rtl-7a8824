// tb_mux_array_2x1: random logic-side and BIST-side signals; with MODS low
// the memory side must equal the logic side and the clock TCLKL, with MODS
// high the BIST side and TCLKT.
`timescale 1ns/1ps
module tb_mux_array_2x1;
  import bist_pkg::*;
  logic mods, tclkl, tclkt, mclk;
  logic [8:0] lg_row, bi_row, m_row;
  logic [7:0] lg_col, bi_col, m_col;
  strobe_t [1:0] lg_stb, bi_stb, m_stb;
  logic [63:0] lg_din, bi_din, m_din;
  mux_array_2x1 dut (.mods, .tclkl, .tclkt, .lg_row, .lg_col, .lg_stb, .lg_din,
    .bi_row, .bi_col, .bi_stb, .bi_din, .mclk, .m_row, .m_col, .m_stb, .m_din);
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 200; i++) begin
      mods = $urandom_range(0, 1); tclkl = $urandom_range(0, 1); tclkt = $urandom_range(0, 1);
      lg_row = 9'($urandom); bi_row = 9'($urandom); lg_col = 8'($urandom); bi_col = 8'($urandom);
      lg_stb = 6'($urandom); bi_stb = 6'($urandom);
      lg_din = {$urandom, $urandom}; bi_din = {$urandom, $urandom};
      #1;
      checks++;
      if (mods ? {mclk, m_row, m_col, m_stb, m_din} != {tclkt, bi_row, bi_col, bi_stb, bi_din}
               : {mclk, m_row, m_col, m_stb, m_din} != {tclkl, lg_row, lg_col, lg_stb, lg_din}) begin
        failures++; $display("FAIL: vector %0d mods=%b", i, mods);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
