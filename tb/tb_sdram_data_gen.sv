// tb_sdram_data_gen: all 16 input combinations against the checkerboard
// rule: 0x5555... when bg^row0^col0^inv is 0, 0xAAAA... otherwise.
`timescale 1ns/1ps
module tb_sdram_data_gen;
  logic bg, inv, row0, col0;
  logic [63:0] data;
  sdram_data_gen dut (.bg, .inv, .row0, .col0, .data);
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 16; i++) begin
      {bg, inv, row0, col0} = 4'(i);
      #1;
      checks++;
      if (data != (($countones(i) % 2) ? 64'hAAAA_AAAA_AAAA_AAAA : 64'h5555_5555_5555_5555)) begin
        failures++; $display("FAIL: inputs %b data %h", i[3:0], data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
