// tb_bist_core: the BIST alone, wired straight to two SDRAM models (no
// multiplexer or buffer, so RD_LAT = CAS latency = 2), 8 rows x 4 columns.
//   memory 0: defect-free                 -> GOOD, ERR low
//   memory 1: bank A needs tRP = 4        -> PARAM with tRP, bank A
// Checks the RED frame, ERR, BIST_DONE, stored failures and legal protocol.
`timescale 1ns/1ps
module tb_bist_core;
  import bist_pkg::*;
  localparam int RW = 3, CW = 2;
  localparam int FW = 13 + 4 * (39 + RW + CW);
  localparam timing_t T_RP4 = '{rc: 9, ras: 6, rcd: 3, rp: 4, ccd: 1, rrd: 2, cdl: 1};

  logic clk = 0, rst_n = 0, bist_on = 0;
  always #5 clk = ~clk;

  logic [1:0] err, red, done;
  logic [RW-1:0] mrow [2];
  logic [CW-1:0] mcol [2];
  strobe_t [1:0] mstb [2];
  logic [63:0] mdin [2], mdout [2];
  logic [19:0] refc [2];

  bist_core #(.ROW_W(RW), .COL_W(CW), .RD_LAT(CAS_LAT), .REF_INT(150)) c0 (
    .tclkt(clk), .rst_n, .bist_on, .mem_row(mrow[0]), .mem_col(mcol[0]), .mem_stb(mstb[0]),
    .mem_din(mdin[0]), .dout(mdout[0]), .err(err[0]), .red(red[0]), .done(done[0]), .ref_count(refc[0]));
  sdram16m_model #(.ROW_W(RW), .COL_W(CW)) m0 (.clk, .row(mrow[0]), .col(mcol[0]),
    .stb(mstb[0]), .din(mdin[0]), .dout(mdout[0]));
  bist_core #(.ROW_W(RW), .COL_W(CW), .RD_LAT(CAS_LAT), .REF_INT(150)) c1 (
    .tclkt(clk), .rst_n, .bist_on, .mem_row(mrow[1]), .mem_col(mcol[1]), .mem_stb(mstb[1]),
    .mem_din(mdin[1]), .dout(mdout[1]), .err(err[1]), .red(red[1]), .done(done[1]), .ref_count(refc[1]));
  sdram16m_model #(.ROW_W(RW), .COL_W(CW), .DEV(T_RP4), .FAULT_BANKS(2'b01)) m1 (.clk,
    .row(mrow[1]), .col(mcol[1]), .stb(mstb[1]), .din(mdin[1]), .dout(mdout[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [FW-1:0] fr [2];
  task automatic receive(int i);
    while (!red[i]) @(posedge clk);
    for (int k = 0; k < FW; k++) begin
      fr[i] = {fr[i][FW-2:0], red[i]};
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk); bist_on = 1;
    fork
      receive(0);
      receive(1);
    join
    check(done == 2'b11, "BIST_DONE");
    check(fr[0][FW-1] && result_t'(fr[0][FW-2 -: 2]) == RES_GOOD && fr[0][FW-4 -: 10] == 0,
          $sformatf("memory 0 frame %h", fr[0][FW-1 -: 13]));
    check(!err[0], "memory 0 ERR low");
    check(result_t'(fr[1][FW-2 -: 2]) == RES_PARAM, "memory 1 verdict PARAM");
    check(fr[1][FW-4 -: 5] == 5'b01000, $sformatf("memory 1 parameter mask %b", fr[1][FW-4 -: 5]));
    check(fr[1][FW-9 -: 2] == 2'b01, "memory 1 bank mask");
    check(fr[1][FW-11 -: 3] == 3'd4, "memory 1 four failures stored");
    check(err[1], "memory 1 ERR high");
    check(m0.proto_err == 0 && m1.proto_err == 0, "protocol");
    check(m0.violations == 0 && m1.violations > 0, "violations only on memory 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
