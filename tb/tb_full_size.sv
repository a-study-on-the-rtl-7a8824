// tb_full_size: one complete BIST run of the chip top at its default size
// (2 banks x 512 rows x 256 columns x 64 bits, refresh every 1562 cycles)
// on a defect-free memory model. Checks the GOOD verdict on RED, ERR low,
// the number of reads and writes of the two-background march, legal timing
// and protocol at the memory, and a refresh count that matches the elapsed
// time. Prints the test length in cycles.
// A second chip top runs beside it on a memory whose bank B needs
// tRCD = 4 cycles. It goes through the whole flow (interleave, bank-by-bank
// at minimum and relaxed timing, five parameter phases), and RED must give
// PARAM, tRCD, bank B with failures stored in bank B. This second run is
// about ten times longer than the first.
`timescale 1ns/1ps
module tb_full_size;
  import bist_pkg::*;
  localparam int unsigned RW = SD_ROW_W, CW = SD_COL_W;
  localparam int unsigned FW = 13 + 4 * (39 + RW + CW);
  localparam longint WORDS = longint'(1) << (RW + CW);

  logic clk = 0, rst_n = 0, bist_on = 0;
  always #5 clk = ~clk;

  logic                err, red, bist_done, mem_clk;
  logic [19:0]         ref_count;
  logic [RW-1:0]       mem_row;
  logic [CW-1:0]       mem_col;
  strobe_t [NBANK-1:0] mem_stb;
  logic [63:0]         mem_din, mem_dout, lg_dout;

  mml_sdram_bist_top u_top (
    .tclkt(clk), .tclkl(1'b0), .rst_n, .mods(1'b1), .bist_on, .err, .red, .bist_done,
    .ref_count, .lg_row('0), .lg_col('0), .lg_stb({NBANK{STB_NOP}}), .lg_din('0),
    .lg_dout, .mem_clk, .mem_row, .mem_col, .mem_stb, .mem_din, .mem_dout);

  sdram16m_model #(.ROW_W(RW), .COL_W(CW), .DATA_W(64), .CL(CAS_LAT)) u_mem (
    .clk(mem_clk), .row(mem_row), .col(mem_col), .stb(mem_stb), .din(mem_din),
    .dout(mem_dout));

  localparam timing_t T_RCD4 = '{rc: 9, ras: 6, rcd: 4, rp: 3, ccd: 1, rrd: 2, cdl: 1};
  logic          f_err, f_done, f_ok;
  logic [19:0]   f_refc;
  logic [FW-1:0] f_frame;
  int            f_cyc;

  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .REF_INT(SD_REF_INT), .DEV(T_RCD4),
                     .FAULT_BANKS(2'b10)) h_rcd (
    .tclkt(clk), .rst_n, .bist_on, .err(f_err), .bist_done(f_done),
    .ref_count(f_refc), .frame(f_frame), .frame_ok(f_ok), .cycles(f_cyc));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cycles = 0;
  logic [FW-1:0] frame;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    bist_on = 1;
    while (!bist_done) begin
      @(posedge clk);
      cycles++;
    end
    // receive the RED frame
    while (!red) @(posedge clk);
    for (int i = 0; i < FW; i++) begin
      frame = {frame[FW-2:0], red};
      @(posedge clk);
    end
    $display("test length %0d cycles, %0d refreshes, %0d reads, %0d writes",
             cycles, ref_count, u_mem.n_rd, u_mem.n_wr);
    check(frame[FW-1] == 1'b1, "start bit");
    check(result_t'(frame[FW-2 -: 2]) == RES_GOOD, "verdict GOOD");
    check(frame[FW-4 -: 10] == '0, "masks and stored count zero");
    check(!err, "ERR low");
    check(u_mem.proto_err == 0, "protocol errors");
    check(u_mem.violations == 0, "timing violations");
    check(longint'(u_mem.n_wr) == 2 * 2 * 3 * WORDS, "write count");
    check(longint'(u_mem.n_rd) == 2 * 2 * 3 * WORDS, "read count");
    check(u_mem.min_rc == 9 && u_mem.min_rcd == 3 && u_mem.min_rp == 3 && u_mem.min_rrd == 2,
          "minimum gaps");
    // one refresh per REF_INT cycles, give or take one
    check(longint'(ref_count) >= cycles / SD_REF_INT - 1 &&
          longint'(ref_count) <= cycles / SD_REF_INT + 1, "refresh rate");
    // tRCD-weak memory
    wait (f_ok);
    @(posedge clk);
    $display("tRCD-weak memory: %0d cycles, %0d refreshes, verdict %s, mask %b, banks %b",
             f_cyc, f_refc, result_t'(f_frame[FW-2 -: 2]), f_frame[FW-4 -: 5],
             f_frame[FW-9 -: 2]);
    check(result_t'(f_frame[FW-2 -: 2]) == RES_PARAM, "tRCD memory: verdict PARAM");
    check(f_frame[FW-4 -: 5] == 5'b00100, "tRCD memory: mask names tRCD only");
    check(f_frame[FW-9 -: 2] == 2'b10, "tRCD memory: bank B");
    check(f_frame[FW-11 -: 3] == 3'd4, "tRCD memory: four failures stored");
    check(f_frame[RW + CW] == 1'b1, "tRCD memory: first failure in bank B");
    check(f_err, "tRCD memory: ERR high");
    check(h_rcd.u_mem.proto_err == 0, "tRCD memory: protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
