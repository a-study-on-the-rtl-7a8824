// tb_mml_sdram_bist_top: end-to-end test of the BIST through the chip top.
//
// Nine small memories (16 rows x 8 columns per bank) run the BIST side by
// side, each with its own defect in the SDRAM model:
//   0 good memory                          -> GOOD
//   1 bank B needs tRCD = 4                -> PARAM, tRCD, bank B
//   2 both banks need tRP = 4              -> PARAM, tRP, banks A and B
//   3 bank A needs tRCD = 5 (> min+margin) -> NOT_AT_RATE, bank A
//   4 both banks need tRRD = 3             -> INTERLEAVE
//   5 stuck-at bit in bank A, row 5, col 2 -> NOT_AT_RATE, address logged
//   6 both banks need tCCD = 2             -> PARAM, tCCD
//   7 both banks need tRC = 10             -> PARAM, tRC (caught at the
//     refresh-to-activate gap, the only one bounded by tRC alone)
//   8 bank B needs tRAS = 7                -> PARAM, tRAS, bank B
//   9 bank A needs tRC = 10 in row 5 only  -> PARAM with an empty mask:
//     the failure and its address are found, but in the tRC phase no
//     refresh falls right before an activation of row 5, so tRC is not
//     named (a known limit of the flow, see the README)
// The expected verdicts follow from the test flow and the relaxed timing
// (minimum + 1 cycle), worked out by hand. Each case checks ERR, the RED
// frame (verdict, masks, stored failures), protocol and timing legality at
// the memory, and that the good memory saw every gap at exactly the
// minimum. Counted mechanisms: each verdict, refresh, descending march,
// bank-by-bank and relaxed-timing phases, fail logging.
`timescale 1ns/1ps
module tb_mml_sdram_bist_top;
  import bist_pkg::*;
  localparam int unsigned RW = 4, CW = 3;
  localparam int unsigned EW = 39 + RW + CW;
  localparam int unsigned FW = 13 + 4 * EW;
  localparam int NCASE = 10;

  localparam timing_t T_RCD4 = '{rc: 9, ras: 6, rcd: 4, rp: 3, ccd: 1, rrd: 2, cdl: 1};
  localparam timing_t T_RP4  = '{rc: 9, ras: 6, rcd: 3, rp: 4, ccd: 1, rrd: 2, cdl: 1};
  localparam timing_t T_RCD5 = '{rc: 9, ras: 6, rcd: 5, rp: 3, ccd: 1, rrd: 2, cdl: 1};
  localparam timing_t T_RRD3 = '{rc: 9, ras: 6, rcd: 3, rp: 3, ccd: 1, rrd: 3, cdl: 1};
  localparam timing_t T_CCD2 = '{rc: 9, ras: 6, rcd: 3, rp: 3, ccd: 2, rrd: 2, cdl: 1};
  localparam timing_t T_RC10 = '{rc: 10, ras: 6, rcd: 3, rp: 3, ccd: 1, rrd: 2, cdl: 1};
  localparam timing_t T_RAS7 = '{rc: 9, ras: 7, rcd: 3, rp: 3, ccd: 1, rrd: 2, cdl: 1};

  logic clk = 0, rst_n = 0, bist_on = 0;
  always #5 clk = ~clk;

  logic [NCASE-1:0]  err, done, fok;
  logic [19:0]       refc [NCASE];
  logic [FW-1:0]     frame [NCASE];
  int                cyc [NCASE];

  bist_top_harness #(.ROW_W(RW), .COL_W(CW)) h0 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[0]), .bist_done(done[0]),
    .ref_count(refc[0]), .frame(frame[0]), .frame_ok(fok[0]), .cycles(cyc[0]));
  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .DEV(T_RCD4), .FAULT_BANKS(2'b10)) h1 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[1]), .bist_done(done[1]),
    .ref_count(refc[1]), .frame(frame[1]), .frame_ok(fok[1]), .cycles(cyc[1]));
  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .DEV(T_RP4), .FAULT_BANKS(2'b11)) h2 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[2]), .bist_done(done[2]),
    .ref_count(refc[2]), .frame(frame[2]), .frame_ok(fok[2]), .cycles(cyc[2]));
  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .DEV(T_RCD5), .FAULT_BANKS(2'b01)) h3 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[3]), .bist_done(done[3]),
    .ref_count(refc[3]), .frame(frame[3]), .frame_ok(fok[3]), .cycles(cyc[3]));
  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .DEV(T_RRD3), .FAULT_BANKS(2'b11)) h4 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[4]), .bist_done(done[4]),
    .ref_count(refc[4]), .frame(frame[4]), .frame_ok(fok[4]), .cycles(cyc[4]));
  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .STUCK_EN(1'b1), .STUCK_BANK(1'b0),
                     .STUCK_ROW(5), .STUCK_COL(2), .STUCK_BIT(7), .STUCK_VAL(1'b1)) h5 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[5]), .bist_done(done[5]),
    .ref_count(refc[5]), .frame(frame[5]), .frame_ok(fok[5]), .cycles(cyc[5]));
  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .DEV(T_CCD2), .FAULT_BANKS(2'b11)) h6 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[6]), .bist_done(done[6]),
    .ref_count(refc[6]), .frame(frame[6]), .frame_ok(fok[6]), .cycles(cyc[6]));
  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .DEV(T_RC10), .FAULT_BANKS(2'b11)) h7 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[7]), .bist_done(done[7]),
    .ref_count(refc[7]), .frame(frame[7]), .frame_ok(fok[7]), .cycles(cyc[7]));
  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .DEV(T_RAS7), .FAULT_BANKS(2'b10)) h8 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[8]), .bist_done(done[8]),
    .ref_count(refc[8]), .frame(frame[8]), .frame_ok(fok[8]), .cycles(cyc[8]));
  bist_top_harness #(.ROW_W(RW), .COL_W(CW), .DEV(T_RC10), .FAULT_BANKS(2'b01),
                     .FAULT_ROW(5)) h9 (
    .tclkt(clk), .rst_n, .bist_on, .err(err[9]), .bist_done(done[9]),
    .ref_count(refc[9]), .frame(frame[9]), .frame_ok(fok[9]), .cycles(cyc[9]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected results
  result_t           exp_res  [NCASE] = '{RES_GOOD, RES_PARAM, RES_PARAM, RES_NOT_AT_RATE,
                                           RES_INTERLEAVE, RES_NOT_AT_RATE, RES_PARAM, RES_PARAM,
                                           RES_PARAM, RES_PARAM};
  logic [NPARAM-1:0] exp_pm   [NCASE] = '{5'b00000, 5'b00100, 5'b01000, 5'b00000,
                                           5'b00000, 5'b00000, 5'b10000, 5'b00001,
                                           5'b00010, 5'b00000};
  logic [1:0]        exp_bm   [NCASE] = '{2'b00, 2'b10, 2'b11, 2'b01, 2'b00, 2'b01, 2'b11,
                                           2'b11, 2'b10, 2'b01};

  // mechanism counters
  int n_verdict [4];
  int n_refresh, n_desc, n_bankmode, n_relaxed, n_logged;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    bist_on = 1;
    wait (&fok);
    @(posedge clk);
    for (int i = 0; i < NCASE; i++) begin
      logic [FW-1:0] f;
      result_t r;
      logic [NPARAM-1:0] pm;
      logic [1:0] bm;
      logic [2:0] cnt;
      f   = frame[i];
      r   = result_t'(f[FW-2 -: 2]);
      pm  = f[FW-4 -: 5];
      bm  = f[FW-9 -: 2];
      cnt = f[FW-11 -: 3];
      $display("case %0d: result=%s pm=%b bm=%b stored=%0d cycles=%0d refresh=%0d",
               i, r.name(), pm, bm, cnt, cyc[i], refc[i]);
      check(f[FW-1] == 1'b1, $sformatf("case %0d start bit", i));
      check(r == exp_res[i], $sformatf("case %0d verdict %s", i, r.name()));
      check(pm == exp_pm[i], $sformatf("case %0d parameter mask %b", i, pm));
      check(bm == exp_bm[i], $sformatf("case %0d bank mask %b", i, bm));
      check(err[i] == (exp_res[i] != RES_GOOD), $sformatf("case %0d ERR", i));
      check(done[i], $sformatf("case %0d BIST_DONE", i));
      check(refc[i] > 0, $sformatf("case %0d refresh count", i));
      check((cnt == 0) == (exp_res[i] == RES_GOOD), $sformatf("case %0d stored count", i));
      n_verdict[r]++;
      if (cnt != 0) n_logged++;
      if (r != RES_GOOD) n_bankmode++;
      if (r == RES_PARAM || r == RES_NOT_AT_RATE) n_relaxed++;
    end
    // per-model checks through hierarchy
    check(h0.u_mem.proto_err == 0 && h1.u_mem.proto_err == 0 && h2.u_mem.proto_err == 0 &&
          h3.u_mem.proto_err == 0 && h4.u_mem.proto_err == 0 && h5.u_mem.proto_err == 0 &&
          h6.u_mem.proto_err == 0 && h7.u_mem.proto_err == 0 && h8.u_mem.proto_err == 0 &&
          h9.u_mem.proto_err == 0, "protocol errors at a memory");
    check(h0.u_mem.violations == 0, "good memory saw a timing violation");
    check(h0.u_mem.min_rc == 9 && h0.u_mem.min_ras == 6 && h0.u_mem.min_rcd == 3 &&
          h0.u_mem.min_rp == 3 && h0.u_mem.min_ccd == 1 && h0.u_mem.min_rrd == 2,
          $sformatf("minimum gaps rc%0d ras%0d rcd%0d rp%0d ccd%0d rrd%0d",
                    h0.u_mem.min_rc, h0.u_mem.min_ras, h0.u_mem.min_rcd,
                    h0.u_mem.min_rp, h0.u_mem.min_ccd, h0.u_mem.min_rrd));
    check(h0.u_mem.n_ref == int'(refc[0]), "refresh count vs memory");
    check(h0.u_mem.n_ref_b[0] > 0 && h0.u_mem.n_ref_b[1] > 0, "refresh reaches both banks");
    // good memory: interleave phase only; 2 backgrounds x 6 operations per word
    check(h0.u_mem.n_wr == 2 * 2 * 3 * (1 << (RW + CW)), $sformatf("writes %0d", h0.u_mem.n_wr));
    check(h0.u_mem.n_rd == 2 * 2 * 3 * (1 << (RW + CW)), $sformatf("reads %0d", h0.u_mem.n_rd));
    // interleaved groups: no faster than the tRC bound
    check(cyc[0] >= 2 * 4 * (1 << (RW + CW)) * 9, "test shorter than tRC allows");
    n_refresh = h0.u_mem.n_ref;
    n_desc    = h0.u_mem.desc_steps;
    check(h1.u_mem.max_rcd >= 4, "relaxed tRCD seen at memory");
    // stuck-at cell: first stored failure names it
    begin
      logic [EW-1:0] e;
      e = frame[5][0 +: EW];
      check(e[EW-1 -: 32] > 0, "clock number of first failure");
      check(e[4 + RW + CW +: 3] == 3'(PH_INTLV), "phase of first failure");
      check(e[RW + CW] == 1'b0 && e[CW +: RW] == RW'(5) && e[0 +: CW] == CW'(2),
            $sformatf("address of first failure %h", e));
    end
    // one-row tRC defect: first stored failure is in bank A, row 5
    begin
      logic [EW-1:0] e;
      e = frame[9][0 +: EW];
      check(e[RW + CW] == 1'b0 && e[CW +: RW] == RW'(5),
            $sformatf("address of first tRC failure %h", e));
    end
    // every mechanism at least once
    for (int v = 0; v < 4; v++) check(n_verdict[v] > 0, $sformatf("verdict %0d never seen", v));
    check(n_refresh > 0, "refresh never happened");
    check(n_desc > 0, "descending march never happened");
    check(n_bankmode > 0, "bank-by-bank phase never happened");
    check(n_relaxed > 0, "relaxed-timing phase never happened");
    check(n_logged > 0, "no failure logged");
    $display("mechanisms: verdicts %0d/%0d/%0d/%0d refresh %0d desc %0d bank %0d relaxed %0d logged %0d",
             n_verdict[0], n_verdict[1], n_verdict[2], n_verdict[3], n_refresh, n_desc,
             n_bankmode, n_relaxed, n_logged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, done=%b frame_ok=%b err=%b cycles0=%0d", done, fok, err, cyc[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
