// tb_bist_controller: the test-flow sequencer with the real address and
// stage/refresh counters (4 rows x 4 columns) and a stand-in for the
// read/write control generator that accepts requests at random. The phase
// results are supplied by the testbench. Two flows:
//   A  interleave test passes -> only PH_INTLV runs
//   B  interleave fails, bank-by-bank fails on bank B only, relaxed passes
//      -> PH_INTLV, PH_BANK_MIN (A then B), PH_BANK_MAX (B), PH_PARAM x5 (B)
// Checks: the group count of every phase (2 backgrounds x 4 stages x 16
// addresses per bank), address order (stage 2 descending), the ops of each
// stage, the timing set handed out in every phase, refresh requests served
// on alternate banks, and a single `done` at the end.
`timescale 1ns/1ps
module tb_bist_controller;
  import bist_pkg::*;
  localparam int RW = 2, CW = 2, WORDS = 16;
  logic clk = 0, rst_n = 0, start = 0, clr, running, done;
  phase_t phase; param_t param; timing_t tm;
  logic grp_start, grp_is_ref, grp_intlv, grp_bank, grp_ready = 0, grp_idle;
  stage_ops_t grp_ops;
  logic addr_load, addr_down, col_step, row_step, col_last, row_last;
  logic stage_clr, stage_adv, stage_last, bg, ref_req, ref_bank, ref_ack;
  logic [1:0] stage;
  logic phase_start, phase_end, phase_fail;
  logic [1:0] phase_bank_fail;
  logic [RW-1:0] row;
  logic [CW-1:0] col;
  always #5 clk = ~clk;

  bist_controller dut (.clk, .rst_n, .start, .clr, .running, .done, .phase, .param, .tm,
    .grp_start, .grp_is_ref, .grp_intlv, .grp_bank, .grp_ops, .grp_ready, .grp_idle,
    .addr_load, .addr_down, .col_step, .row_step, .col_last, .row_last,
    .stage_clr, .stage_adv, .stage, .stage_last, .ref_req, .ref_bank, .ref_ack,
    .phase_start, .phase_end, .phase_fail, .phase_bank_fail);
  row_addr_gen #(.ROW_W(RW)) u_row (.clk, .rst_n, .load(addr_load), .down(addr_down),
    .step(row_step), .row, .last(row_last));
  col_addr_gen #(.COL_W(CW)) u_col (.clk, .rst_n, .load(addr_load), .down(addr_down),
    .step(col_step), .col, .last(col_last));
  stage_refresh_counter #(.REF_INT(23)) u_stg (.clk, .rst_n, .clr, .stage_clr, .adv(stage_adv),
    .stage, .bg, .last(stage_last), .ref_en(running), .ref_req, .ref_ack, .ref_bank, .ref_count());

  // phase results chosen by the testbench
  bit flow_b = 0;
  always_comb begin
    phase_fail = 0; phase_bank_fail = 0;
    if (flow_b) case (phase)
      PH_INTLV:    begin phase_fail = 1; phase_bank_fail = 2'b11; end
      PH_BANK_MIN: begin phase_fail = 1; phase_bank_fail = 2'b10; end
      default: ;
    endcase
  end

  // stand-in for rw_ctrl_gen: random ready, a request keeps it busy briefly
  int busy_left = 0;
  always @(posedge clk) begin
    grp_ready <= ($urandom_range(0, 3) != 0);
    if (grp_start) busy_left <= 3;
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  assign grp_idle = (busy_left == 0);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // per phase-run bookkeeping
  int ngrp [8][2];          // [phase/param index][bank]
  int nref, nref_b [2], ndone, order_err, ops_err, tm_err;
  int last_addr = -1;
  logic [1:0] last_stage = 0;
  always @(posedge clk) if (rst_n) begin
    if (done) ndone++;
    if (grp_start && grp_ready) begin
      if (grp_is_ref) begin
        nref++; nref_b[grp_bank]++;
        if (!ref_ack) order_err++;
      end else begin
        int idx, a;
        stage_ops_t eo;
        timing_t et;
        idx = (phase == PH_PARAM) ? 3 + int'(param) : int'(phase) - 1;
        ngrp[idx][grp_intlv ? 0 : grp_bank]++;
        a = int'({row, col});
        eo = stage_ops(stage);
        if (grp_ops != eo) ops_err++;
        if (stage == last_stage && last_addr >= 0 &&
            a != (eo.down ? last_addr - 1 : last_addr + 1)) order_err++;
        last_addr = a; last_stage = stage;
        if (eo.down ? a == 0 : a == WORDS - 1) last_addr = -1;
        case (phase)
          PH_BANK_MAX: et = relax(TM_MIN, 1);
          PH_PARAM:    et = param_timing(TM_MIN, 1, param);
          default:     et = TM_MIN;
        endcase
        if (tm != et) tm_err++;
        if (grp_intlv != (phase == PH_INTLV)) order_err++;
      end
    end
  end

  task automatic run_flow();
    foreach (ngrp[i, j]) ngrp[i][j] = 0;
    nref = 0; nref_b = '{0, 0}; ndone = 0; order_err = 0; ops_err = 0; tm_err = 0;
    last_addr = -1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  localparam int G = 2 * 4 * WORDS;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // flow A
    run_flow();
    check(ngrp[0][0] == G, $sformatf("flow A interleave groups %0d", ngrp[0][0]));
    for (int i = 1; i < 8; i++) check(ngrp[i][0] + ngrp[i][1] == 0, $sformatf("flow A phase %0d ran", i));
    check(ndone == 1 && !running, "flow A done once");
    check(order_err == 0 && ops_err == 0 && tm_err == 0,
          $sformatf("flow A order %0d ops %0d timing %0d", order_err, ops_err, tm_err));
    check(nref > 0 && nref_b[0] > 0 && nref_b[1] > 0 && nref_b[0] - nref_b[1] inside {0, 1},
          $sformatf("flow A refreshes %0d/%0d", nref_b[0], nref_b[1]));
    // flow B
    flow_b = 1;
    run_flow();
    check(ngrp[0][0] == G, "flow B interleave groups");
    check(ngrp[1][0] == G && ngrp[1][1] == G, $sformatf("flow B bank-min groups %0d/%0d", ngrp[1][0], ngrp[1][1]));
    check(ngrp[2][0] == 0 && ngrp[2][1] == G, "flow B relaxed phase on bank B only");
    for (int p = 0; p < 5; p++)
      check(ngrp[3+p][0] == 0 && ngrp[3+p][1] == G, $sformatf("flow B parameter %0d phase", p));
    check(ndone == 1, "flow B done once");
    check(order_err == 0 && ops_err == 0 && tm_err == 0,
          $sformatf("flow B order %0d ops %0d timing %0d", order_err, ops_err, tm_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
