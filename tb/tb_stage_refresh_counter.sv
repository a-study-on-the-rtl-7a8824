// tb_stage_refresh_counter: stage/pass sequence (0..3 on pass 0, then pass 1,
// `last` only at stage 3 of pass 1, stage_clr), and the refresh timer with
// REF_INT = 10: a request every 10 cycles whether or not the acknowledge is
// late, alternating banks, and the refresh count.
`timescale 1ns/1ps
module tb_stage_refresh_counter;
  logic clk = 0, rst_n = 0, clr = 0, stage_clr = 0, adv = 0, ref_en = 0, ref_ack = 0;
  logic [1:0] stage;
  logic bg, last, ref_req, ref_bank;
  logic [19:0] ref_count;
  always #5 clk = ~clk;
  stage_refresh_counter #(.REF_INT(10)) dut (.clk, .rst_n, .clr, .stage_clr, .adv, .stage,
    .bg, .last, .ref_en, .ref_req, .ref_ack, .ref_bank, .ref_count);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int req_rise [$];
  int cyc = 0;
  logic req_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (ref_req && !req_d && rst_n) req_rise.push_back(cyc);
    req_d <= ref_req;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 8; i++) begin
      check(stage == 2'(i % 4) && bg == (i >= 4), $sformatf("stage step %0d: %0d/%0d", i, stage, bg));
      check(last == (i == 7), $sformatf("last at step %0d", i));
      adv = 1; @(negedge clk); adv = 0; @(negedge clk);
    end
    adv = 1; @(negedge clk); adv = 0;
    check(stage == 2'd1, "advance after wrap");
    stage_clr = 1; @(negedge clk); stage_clr = 0;
    check(stage == 2'd0 && !bg, "stage_clr");
    // refresh
    ref_en = 1;
    for (int k = 0; k < 6; k++) begin
      bit b;
      while (!ref_req) @(negedge clk);
      b = ref_bank;
      check(b == k[0], $sformatf("refresh %0d bank %0d", k, b));
      repeat (k) @(negedge clk);          // answer late by k cycles
      ref_ack = 1; @(negedge clk); ref_ack = 0;
      check(!ref_req && ref_count == 20'(k + 1), $sformatf("ack %0d count %0d", k, ref_count));
    end
    check(req_rise.size() == 6, "six requests");
    for (int k = 1; k < req_rise.size(); k++)
      check(req_rise[k] - req_rise[k-1] == 10, $sformatf("request spacing %0d", req_rise[k] - req_rise[k-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
