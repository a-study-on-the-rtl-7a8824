// tb_error_type_analyzer: drives the phase sequence of four test flows with
// errors injected in chosen phases and banks, and checks the phase flags,
// the bank mask, the parameter mask and the verdict of each flow.
`timescale 1ns/1ps
module tb_error_type_analyzer;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, phase_start = 0, phase_end = 0, err = 0, err_bank = 0;
  phase_t phase = PH_IDLE;
  param_t param = PRM_RC;
  logic phase_fail, any_fail;
  logic [1:0] phase_bank_fail, bank_mask;
  logic [4:0] param_mask;
  result_t result;
  always #5 clk = ~clk;
  error_type_analyzer dut (.clk, .rst_n, .clr, .phase_start, .phase_end, .phase, .param,
    .err, .err_bank, .phase_fail, .phase_bank_fail, .any_fail, .result, .param_mask, .bank_mask);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // run one phase; errors on the banks in `ebanks`
  task automatic run_phase(phase_t p, param_t q, logic [1:0] ebanks);
    @(negedge clk); phase = p; param = q; phase_start = 1;
    @(negedge clk); phase_start = 0;
    check(!phase_fail && phase_bank_fail == 0, "phase flags cleared");
    for (int b = 0; b < 2; b++) if (ebanks[b]) begin
      repeat (3) @(negedge clk);
      err = 1; err_bank = b[0]; @(negedge clk); err = 0;
    end
    repeat (2) @(negedge clk);
    check(phase_fail == (ebanks != 0) && phase_bank_fail == ebanks,
          $sformatf("phase %s flags %b/%b", p.name(), phase_fail, phase_bank_fail));
    phase_end = 1; @(negedge clk); phase_end = 0;
  endtask

  task automatic new_test();
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    check(!any_fail && result == RES_GOOD, "cleared");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // 1: good
    new_test(); run_phase(PH_INTLV, PRM_RC, 2'b00);
    check(result == RES_GOOD && !any_fail, "flow 1 GOOD");
    // 2: interleave only
    new_test(); run_phase(PH_INTLV, PRM_RC, 2'b11); run_phase(PH_BANK_MIN, PRM_RC, 2'b00);
    check(result == RES_INTERLEAVE && any_fail && bank_mask == 0, "flow 2 INTERLEAVE");
    // 3: fails relaxed
    new_test(); run_phase(PH_INTLV, PRM_RC, 2'b01); run_phase(PH_BANK_MIN, PRM_RC, 2'b01);
    run_phase(PH_BANK_MAX, PRM_RC, 2'b01);
    check(result == RES_NOT_AT_RATE && bank_mask == 2'b01, "flow 3 NOT_AT_RATE");
    // 4: tRCD and tCCD fail on bank B
    new_test(); run_phase(PH_INTLV, PRM_RC, 2'b10); run_phase(PH_BANK_MIN, PRM_RC, 2'b10);
    run_phase(PH_BANK_MAX, PRM_RC, 2'b00);
    for (int q = 0; q < 5; q++)
      run_phase(PH_PARAM, param_t'(q), (q == 2 || q == 4) ? 2'b10 : 2'b00);
    check(result == RES_PARAM && param_mask == 5'b10100 && bank_mask == 2'b10,
          $sformatf("flow 4 PARAM mask %b", param_mask));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
