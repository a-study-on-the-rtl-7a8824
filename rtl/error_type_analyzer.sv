// error_type_analyzer: classifies failures by the test condition they need.
//
// The controller runs up to four kinds of phase (see bist_pkg::phase_t). While
// a phase runs, every comparator mismatch sets `phase_fail` and the bit of the
// failing bank in `phase_bank_fail`; `phase_start` clears both. At
// `phase_end` the outcome is recorded for the phase given on `phase`/`param`:
//   interleave test failed?                        (PH_INTLV)
//   which banks failed at minimum timing           (PH_BANK_MIN)
//   did the relaxed-timing test fail?              (PH_BANK_MAX)
//   did the test with parameter `param` tight fail (PH_PARAM, one bit each)
// From these the verdict follows the test flow:
//   RES_GOOD         interleave test passed
//   RES_INTERLEAVE   interleave test failed, bank-by-bank at minimum passed
//   RES_NOT_AT_RATE  bank-by-bank failed even with every timing relaxed
//   RES_PARAM        passed relaxed; `param_mask` names the parameters whose
//                    tight setting alone makes the memory fail
// `any_fail` is high from the first mismatch of the test on. The verdict and
// the masks are only meaningful once the controller reports the end of test.
module error_type_analyzer
  import bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              phase_start,
  input  logic              phase_end,
  input  phase_t            phase,
  input  param_t            param,
  input  logic              err,
  input  logic              err_bank,
  output logic              phase_fail,
  output logic [NBANK-1:0]  phase_bank_fail,
  output logic              any_fail,
  output result_t           result,
  output logic [NPARAM-1:0] param_mask,
  output logic [NBANK-1:0]  bank_mask
);
  logic intlv_fail, bmin_fail, bmax_fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_fail      <= 1'b0;
      phase_bank_fail <= '0;
      any_fail        <= 1'b0;
      intlv_fail      <= 1'b0;
      bmin_fail       <= 1'b0;
      bmax_fail       <= 1'b0;
      param_mask      <= '0;
      bank_mask       <= '0;
    end else if (clr) begin
      phase_fail      <= 1'b0;
      phase_bank_fail <= '0;
      any_fail        <= 1'b0;
      intlv_fail      <= 1'b0;
      bmin_fail       <= 1'b0;
      bmax_fail       <= 1'b0;
      param_mask      <= '0;
      bank_mask       <= '0;
    end else begin
      if (phase_start) begin
        phase_fail      <= 1'b0;
        phase_bank_fail <= '0;
      end else if (err) begin
        phase_fail                <= 1'b1;
        phase_bank_fail[err_bank] <= 1'b1;
      end
      if (err) any_fail <= 1'b1;
      if (phase_end) begin
        case (phase)
          PH_INTLV:    intlv_fail <= phase_fail;
          PH_BANK_MIN: begin
            bmin_fail <= phase_fail;
            bank_mask <= phase_bank_fail;
          end
          PH_BANK_MAX: bmax_fail <= phase_fail;
          PH_PARAM:    param_mask[param] <= phase_fail;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    if (!intlv_fail)     result = RES_GOOD;
    else if (!bmin_fail) result = RES_INTERLEAVE;
    else if (bmax_fail)  result = RES_NOT_AT_RATE;
    else                 result = RES_PARAM;
  end
endmodule
