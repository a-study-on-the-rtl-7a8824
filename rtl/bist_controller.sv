// bist_controller: test-flow sequencer of the BIST.
//
// Runs the decision flow of the AC-parameter test:
//   1. PH_INTLV     march over both banks, interleaved, all timings minimum.
//                   Pass -> memory good, end.
//   2. PH_BANK_MIN  march bank by bank, all timings minimum.
//                   Pass -> the memory only fails interleaved, end.
//   3. PH_BANK_MAX  march on each failing bank, every timing minimum+MARGIN.
//                   Fail -> the memory cannot run at its rated clock, end.
//   4. PH_PARAM x5  march on each failing bank with one of tRC, tRAS, tRCD,
//                   tRP, tCCD at minimum and every other timing relaxed;
//                   a failure names that parameter. End.
// Each phase runs the four-stage march (bist_pkg) on two backgrounds. For
// every address of a stage the controller hands rw_ctrl_gen one access
// group and, in the same clock edge, steps the column counter (carry into
// the row counter); after the last address it moves to the next stage and
// reloads the address counters in that stage's direction. rw_ctrl_gen
// stores the request, so the controller runs one group ahead of the
// memory. In bank-by-bank phases the full march runs on one bank, then on
// the next bank of the set. Between groups, a pending refresh request is
// served first with a refresh group. After the last group of a phase has
// been issued and rw_ctrl_gen is idle, the controller waits DRAIN cycles,
// so that reads in flight reach the comparator, before it ends the phase
// in the analyzer and takes the branch from the analyzer's phase result.
//
// Restricting phases 3 and 4 to the banks that failed in phase 2, running
// all five parameter phases, and the parameter order are choices of this
// design; the rest follows the described flow.
//
// Interface: `start` (one cycle) begins a test and `clr` clears the rest of
// the BIST in the same cycle; `done` pulses when the flow ends; `running` is
// high in between. A few output bits are constant for this march and these
// timings (upper bits of the `tm` fields, for example), and grp_is_ref is
// the refresh request passed straight through; they stay as ports so that
// the march table or timing can change without new wiring.
module bist_controller
  import bist_pkg::*;
#(
  parameter timing_t     TM     = bist_pkg::TM_MIN,
  parameter int unsigned MARGIN = bist_pkg::SD_MARGIN,
  parameter int unsigned DRAIN  = bist_pkg::CAS_LAT + 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       clr,
  output logic       running,
  output logic       done,
  // phase information
  output phase_t     phase,
  output param_t     param,
  output timing_t    tm,
  // group request to rw_ctrl_gen
  output logic       grp_start,
  output logic       grp_is_ref,
  output logic       grp_intlv,
  output logic       grp_bank,
  output stage_ops_t grp_ops,
  input  logic       grp_ready,
  input  logic       grp_idle,
  // address generators
  output logic       addr_load,
  output logic       addr_down,
  output logic       col_step,
  output logic       row_step,
  input  logic       col_last,
  input  logic       row_last,
  // stage and refresh counter
  output logic       stage_clr,
  output logic       stage_adv,
  input  logic [1:0] stage,
  input  logic       stage_last,
  input  logic       ref_req,
  input  logic       ref_bank,
  output logic       ref_ack,
  // error type analyzer
  output logic       phase_start,
  output logic       phase_end,
  input  logic       phase_fail,
  input  logic [NBANK-1:0] phase_bank_fail
);
  typedef enum logic [2:0] {
    S_IDLE, S_PH_INIT, S_ISSUE, S_FLUSH, S_DRAIN, S_PH_END
  } state_t;

  state_t                       state;
  logic [NBANK-1:0]             bank_set;
  logic                         bank_cur;
  logic [$clog2(DRAIN+1)-1:0]   drain_cnt;
  stage_ops_t                   next_ops;
  logic                         addr_end, more_banks, issue;

  assign grp_ops    = stage_ops(stage);
  assign next_ops   = stage_ops(stage + 2'd1);
  assign grp_intlv  = (phase == PH_INTLV);
  assign issue      = (state == S_ISSUE) && grp_ready;
  assign grp_start  = issue;
  assign grp_is_ref = ref_req;
  assign ref_ack    = issue && ref_req;
  assign grp_bank   = ref_req ? ref_bank : bank_cur;
  assign addr_end   = col_last && row_last;
  assign more_banks = !grp_intlv && !bank_cur && bank_set[1];
  assign running    = (state != S_IDLE);
  assign phase_end  = (state == S_PH_END);

  always_comb begin
    case (phase)
      PH_BANK_MAX: tm = relax(TM, MARGIN);
      PH_PARAM:    tm = param_timing(TM, MARGIN, param);
      default:     tm = TM;
    endcase
  end

  // address counter controls (combinational, acted on at the clock edge)
  always_comb begin
    addr_load = 1'b0;
    addr_down = grp_ops.down;
    col_step  = 1'b0;
    stage_adv = 1'b0;
    stage_clr = 1'b0;
    if (state == S_PH_INIT) begin
      addr_load = 1'b1;
      addr_down = 1'b0;
      stage_clr = 1'b1;
    end else if (issue && !ref_req) begin
      if (!addr_end) begin
        col_step = 1'b1;
      end else if (!stage_last) begin
        stage_adv = 1'b1;
        addr_load = 1'b1;
        addr_down = next_ops.down;
      end else if (more_banks) begin
        stage_clr = 1'b1;
        addr_load = 1'b1;
        addr_down = 1'b0;
      end
    end
    row_step = col_step && col_last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      phase       <= PH_IDLE;
      param       <= PRM_RC;
      bank_set    <= '0;
      bank_cur    <= 1'b0;
      drain_cnt   <= '0;
      clr         <= 1'b0;
      done        <= 1'b0;
      phase_start <= 1'b0;
    end else begin
      clr         <= 1'b0;
      done        <= 1'b0;
      phase_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          clr      <= 1'b1;
          phase    <= PH_INTLV;
          param    <= PRM_RC;
          bank_set <= '1;
          state    <= S_PH_INIT;
        end
        S_PH_INIT: begin
          phase_start <= 1'b1;
          bank_cur    <= !bank_set[0];
          state       <= S_ISSUE;
        end
        S_ISSUE: if (issue && !ref_req && addr_end && stage_last) begin
          if (more_banks) bank_cur <= 1'b1;
          else            state    <= S_FLUSH;
        end
        S_FLUSH: if (grp_idle) begin
          drain_cnt <= '0;
          state     <= S_DRAIN;
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == ($clog2(DRAIN+1))'(DRAIN)) state <= S_PH_END;
        end
        S_PH_END: begin
          state     <= S_PH_INIT;
          case (phase)
            PH_INTLV:
              if (phase_fail) phase <= PH_BANK_MIN;
              else            state <= S_IDLE;
            PH_BANK_MIN:
              if (phase_fail) begin
                phase    <= PH_BANK_MAX;
                bank_set <= phase_bank_fail;
              end else state <= S_IDLE;
            PH_BANK_MAX:
              if (!phase_fail) begin
                phase <= PH_PARAM;
                param <= PRM_RC;
              end else state <= S_IDLE;
            default:
              if (param != PRM_CCD) param <= param_t'(param + 3'd1);
              else                  state <= S_IDLE;
          endcase
          // the flow ends here unless a further phase was chosen
          if ((phase == PH_INTLV    && !phase_fail) ||
              (phase == PH_BANK_MIN && !phase_fail) ||
              (phase == PH_BANK_MAX &&  phase_fail) ||
              (phase == PH_PARAM    &&  param == PRM_CCD))
            done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a phase ends only after its last group has been handed over
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_DRAIN) |-> grp_idle);
endmodule
