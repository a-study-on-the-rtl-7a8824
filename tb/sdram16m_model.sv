// sdram16m_model: behavioural model of the dual-bank embedded SDRAM core,
// for simulation only (not synthesizable).
//
// Two banks of 2^ROW_W rows x 2^COL_W columns of DATA_W-bit words, separate
// DIN/DOUT, non-multiplexed row/column address, per-bank RASB/CASB/WEB,
// burst length 1 and CAS latency CL: the data of a READ sampled at clock
// edge E is on `dout` from edge E+CL-1 to edge E+CL.
//
// The model measures, per bank, the cycles between commands and compares
// them with the device's own requirements DEV (a timing_t). A command that
// comes too early misbehaves, which is how a cell array without margin on
// that parameter is imitated:
//   ACT  too early (tRP, tRC, tRRD): the row opens badly; every access until
//        the next PRE fails
//   READ/WRITE too early (tRCD, tCCD, tCDL): that access fails
// A failing write does not reach the cell; a failing read returns the
// complement of the stored word.
//   PRE  too early (tRAS): the last word written in that row is inverted
// Only banks set in FAULT_BANKS use DEV; the others use the minimum timing
// TM_MIN; FAULT_ROW >= 0 narrows that to one row of those banks, so a
// defect can sit at one address. A stuck-at cell (STUCK_EN) forces one bit of one word.
// Protocol errors (ACT on an open bank, READ/WRITE/PRE/REF on a wrong
// bank state) are counted in `proto_err`. The testbench can read the
// statistics below: command counts, smallest observed gaps, number of
// descending column steps, refreshes per bank.
module sdram16m_model
  import bist_pkg::*;
#(
  parameter int unsigned ROW_W       = 9,
  parameter int unsigned COL_W       = 8,
  parameter int unsigned DATA_W      = 64,
  parameter int unsigned CL          = 2,
  parameter timing_t     DEV         = bist_pkg::TM_MIN,
  parameter logic [1:0]  FAULT_BANKS = 2'b00,
  parameter int          FAULT_ROW   = -1,
  parameter bit          STUCK_EN    = 1'b0,
  parameter bit          STUCK_BANK  = 1'b0,
  parameter int unsigned STUCK_ROW   = 0,
  parameter int unsigned STUCK_COL   = 0,
  parameter int unsigned STUCK_BIT   = 0,
  parameter bit          STUCK_VAL   = 1'b0
) (
  input  logic                clk,
  input  logic [ROW_W-1:0]    row,
  input  logic [COL_W-1:0]    col,
  input  strobe_t [NBANK-1:0] stb,
  input  logic [DATA_W-1:0]   din,
  output logic [DATA_W-1:0]   dout
);
  localparam int unsigned AW = ROW_W + COL_W;

  logic [DATA_W-1:0] mem [NBANK][2**AW];
  logic [DATA_W-1:0] rpipe [CL];

  bit              open_b  [NBANK];
  bit              bad_b   [NBANK];
  logic [ROW_W-1:0] orow   [NBANK];
  int              s_act   [NBANK];
  int              s_pre   [NBANK];
  int              s_colb  [NBANK];
  int              lastwr_col [NBANK];
  int              s_actany = 1000, s_col = 1000;
  bit              last_wr;
  int              prev_col = -1;

  // statistics
  int n_act, n_rd, n_wr, n_pre, n_ref, proto_err, violations, desc_steps;
  int n_ref_b [NBANK];
  int min_rc = 1000, min_ras = 1000, min_rcd = 1000, min_rp = 1000;
  int min_ccd = 1000, min_rrd = 1000;
  int max_rcd;

  initial begin
    for (int b = 0; b < NBANK; b++) begin
      open_b[b] = 0; bad_b[b] = 0; s_act[b] = 1000; s_pre[b] = 1000;
      s_colb[b] = 1000; lastwr_col[b] = -1; n_ref_b[b] = 0; orow[b] = '0;
    end
    for (int i = 0; i < CL; i++) rpipe[i] = '0;
    n_act = 0; n_rd = 0; n_wr = 0; n_pre = 0; n_ref = 0; proto_err = 0;
    violations = 0; desc_steps = 0; max_rcd = 0; last_wr = 0;
  end

  function automatic timing_t req(int b, int r);
    return (FAULT_BANKS[b] && (FAULT_ROW < 0 || r == FAULT_ROW)) ? DEV : TM_MIN;
  endfunction

  function automatic logic [DATA_W-1:0] apply_stuck(int b, int a, logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] r;
    r = d;
    if (STUCK_EN && b == int'(STUCK_BANK) && a == int'((STUCK_ROW << COL_W) | STUCK_COL))
      r[STUCK_BIT] = STUCK_VAL;
    return r;
  endfunction

  assign dout = rpipe[CL-1];

  always @(posedge clk) begin
    logic [DATA_W-1:0] rd_word;
    bit any_rd;
    any_rd = 0;
    rd_word = rpipe[0];
    for (int b = 0; b < NBANK; b++) begin
      timing_t t;
      int a;
      t = req(b, (decode_cmd(stb[b]) == CMD_ACT) ? int'(row) :
                 open_b[b] ? int'(orow[b]) : -1);
      case (decode_cmd(stb[b]))
        CMD_ACT: begin
          n_act++;
          if (open_b[b]) proto_err++;
          if (s_act[b] < min_rc) min_rc = s_act[b];
          if (s_pre[b] < min_rp) min_rp = s_pre[b];
          if (s_actany < min_rrd) min_rrd = s_actany;
          bad_b[b] = (s_pre[b] < int'(t.rp)) || (s_act[b] < int'(t.rc)) ||
                     (s_actany < int'(t.rrd));
          if (bad_b[b]) violations++;
          open_b[b] = 1; orow[b] = row; lastwr_col[b] = -1;
          s_act[b] = 0; s_actany = 0;
        end
        CMD_RD, CMD_WR: begin
          bit bad, wr;
          wr = (decode_cmd(stb[b]) == CMD_WR);
          if (!open_b[b]) proto_err++;
          if (s_act[b] < min_rcd) min_rcd = s_act[b];
          if (s_act[b] > max_rcd && s_act[b] < 100) max_rcd = s_act[b];
          if (s_col < min_ccd) min_ccd = s_col;
          bad = (s_act[b] < int'(t.rcd)) || (s_col < int'(t.ccd)) ||
                (last_wr && s_col < int'(t.cdl));
          if (bad) violations++;
          bad = bad || bad_b[b];
          a = int'({orow[b], col});
          if (prev_col >= 0 && int'(col) == prev_col - 1) desc_steps++;
          prev_col = int'(col);
          if (wr) begin
            n_wr++;
            if (!bad) mem[b][a] = din;
            lastwr_col[b] = int'(col);
          end else begin
            n_rd++;
            rd_word = apply_stuck(b, a, mem[b][a]);
            if (bad) rd_word = ~rd_word;
            any_rd = 1;
          end
          last_wr = wr;
          s_col = 0; s_colb[b] = 0;
        end
        CMD_PRE: begin
          n_pre++;
          if (!open_b[b]) proto_err++;
          if (s_act[b] < min_ras) min_ras = s_act[b];
          if (s_act[b] < int'(t.ras)) begin
            violations++;
            if (lastwr_col[b] >= 0) begin
              a = int'({orow[b], COL_W'(lastwr_col[b])});
              mem[b][a] = ~mem[b][a];
            end
          end
          open_b[b] = 0; bad_b[b] = 0;
          s_pre[b] = 0;
        end
        CMD_REF: begin
          n_ref++; n_ref_b[b]++;
          if (open_b[b]) proto_err++;
          if (s_pre[b] < int'(t.rp) || s_act[b] < int'(t.rc)) violations++;
          s_act[b] = 0;
        end
        default: ;
      endcase
    end
    // read data pipeline (CL stages)
    for (int i = CL - 1; i > 0; i--) rpipe[i] <= rpipe[i-1];
    rpipe[0] <= any_rd ? rd_word : '0;
    // age the gap counters
    for (int b = 0; b < NBANK; b++) begin
      s_act[b]++; s_pre[b]++; s_colb[b]++;
    end
    s_actany++; s_col++;
  end
endmodule
