// rw_ctrl_gen: read/write control generator.
//
// Turns one "group" requested by the controller into SDRAM commands on the
// per-bank RASB/CASB/WEB strobes, the row and column address and DIN, while
// keeping every AC timing given on `tm` (in clock cycles).
//
// Access group, interleaved (`intlv` = 1), in the order of the interleaved
// timing diagram:  ACT A, ACT B, op0 A, op0 B, [op1 A, op1 B,] PRE A, PRE B.
// Access group, one bank (`intlv` = 0):  ACT b, op0 b, [op1 b,] PRE b.
// Refresh group (`is_ref` = 1):  REF b.
// op0/op1 are the march operations of the current stage (read or write, data
// or data bar); both banks use the same row and column; a write drives
// `wdata` or its complement on DIN. One column is accessed per activation,
// as the memory's burst length is 1.
//
// Timing: saturating counters hold the cycles since the last ACT, PRE and
// column command of each bank and since the last ACT and column command of
// either bank. A command goes out only when all of its constraints hold:
//   ACT  since PRE(b) >= tRP, since ACT(b) >= tRC, since any ACT >= tRRD
//   RD/WR since ACT(b) >= tRCD, since any column cmd >= tCCD, and >= tCDL
//        after a write
//   PRE  since ACT(b) >= tRAS, since column cmd(b) >= tCDL
//   REF  since PRE(b) >= tRP, since ACT(b) >= tRC; REF restarts the tRC wait
// so the gap between two commands equals the programmed minimum and nothing
// shorter. Using tCDL as write recovery before PRE, and tRC after REF, are
// choices of this design. The counters run across groups, so the next
// group's ACT also waits for the previous PRE.
//
// Interface: a group request (`start` with is_ref, intlv, bank, two_ops, op0,
// op1, row, col, bg, wdata) is taken when `ready` is high and stored, so the
// controller can move on to the next address at once. One request can wait
// while another runs; the waiting one begins in the cycle after the running
// one issues its last command, so groups follow each other without idle
// cycles and every gap at the memory is set by the timing alone. `idle` is
// high when nothing is running or waiting. All memory outputs are
// registered; `rd_issue` with `rd_bank`/`rd_bg`/`rd_inv` marks a read in the
// cycle it is on the pins.
module rw_ctrl_gen
  import bist_pkg::*;
#(
  parameter int unsigned ROW_W  = bist_pkg::SD_ROW_W,
  parameter int unsigned COL_W  = bist_pkg::SD_COL_W,
  parameter int unsigned DATA_W = bist_pkg::SD_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // group request
  input  logic              start,
  output logic              ready,
  input  logic              is_ref,
  input  logic              intlv,
  input  logic              bank,
  input  logic              two_ops,
  input  march_op_t         op0,
  input  march_op_t         op1,
  input  logic [ROW_W-1:0]  row,
  input  logic [COL_W-1:0]  col,
  input  logic              bg,
  input  logic [DATA_W-1:0] wdata,
  input  timing_t           tm,
  output logic              idle,
  // memory side
  output logic [ROW_W-1:0]  mem_row,
  output logic [COL_W-1:0]  mem_col,
  output strobe_t [NBANK-1:0] mem_stb,
  output logic [DATA_W-1:0] mem_din,
  // read tag
  output logic              rd_issue,
  output logic              rd_bank,
  output logic              rd_bg,
  output logic              rd_inv
);
  typedef enum logic [2:0] {K_ACT, K_OP0, K_OP1, K_PRE, K_REF} kind_t;

  localparam logic [TW-1:0] SAT = '1;

  typedef struct packed {
    logic              is_ref;
    logic              intlv;
    logic              bank;
    logic              two_ops;
    march_op_t         op0;
    march_op_t         op1;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic              bg;
    logic [DATA_W-1:0] wdata;
  } desc_t;

  desc_t cur, pnd, req;
  logic  busy, pnd_v;

  kind_t           kind;
  logic            which;        // first or second bank of an interleaved step
  logic [TW-1:0]   s_act [NBANK];
  logic [TW-1:0]   s_pre [NBANK];
  logic [TW-1:0]   s_colb[NBANK];
  logic [TW-1:0]   s_actany, s_col;
  logic            last_wr;

  // command of the current step
  logic      cb;                 // bank of the current step
  cmd_t      cmd;
  march_op_t op;
  logic      legal, last_step, fire;

  assign fire = busy && legal;

  assign req = '{is_ref: is_ref, intlv: intlv, bank: bank, two_ops: two_ops,
                 op0: op0, op1: op1, row: row, col: col, bg: bg, wdata: wdata};
  assign ready = !pnd_v;
  assign idle  = !busy && !pnd_v;

  always_comb begin
    cb  = (cur.intlv && !cur.is_ref) ? which : cur.bank;
    op  = (kind == K_OP1) ? cur.op1 : cur.op0;
    case (kind)
      K_ACT:        cmd = CMD_ACT;
      K_OP0, K_OP1: cmd = op.wr ? CMD_WR : CMD_RD;
      K_PRE:        cmd = CMD_PRE;
      default:      cmd = CMD_REF;
    endcase

    case (cmd)
      CMD_ACT: legal = s_pre[cb] >= tm.rp && s_act[cb] >= tm.rc && s_actany >= tm.rrd;
      CMD_RD, CMD_WR:
               legal = s_act[cb] >= tm.rcd && s_col >= tm.ccd && (!last_wr || s_col >= tm.cdl);
      CMD_PRE: legal = s_act[cb] >= tm.ras && s_colb[cb] >= tm.cdl;
      default: legal = s_pre[cb] >= tm.rp && s_act[cb] >= tm.rc;
    endcase

    last_step = (kind == K_REF) || (kind == K_PRE && (!cur.intlv || which));
  end

  function automatic logic [TW-1:0] inc(logic [TW-1:0] v);
    return (v == SAT) ? v : v + 1'b1;
  endfunction


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      pnd_v    <= 1'b0;
      cur      <= '0;
      pnd      <= '0;
      kind     <= K_ACT;
      which    <= 1'b0;
      s_actany <= SAT;
      s_col    <= SAT;
      last_wr  <= 1'b0;
      for (int b = 0; b < NBANK; b++) begin
        s_act[b]  <= SAT;
        s_pre[b]  <= SAT;
        s_colb[b] <= SAT;
      end
      mem_row  <= '0;
      mem_col  <= '0;
      mem_din  <= '0;
      mem_stb  <= {NBANK{STB_NOP}};
      rd_issue <= 1'b0;
      rd_bank  <= 1'b0;
      rd_bg    <= 1'b0;
      rd_inv   <= 1'b0;
    end else begin
      // counters age every cycle; an issued command restarts its own
      s_actany <= inc(s_actany);
      s_col    <= inc(s_col);
      for (int b = 0; b < NBANK; b++) begin
        s_act[b]  <= inc(s_act[b]);
        s_pre[b]  <= inc(s_pre[b]);
        s_colb[b] <= inc(s_colb[b]);
      end
      mem_stb  <= {NBANK{STB_NOP}};
      rd_issue <= 1'b0;

      // request queue: a new request waits in `pnd`; it becomes the running
      // group when none runs or the running one issues its last command
      if (start && ready) begin
        pnd   <= req;
        pnd_v <= 1'b1;
      end
      if (pnd_v && (!busy || (fire && last_step))) begin
        cur   <= pnd;
        busy  <= 1'b1;
        kind  <= pnd.is_ref ? K_REF : K_ACT;
        which <= 1'b0;
        pnd_v <= start && ready;
      end

      if (fire) begin
        mem_stb[cb] <= encode_cmd(cmd);
        case (cmd)
          CMD_ACT: begin
            mem_row   <= cur.row;
            s_act[cb] <= TW'(1);
            s_actany  <= TW'(1);
          end
          CMD_RD, CMD_WR: begin
            mem_col    <= cur.col;
            s_col      <= TW'(1);
            s_colb[cb] <= TW'(1);
            last_wr    <= op.wr;
            if (op.wr) mem_din <= op.inv ? ~cur.wdata : cur.wdata;
            rd_issue   <= !op.wr;
            rd_bank    <= cb;
            rd_bg      <= cur.bg;
            rd_inv     <= op.inv;
          end
          CMD_PRE: s_pre[cb] <= TW'(1);
          default: s_act[cb] <= TW'(1);   // REF
        endcase

        // next step
        if (last_step) begin
          if (!pnd_v) busy <= 1'b0;
        end else if (cur.intlv && !which) begin
          which <= 1'b1;
        end else begin
          which <= 1'b0;
          case (kind)
            K_ACT:   kind <= K_OP0;
            K_OP0:   kind <= cur.two_ops ? K_OP1 : K_PRE;
            default: kind <= K_PRE;
          endcase
        end
      end
    end
  end

  // a request is only made while the queue has room
  assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);
endmodule
