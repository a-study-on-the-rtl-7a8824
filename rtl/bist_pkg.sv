// bist_pkg: types and constants shared by the embedded-SDRAM BIST.
//
// The memory under test is a dual-bank 16 Mbit SDRAM core: 512 rows x 256
// columns per bank, 64-bit words, separate DIN/DOUT, non-multiplexed row and
// column address, CAS latency 2, burst length 1, 100 MHz clock. Its AC
// parameters are given in nanoseconds; here they are held as whole cycles of
// the 100 MHz clock (90 ns -> 9 cycles and so on). Each bank has its own
// active-low RASB/CASB/WEB strobes; the command encoding on those three pins
// is the conventional SDRAM one (a choice of this design).
//
// The march test run in every phase has four stages:
//   stage 0  ascending   write D
//   stage 1  ascending   read D,  write ~D
//   stage 2  descending  read ~D, write D
//   stage 3  ascending   read D
// and is run twice, once on each of two complementary 0x5/0xA checkerboard
// backgrounds.
package bist_pkg;

  // ---- SDRAM geometry -------------------------------------------------------
  localparam int unsigned SD_ROW_W   = 9;    // 512 rows
  localparam int unsigned SD_COL_W   = 8;    // 256 columns
  localparam int unsigned SD_DATA_W  = 64;   // x64
  localparam int unsigned NBANK   = 2;
  localparam int unsigned CAS_LAT = 2;

  // ---- AC timing in cycles of the 100 MHz clock (minimum values) ----------
  localparam int unsigned TW = 5;         // width of a timing field
  typedef struct packed {
    logic [TW-1:0] rc;    // ACT to ACT, same bank
    logic [TW-1:0] ras;   // ACT to PRE, same bank
    logic [TW-1:0] rcd;   // ACT to READ/WRITE
    logic [TW-1:0] rp;    // PRE to ACT
    logic [TW-1:0] ccd;   // column command to column command
    logic [TW-1:0] rrd;   // ACT to ACT, different bank
    logic [TW-1:0] cdl;   // last data in to next column command / precharge
  } timing_t;

  localparam timing_t TM_MIN = '{rc: 5'd9, ras: 5'd6, rcd: 5'd3, rp: 5'd3,
                                 ccd: 5'd1, rrd: 5'd2, cdl: 5'd1};
  localparam int unsigned SD_MARGIN  = 1;    // relaxed timing = minimum + MARGIN
  localparam int unsigned SD_REF_INT = 1562; // 16 ms / 1024 refreshes at 100 MHz

  // ---- commands on one bank's RASB/CASB/WEB -------------------------------
  typedef enum logic [2:0] {
    CMD_NOP, CMD_ACT, CMD_RD, CMD_WR, CMD_PRE, CMD_REF
  } cmd_t;

  typedef struct packed {
    logic rasb;
    logic casb;
    logic web;
  } strobe_t;

  localparam strobe_t STB_NOP = '{rasb: 1'b1, casb: 1'b1, web: 1'b1};

  function automatic strobe_t encode_cmd(cmd_t c);
    case (c)
      CMD_ACT: return '{rasb: 1'b0, casb: 1'b1, web: 1'b1};
      CMD_RD:  return '{rasb: 1'b1, casb: 1'b0, web: 1'b1};
      CMD_WR:  return '{rasb: 1'b1, casb: 1'b0, web: 1'b0};
      CMD_PRE: return '{rasb: 1'b0, casb: 1'b1, web: 1'b0};
      CMD_REF: return '{rasb: 1'b0, casb: 1'b0, web: 1'b1};
      default: return STB_NOP;
    endcase
  endfunction

  function automatic cmd_t decode_cmd(strobe_t s);
    case ({s.rasb, s.casb, s.web})
      3'b011:  return CMD_ACT;
      3'b101:  return CMD_RD;
      3'b100:  return CMD_WR;
      3'b010:  return CMD_PRE;
      3'b001:  return CMD_REF;
      default: return CMD_NOP;
    endcase
  endfunction

  // ---- march stages ---------------------------------------------------------
  typedef struct packed {
    logic wr;    // 1 write, 0 read
    logic inv;   // data bar
  } march_op_t;

  typedef struct packed {
    logic      two_ops;   // second operation present
    logic      down;      // descending addresses
    march_op_t op0;
    march_op_t op1;
  } stage_ops_t;

  function automatic stage_ops_t stage_ops(logic [1:0] stage);
    case (stage)
      2'd0:    return '{two_ops: 1'b0, down: 1'b0, op0: '{wr: 1'b1, inv: 1'b0}, op1: '{wr: 1'b0, inv: 1'b0}};
      2'd1:    return '{two_ops: 1'b1, down: 1'b0, op0: '{wr: 1'b0, inv: 1'b0}, op1: '{wr: 1'b1, inv: 1'b1}};
      2'd2:    return '{two_ops: 1'b1, down: 1'b1, op0: '{wr: 1'b0, inv: 1'b1}, op1: '{wr: 1'b1, inv: 1'b0}};
      default: return '{two_ops: 1'b0, down: 1'b0, op0: '{wr: 1'b0, inv: 1'b0}, op1: '{wr: 1'b0, inv: 1'b0}};
    endcase
  endfunction

  // ---- test flow ----------------------------------------------------------
  typedef enum logic [2:0] {
    PH_IDLE,
    PH_INTLV,      // both banks interleaved, minimum timing
    PH_BANK_MIN,   // bank by bank, all parameters at minimum
    PH_BANK_MAX,   // bank by bank, all parameters at minimum + margin
    PH_PARAM       // bank by bank, one parameter at minimum, others relaxed
  } phase_t;

  // parameter under test in PH_PARAM, in this order
  typedef enum logic [2:0] {
    PRM_RC, PRM_RAS, PRM_RCD, PRM_RP, PRM_CCD
  } param_t;
  localparam int unsigned NPARAM = 5;

  typedef enum logic [1:0] {
    RES_GOOD,          // no failure in the interleave test
    RES_INTERLEAVE,    // fails only under interleaved bank operation
    RES_NOT_AT_RATE,   // fails even with relaxed timing
    RES_PARAM          // fails only with tight timing; see parameter mask
  } result_t;

  function automatic timing_t relax(timing_t t, int unsigned m);
    timing_t r;
    r.rc  = t.rc  + TW'(m);
    r.ras = t.ras + TW'(m);
    r.rcd = t.rcd + TW'(m);
    r.rp  = t.rp  + TW'(m);
    r.ccd = t.ccd + TW'(m);
    r.rrd = t.rrd + TW'(m);
    r.cdl = t.cdl + TW'(m);
    return r;
  endfunction

  // tested parameter at its minimum, all other timings relaxed
  function automatic timing_t param_timing(timing_t t, int unsigned m, param_t p);
    timing_t r;
    r = relax(t, m);
    case (p)
      PRM_RC:  r.rc  = t.rc;
      PRM_RAS: r.ras = t.ras;
      PRM_RCD: r.rcd = t.rcd;
      PRM_RP:  r.rp  = t.rp;
      default: r.ccd = t.ccd;
    endcase
    return r;
  endfunction

endpackage
