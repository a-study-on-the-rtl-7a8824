// mml_sdram_bist_top: embedded-SDRAM interface of a merged memory-logic chip
// with its built-in self-test.
//
// Three blocks sit between the chip's logic part and the dual-bank SDRAM
// core: the BIST (bist_core), the 2:1 multiplexer array that gives the memory
// either the logic part's signals and clock TCLKL (MODS low) or the BIST's
// signals and the test clock TCLKT (MODS high), and the interface buffer
// array that registers everything going into the memory and DOUT coming out.
// The logic part's memory controller and the SDRAM core are outside this
// module: their signals are the lg_* and mem_* ports. DOUT is returned to the
// logic part on lg_dout.
//
// Use: hold MODS high, raise BIST_ON; the test runs on TCLKT. ERR goes high
// at the first failure, BIST_DONE when the test flow has ended, and RED then
// sends the verdict and the stored failures (see bist_core). At the default
// parameters a good memory takes about 12 million TCLKT cycles (about 0.12 s
// at 100 MHz).
module mml_sdram_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned ROW_W   = bist_pkg::SD_ROW_W,
  parameter int unsigned COL_W   = bist_pkg::SD_COL_W,
  parameter int unsigned DATA_W  = bist_pkg::SD_DATA_W,
  parameter timing_t     TM      = bist_pkg::TM_MIN,
  parameter int unsigned REF_INT = bist_pkg::SD_REF_INT
) (
  input  logic                tclkt,
  input  logic                tclkl,
  input  logic                rst_n,
  input  logic                mods,
  input  logic                bist_on,
  output logic                err,
  output logic                red,
  output logic                bist_done,
  output logic [19:0]         ref_count,
  // logic part memory controller
  input  logic [ROW_W-1:0]    lg_row,
  input  logic [COL_W-1:0]    lg_col,
  input  strobe_t [NBANK-1:0] lg_stb,
  input  logic [DATA_W-1:0]   lg_din,
  output logic [DATA_W-1:0]   lg_dout,
  // SDRAM core
  output logic                mem_clk,
  output logic [ROW_W-1:0]    mem_row,
  output logic [COL_W-1:0]    mem_col,
  output strobe_t [NBANK-1:0] mem_stb,
  output logic [DATA_W-1:0]   mem_din,
  input  logic [DATA_W-1:0]   mem_dout
);
  logic [ROW_W-1:0]    bi_row, mx_row;
  logic [COL_W-1:0]    bi_col, mx_col;
  strobe_t [NBANK-1:0] bi_stb, mx_stb;
  logic [DATA_W-1:0]   bi_din, mx_din, dout_buf;

  bist_core #(
    .ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W), .TM(TM),
    .RD_LAT(CAS_LAT + 2), .REF_INT(REF_INT)
  ) u_bist (
    .tclkt, .rst_n, .bist_on,
    .mem_row(bi_row), .mem_col(bi_col), .mem_stb(bi_stb), .mem_din(bi_din),
    .dout(dout_buf), .err, .red, .done(bist_done), .ref_count);

  mux_array_2x1 #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W)) u_mux (
    .mods, .tclkl, .tclkt,
    .lg_row, .lg_col, .lg_stb, .lg_din,
    .bi_row, .bi_col, .bi_stb, .bi_din,
    .mclk(mem_clk), .m_row(mx_row), .m_col(mx_col), .m_stb(mx_stb), .m_din(mx_din));

  sdram_if_buffer #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W)) u_buf (
    .mclk(mem_clk), .rst_n,
    .in_row(mx_row), .in_col(mx_col), .in_stb(mx_stb), .in_din(mx_din),
    .out_row(mem_row), .out_col(mem_col), .out_stb(mem_stb), .out_din(mem_din),
    .mem_dout, .dout(dout_buf));

  assign lg_dout = dout_buf;
endmodule
