// mux_array_2x1: switch between the logic part and the BIST at the memory.
//
// One 2:1 multiplexer per memory input signal. With MODS low (normal mode)
// the memory gets the logic part's memory controller: its clock TCLKL, its
// row/column address, per-bank RASB/CASB/WEB and DIN. With MODS high (BIST
// mode) it gets the BIST's signals and the external test clock TCLKT. The
// clock multiplexer is part of the array. MODS is taken as the BIST mode
// select (a reading of the pin name; BIST_ON then starts the test).
// Purely combinational. Switching the clock multiplexer while either clock
// runs can give a short clock pulse; MODS is meant to change only while the
// memory is idle.
module mux_array_2x1
  import bist_pkg::*;
#(
  parameter int unsigned ROW_W  = bist_pkg::SD_ROW_W,
  parameter int unsigned COL_W  = bist_pkg::SD_COL_W,
  parameter int unsigned DATA_W = bist_pkg::SD_DATA_W
) (
  input  logic                mods,
  input  logic                tclkl,
  input  logic                tclkt,
  input  logic [ROW_W-1:0]    lg_row,
  input  logic [COL_W-1:0]    lg_col,
  input  strobe_t [NBANK-1:0] lg_stb,
  input  logic [DATA_W-1:0]   lg_din,
  input  logic [ROW_W-1:0]    bi_row,
  input  logic [COL_W-1:0]    bi_col,
  input  strobe_t [NBANK-1:0] bi_stb,
  input  logic [DATA_W-1:0]   bi_din,
  output logic                mclk,
  output logic [ROW_W-1:0]    m_row,
  output logic [COL_W-1:0]    m_col,
  output strobe_t [NBANK-1:0] m_stb,
  output logic [DATA_W-1:0]   m_din
);
  always_comb begin
    if (mods) begin
      mclk  = tclkt;
      m_row = bi_row;
      m_col = bi_col;
      m_stb = bi_stb;
      m_din = bi_din;
    end else begin
      mclk  = tclkl;
      m_row = lg_row;
      m_col = lg_col;
      m_stb = lg_stb;
      m_din = lg_din;
    end
  end
endmodule
