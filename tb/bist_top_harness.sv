// bist_top_harness: one chip top (mml_sdram_bist_top) wired to one SDRAM
// model, with a receiver for the serial RED frame. Used by the end-to-end
// testbenches to run several memories with different defects side by side.
// The logic-part inputs are held idle (NOP); MODS is held high.
// `frame` holds the last received frame, `frame_ok` goes high when the
// first one is complete; `cycles` counts TCLKT cycles from BIST_ON to BIST_DONE.
module bist_top_harness
  import bist_pkg::*;
#(
  parameter int unsigned ROW_W       = 4,
  parameter int unsigned COL_W       = 3,
  parameter int unsigned REF_INT     = 200,
  parameter timing_t     DEV         = bist_pkg::TM_MIN,
  parameter logic [1:0]  FAULT_BANKS = 2'b00,
  parameter int          FAULT_ROW   = -1,
  parameter bit          STUCK_EN    = 1'b0,
  parameter bit          STUCK_BANK  = 1'b0,
  parameter int unsigned STUCK_ROW   = 0,
  parameter int unsigned STUCK_COL   = 0,
  parameter int unsigned STUCK_BIT   = 0,
  parameter bit          STUCK_VAL   = 1'b0,
  localparam int unsigned FW = 10 + 3 + 4 * (39 + ROW_W + COL_W)
) (
  input  logic          tclkt,
  input  logic          rst_n,
  input  logic          bist_on,
  output logic          err,
  output logic          bist_done,
  output logic [19:0]   ref_count,
  output logic [FW-1:0] frame,
  output logic          frame_ok,
  output int            cycles
);
  logic                red, mem_clk;
  logic [ROW_W-1:0]    mem_row;
  logic [COL_W-1:0]    mem_col;
  strobe_t [NBANK-1:0] mem_stb;
  logic [63:0]         mem_din, mem_dout, lg_dout;

  mml_sdram_bist_top #(.ROW_W(ROW_W), .COL_W(COL_W), .REF_INT(REF_INT)) u_top (
    .tclkt, .tclkl(1'b0), .rst_n, .mods(1'b1), .bist_on, .err, .red, .bist_done,
    .ref_count, .lg_row('0), .lg_col('0), .lg_stb({NBANK{STB_NOP}}), .lg_din('0),
    .lg_dout, .mem_clk, .mem_row, .mem_col, .mem_stb, .mem_din, .mem_dout);

  sdram16m_model #(
    .ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(64), .CL(CAS_LAT), .DEV(DEV),
    .FAULT_BANKS(FAULT_BANKS), .FAULT_ROW(FAULT_ROW), .STUCK_EN(STUCK_EN), .STUCK_BANK(STUCK_BANK),
    .STUCK_ROW(STUCK_ROW), .STUCK_COL(STUCK_COL), .STUCK_BIT(STUCK_BIT),
    .STUCK_VAL(STUCK_VAL)
  ) u_mem (
    .clk(mem_clk), .row(mem_row), .col(mem_col), .stb(mem_stb), .din(mem_din),
    .dout(mem_dout));

  // RED receiver: a 1 while idle starts a frame of FW bits
  int rx_n = 0;
  initial begin frame = '0; frame_ok = 1'b0; cycles = 0; end
  always @(posedge tclkt) begin
    if (bist_on && !bist_done) cycles <= cycles + 1;
    if (rx_n == 0 && red) begin
      frame <= {{(FW-1){1'b0}}, 1'b1};
      rx_n  <= 1;
    end else if (rx_n > 0) begin
      frame <= {frame[FW-2:0], red};
      rx_n  <= rx_n + 1;
      if (rx_n == FW - 1) begin
        rx_n     <= 0;
        frame_ok <= 1'b1;
      end
    end
  end
endmodule
