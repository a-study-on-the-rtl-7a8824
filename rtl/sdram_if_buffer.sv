// sdram_if_buffer: SDRAM interface buffer array.
//
// One register stage, on the memory clock, in each direction between the
// multiplexer array and the SDRAM core: address, per-bank strobes and DIN on
// the way in, DOUT on the way out. Registering both directions keeps the
// paths to and from the core short and independent of where the BIST or the
// logic part sits, so the core sees commands with a full clock of setup. The
// strobes reset to NOP (all high). The stage adds one cycle each way, so a
// read's data reaches the BIST CAS latency + 2 cycles after the BIST issues
// it. The register-stage structure is a choice of this design; the block is
// only named.
module sdram_if_buffer
  import bist_pkg::*;
#(
  parameter int unsigned ROW_W  = bist_pkg::SD_ROW_W,
  parameter int unsigned COL_W  = bist_pkg::SD_COL_W,
  parameter int unsigned DATA_W = bist_pkg::SD_DATA_W
) (
  input  logic                mclk,
  input  logic                rst_n,
  input  logic [ROW_W-1:0]    in_row,
  input  logic [COL_W-1:0]    in_col,
  input  strobe_t [NBANK-1:0] in_stb,
  input  logic [DATA_W-1:0]   in_din,
  output logic [ROW_W-1:0]    out_row,
  output logic [COL_W-1:0]    out_col,
  output strobe_t [NBANK-1:0] out_stb,
  output logic [DATA_W-1:0]   out_din,
  input  logic [DATA_W-1:0]   mem_dout,
  output logic [DATA_W-1:0]   dout
);
  always_ff @(posedge mclk or negedge rst_n) begin
    if (!rst_n) begin
      out_row <= '0;
      out_col <= '0;
      out_stb <= {NBANK{STB_NOP}};
      out_din <= '0;
      dout    <= '0;
    end else begin
      out_row <= in_row;
      out_col <= in_col;
      out_stb <= in_stb;
      out_din <= in_din;
      dout    <= mem_dout;
    end
  end
endmodule
