// sdram_data_gen: test word generator of the BIST.
//
// The word written to, or expected from, an address is a checkerboard of the
// two alternating-bit words 0x5555... and 0xAAAA...: the choice flips with
// the parity of the row and column LSBs, so neighbouring cells in both
// directions hold opposite values. `bg` selects which of the two
// complementary checkerboards a march pass uses, and `inv` gives the data-bar
// word of that pass. The checkerboard and the 5/A words follow the described
// test algorithm; which address bits form the parity is a choice of this
// design. Purely combinational.
module sdram_data_gen #(
  parameter int unsigned DATA_W = bist_pkg::SD_DATA_W
) (
  input  logic              bg,
  input  logic              inv,
  input  logic              row0,
  input  logic              col0,
  output logic [DATA_W-1:0] data
);
  localparam logic [DATA_W-1:0] PAT5 = {(DATA_W/2){2'b01}};

  always_comb begin
    data = PAT5;
    if (bg ^ row0 ^ col0 ^ inv) data = ~PAT5;
  end
endmodule
