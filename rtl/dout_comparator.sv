// dout_comparator: expected/real DOUT comparator.
//
// Every read the BIST issues comes with a tag (bank, row, column, background
// and polarity). The tag travels down an RD_LAT-stage shift register, so it
// leaves the pipe in the cycle the read's data is on `dout`. RD_LAT is the
// CAS latency of the memory plus the register stages between the BIST and
// the memory (2 + 1 + 1 at the top level). The outgoing tag goes to a data
// generator, which returns the `expected` word; a mismatch gives a one-cycle
// `err` pulse one cycle later, with the tag of the failing read in `err_tag`.
// Re-deriving the expected word from the tag instead of delaying 64-bit words
// is a choice of this design.
module dout_comparator #(
  parameter int unsigned DATA_W = bist_pkg::SD_DATA_W,
  parameter int unsigned TAG_W  = 20,
  parameter int unsigned RD_LAT = bist_pkg::CAS_LAT + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              rd_issue,
  input  logic [TAG_W-1:0]  rd_tag,
  output logic              exp_valid,
  output logic [TAG_W-1:0]  exp_tag,
  input  logic [DATA_W-1:0] expected,
  input  logic [DATA_W-1:0] dout,
  output logic              err,
  output logic [TAG_W-1:0]  err_tag
);
  logic [RD_LAT-1:0]            vpipe;
  logic [RD_LAT-1:0][TAG_W-1:0] tpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      tpipe <= '0;
    end else if (clr) begin
      vpipe <= '0;
    end else begin
      vpipe[0] <= rd_issue;
      tpipe[0] <= rd_tag;
      for (int i = 1; i < RD_LAT; i++) begin
        vpipe[i] <= vpipe[i-1];
        tpipe[i] <= tpipe[i-1];
      end
    end
  end

  assign exp_valid = vpipe[RD_LAT-1];
  assign exp_tag   = tpipe[RD_LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err     <= 1'b0;
      err_tag <= '0;
    end else begin
      err <= exp_valid && (dout != expected) && !clr;
      if (exp_valid) err_tag <= exp_tag;
    end
  end
endmodule
