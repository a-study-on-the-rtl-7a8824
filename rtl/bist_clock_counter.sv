// bist_clock_counter: cycle counter of the BIST.
//
// Counts TCLKT cycles while `en` is high, from zero after `clr`. The value at
// the moment a mismatch is found is the clock number stored as redundancy
// information: together with the known test sequence it locates the failing
// access in time. The counter saturates instead of wrapping; 32 bits hold
// any complete test of the full-size memory (a choice of this design).
module bist_clock_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [CNT_W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                count <= '0;
    else if (clr)              count <= '0;
    else if (en && !(&count))  count <= count + 1'b1;
  end
endmodule
