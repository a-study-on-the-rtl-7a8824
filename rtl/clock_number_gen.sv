// clock_number_gen: clock number register / fail address store.
//
// On each `err` pulse, while fewer than FAIL_DEPTH failures are stored, the
// current clock number `clk_num` and the failure description `info` (phase,
// parameter, bank, row and column of the failing read) are written into the
// next free slot; later failures are dropped. `count` says how many slots
// hold data. After the test the slots are sent out serially as redundancy
// information. The number of slots is a choice of this design. `clr` empties
// the store at the start of a test.
module clock_number_gen #(
  parameter int unsigned FAIL_DEPTH = 4,
  parameter int unsigned CNT_W      = 32,
  parameter int unsigned INFO_W     = 24,
  localparam int unsigned NUM_W     = $clog2(FAIL_DEPTH + 1)
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    clr,
  input  logic                                    err,
  input  logic [CNT_W-1:0]                        clk_num,
  input  logic [INFO_W-1:0]                       info,
  output logic [FAIL_DEPTH-1:0][CNT_W+INFO_W-1:0] entries,
  output logic [NUM_W-1:0]                        count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entries <= '0;
      count   <= '0;
    end else if (clr) begin
      entries <= '0;
      count   <= '0;
    end else if (err && count < NUM_W'(FAIL_DEPTH)) begin
      entries[int'(count)] <= {clk_num, info};
      count <= count + 1'b1;
    end
  end
endmodule
