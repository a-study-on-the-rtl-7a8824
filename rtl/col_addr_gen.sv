// col_addr_gen: col address counter of the BIST address generating block.
//
// An up/down counter over all cols. `load` sets the first address of the
// direction given on `down` (0 when counting up, all ones when counting
// down) and stores that direction; `step` moves one address in the stored
// direction. `last` is high while the
// counter holds the final address of the direction, so a `step` there wraps
// around and is the carry to the next, slower address field. The column is
// the fast-changing address and the row the slow one (a choice of this
// design). The output is registered; it changes on the clock edge after
// `load` or `step`.
module col_addr_gen #(
  parameter int unsigned COL_W = bist_pkg::SD_COL_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             down,
  input  logic             step,
  output logic [COL_W-1:0] col,
  output logic             last
);
  logic dir;   // 1: counting down

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col  <= '0;
      dir <= 1'b0;
    end else if (load) begin
      col  <= down ? '1 : '0;
      dir <= down;
    end else if (step) begin
      col  <= dir ? col - 1'b1 : col + 1'b1;
    end
  end

  assign last = dir ? (col == '0) : (&col);
endmodule
