// row_addr_gen: row address counter of the BIST address generating block.
//
// An up/down counter over all rows. `load` sets the first address of the
// direction given on `down` (0 when counting up, all ones when counting
// down) and stores that direction; `step` moves one address in the stored
// direction. `last` is high while the
// counter holds the final address of the direction, so a `step` there wraps
// around and is the carry to the next, slower address field. The column is
// the fast-changing address and the row the slow one (a choice of this
// design). The output is registered; it changes on the clock edge after
// `load` or `step`.
module row_addr_gen #(
  parameter int unsigned ROW_W = bist_pkg::SD_ROW_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             down,
  input  logic             step,
  output logic [ROW_W-1:0] row,
  output logic             last
);
  logic dir;   // 1: counting down

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row  <= '0;
      dir <= 1'b0;
    end else if (load) begin
      row  <= down ? '1 : '0;
      dir <= down;
    end else if (step) begin
      row  <= dir ? row - 1'b1 : row + 1'b1;
    end
  end

  assign last = dir ? (row == '0) : (&row);
endmodule
