// bist_out_if: BIST information output interface (pins ERR and RED).
//
// ERR follows the analyzer's sticky fail flag through one register: it goes
// to 1 with the first mismatch of a test and stays there until the next test
// starts. RED carries the redundancy information serially. On `send` (the end
// of the test) the interface shifts out the FRAME_W-bit `frame`, most
// significant bit first, one bit per clock, starting in the cycle after
// `send`; `busy` is high while bits go out and RED is 0 otherwise. The caller
// puts a leading 1 in the frame so a receiver can find its start. The frame
// is read from the registers that hold it rather than copied into a shift
// register; it must stay stable while `busy` is high.
module bist_out_if #(
  parameter int unsigned FRAME_W = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               fail,
  input  logic               send,
  input  logic [FRAME_W-1:0] frame,
  output logic               err_o,
  output logic               red,
  output logic               busy
);
  logic [$clog2(FRAME_W)-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_o <= 1'b0;
      red   <= 1'b0;
      busy  <= 1'b0;
      idx   <= '0;
    end else begin
      err_o <= fail;
      if (send && !busy) begin
        busy <= 1'b1;
        red  <= frame[FRAME_W-1];
        idx  <= $clog2(FRAME_W)'(FRAME_W - 2);
      end else if (busy) begin
        if (idx == '1) begin           // wrapped below bit 0: frame sent
          busy <= 1'b0;
          red  <= 1'b0;
        end else begin
          red <= frame[idx];
          idx <= idx - 1'b1;
        end
      end
    end
  end
endmodule
