// tb_bist_out_if: sends random 23-bit frames and checks that RED carries
// them MSB first from the cycle after `send`, one bit per cycle, returns to
// 0 afterwards, and that ERR follows the fail flag one cycle later.
`timescale 1ns/1ps
module tb_bist_out_if;
  localparam int FW = 23;
  logic clk = 0, rst_n = 0, fail = 0, send = 0, err_o, red, busy;
  logic [FW-1:0] frame = '0;
  always #5 clk = ~clk;
  bist_out_if #(.FRAME_W(FW)) dut (.clk, .rst_n, .fail, .send, .frame, .err_o, .red, .busy);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      frame = {1'b1, 22'($urandom)};
      fail = r[0];
      send = 1; @(negedge clk); send = 0;
      check(err_o == r[0], "ERR follows fail");
      for (int i = FW - 1; i >= 0; i--) begin
        check(busy && red == frame[i], $sformatf("frame %0d bit %0d", r, i));
        @(negedge clk);
      end
      check(!busy && !red, "idle after frame");
      repeat (3) @(negedge clk);
      check(!red, "RED stays low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
