// tb_bist_clock_gen: BIST_ON synchroniser and run control. Checks that the
// start pulse comes exactly once, in the third cycle after BIST_ON rises,
// that `run` holds until `done`, and that only a new BIST_ON edge restarts.
`timescale 1ns/1ps
module tb_bist_clock_gen;
  logic clk = 0, rst_n = 0, bist_on = 0, done = 0, start, run;
  always #5 clk = ~clk;
  bist_clock_gen dut (.tclkt(clk), .rst_n, .bist_on, .done, .start, .run);

  int checks = 0, failures = 0, nstart = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (start && rst_n) nstart++;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(posedge clk); check(!start && !run, "idle after reset");
    @(negedge clk); bist_on = 1;
    @(posedge clk); #1 check(!start, "no start after 1 cycle");
    @(posedge clk); #1 check(!start, "no start after 2 cycles");
    @(posedge clk); #1 check(start, "start in third cycle");
    @(posedge clk); #1 check(!start && run, "single pulse, run high");
    repeat (20) @(posedge clk); #1 check(run && nstart == 1, $sformatf("run holds, no second start (run=%b starts=%0d)", run, nstart));
    @(negedge clk); done = 1; @(negedge clk); done = 0;
    #1 check(!run, "run cleared by done");
    repeat (10) @(posedge clk); #1 check(nstart == 1 && !run, "no restart while BIST_ON stays high");
    @(negedge clk); bist_on = 0; repeat (5) @(negedge clk); bist_on = 1;
    repeat (5) @(posedge clk); #1 check(nstart == 2 && run, "restart after new BIST_ON edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
