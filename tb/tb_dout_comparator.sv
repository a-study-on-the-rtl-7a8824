// tb_dout_comparator: random reads with random tags pass through a reference
// memory-latency model (RD_LAT = 4); some returned words are corrupted. The
// comparator must pulse `err` exactly one cycle after each corrupted word's
// slot, with that read's tag, and never otherwise.
`timescale 1ns/1ps
module tb_dout_comparator;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0, clr = 0, rd_issue = 0, exp_valid, err;
  logic [19:0] rd_tag = '0, exp_tag, err_tag;
  logic [63:0] expected, dout = '0;
  always #5 clk = ~clk;
  dout_comparator #(.TAG_W(20), .RD_LAT(LAT)) dut (.clk, .rst_n, .clr, .rd_issue, .rd_tag,
    .exp_valid, .exp_tag, .expected, .dout, .err, .err_tag);

  // expected word derived from the tag, as the data generator would
  assign expected = {44'h0, exp_tag};

  int checks = 0, failures = 0, nerr = 0;
  bit          v_hist [$];
  logic [19:0] t_hist [$];
  bit          bad_hist [$];
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      bit bad;
      @(negedge clk);
      // check err for the read whose data was on dout last cycle
      if (v_hist.size() > LAT) begin
        bit v; logic [19:0] t; bit b;
        v = v_hist[v_hist.size() - LAT - 1]; t = t_hist[t_hist.size() - LAT - 1];
        b = bad_hist[bad_hist.size() - LAT - 1];
        checks++;
        if (err != (v && b) || (err && err_tag != t)) begin
          failures++; $display("FAIL: cycle %0d err=%b tag=%h expected err=%b tag=%h", i, err, err_tag, v && b, t);
        end
        if (err) nerr++;
      end
      // memory returns data for the read issued LAT cycles ago
      bad = ($urandom_range(0, 5) == 0);
      if (v_hist.size() >= LAT)
        dout = {44'h0, t_hist[t_hist.size() - LAT]} ^ (bad ? 64'h1 << $urandom_range(0, 63) : 64'h0);
      bad_hist.push_back(0);
      if (v_hist.size() >= LAT) bad_hist[bad_hist.size() - LAT - 1] = bad;
      rd_issue = $urandom_range(0, 1);
      rd_tag   = 20'($urandom);
      v_hist.push_back(rd_issue); t_hist.push_back(rd_tag);
    end
    checks++;
    if (nerr == 0) begin failures++; $display("FAIL: no error ever flagged"); end
    $display("errors flagged: %0d", nerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
