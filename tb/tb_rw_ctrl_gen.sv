// tb_rw_ctrl_gen: command order and cycle spacing of the read/write control
// generator. Three requests are queued back to back at minimum timing
// (tRC 9, tRAS 6, tRCD 3, tRP 3, tCCD 1, tRRD 2, tCDL 1):
//   1 interleaved read D / write ~D at row 5 col 9
//   2 interleaved write D at row 6 col 10
//   3 refresh of bank B
// and then, with every timing relaxed by one cycle, 4 a bank-A read ~D /
// write D. The expected cycles of every command were worked out by hand
// from the timing rules; the testbench also checks addresses, DIN, and the
// read tags.
`timescale 1ns/1ps
module tb_rw_ctrl_gen;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, ready, idle;
  logic is_ref = 0, intlv = 0, bank = 0, two_ops = 0, bg = 0;
  march_op_t op0 = '0, op1 = '0;
  logic [8:0] row = 0;
  logic [7:0] col = 0;
  logic [63:0] wdata = 64'h0123_4567_89AB_CDEF;
  timing_t tm = TM_MIN;
  logic [8:0] mem_row;
  logic [7:0] mem_col;
  strobe_t [1:0] mem_stb;
  logic [63:0] mem_din;
  logic rd_issue, rd_bank, rd_bg, rd_inv;
  always #5 clk = ~clk;
  rw_ctrl_gen dut (.clk, .rst_n, .start, .ready, .is_ref, .intlv, .bank, .two_ops, .op0, .op1,
    .row, .col, .bg, .wdata, .tm, .idle, .mem_row, .mem_col, .mem_stb, .mem_din,
    .rd_issue, .rd_bank, .rd_bg, .rd_inv);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { int cyc; cmd_t c; int b; int r; int k; logic [63:0] d; bit ri; bit rinv; } ev_t;
  ev_t ev [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n)
    for (int b = 0; b < 2; b++)
      if (decode_cmd(mem_stb[b]) != CMD_NOP)
        ev.push_back('{cyc, decode_cmd(mem_stb[b]), b, int'(mem_row), int'(mem_col), mem_din,
                       rd_issue, rd_inv});

  task automatic request(bit f_ref, bit f_il, bit f_b, bit f_two, march_op_t a, march_op_t c,
                         int r, int k);
    @(negedge clk);
    while (!ready) @(negedge clk);
    is_ref = f_ref; intlv = f_il; bank = f_b; two_ops = f_two; op0 = a; op1 = c;
    row = 9'(r); col = 8'(k); start = 1;
    @(negedge clk); start = 0;
    is_ref = 0; intlv = 0; bank = 0; row = 0; col = 0;   // request was stored
  endtask

  localparam march_op_t RD_D  = '{wr: 0, inv: 0}, WR_DB = '{wr: 1, inv: 1};
  localparam march_op_t RD_DB = '{wr: 0, inv: 1}, WR_D  = '{wr: 1, inv: 0};

  initial begin
    cmd_t ec [8];
    int   eo [8], eb [8];
    int   t0, base;
    repeat (2) @(posedge clk); rst_n = 1;
    request(0, 1, 0, 1, RD_D, WR_DB, 5, 9);
    request(0, 1, 0, 0, WR_D, WR_D, 6, 10);
    request(1, 0, 1, 0, RD_D, RD_D, 0, 0);
    while (!idle) @(negedge clk);
    repeat (12) @(negedge clk);
    tm = relax(TM_MIN, 1);
    request(0, 0, 0, 1, RD_DB, WR_D, 7, 3);
    @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (3) @(negedge clk);

    check(ev.size() == 8 + 6 + 1 + 4, $sformatf("command count %0d", ev.size()));
    if (ev.size() == 19) begin
      t0 = ev[0].cyc;
      // group 1
      ec = '{CMD_ACT, CMD_ACT, CMD_RD, CMD_RD, CMD_WR, CMD_WR, CMD_PRE, CMD_PRE};
      eo = '{0, 2, 3, 5, 6, 7, 8, 9};
      eb = '{0, 1, 0, 1, 0, 1, 0, 1};
      for (int i = 0; i < 8; i++)
        check(ev[i].c == ec[i] && ev[i].b == eb[i] && ev[i].cyc - t0 == eo[i],
              $sformatf("group 1 cmd %0d: %s bank %0d at +%0d", i, ev[i].c.name(), ev[i].b, ev[i].cyc - t0));
      check(ev[0].r == 5 && ev[2].k == 9, "group 1 address");
      check(ev[2].ri && !ev[2].rinv && ev[3].ri, "group 1 read tags");
      check(ev[4].d == ~wdata && ev[5].d == ~wdata, "group 1 write data bar");
      // group 2: ACT A waits tRP after PRE A (+8) -> +11
      ec[0:5] = '{CMD_ACT, CMD_ACT, CMD_WR, CMD_WR, CMD_PRE, CMD_PRE};
      eo[0:5] = '{11, 13, 14, 16, 17, 19};
      for (int i = 0; i < 6; i++)
        check(ev[8+i].c == ec[i] && ev[8+i].b == eb[i] && ev[8+i].cyc - t0 == eo[i],
              $sformatf("group 2 cmd %0d: %s bank %0d at +%0d", i, ev[8+i].c.name(), ev[8+i].b, ev[8+i].cyc - t0));
      check(ev[8].r == 6 && ev[10].k == 10 && ev[10].d == wdata, "group 2 address and data");
      // refresh: bank B, tRP after PRE B (+19) and tRC after ACT B (+13) -> +22
      check(ev[14].c == CMD_REF && ev[14].b == 1 && ev[14].cyc - t0 == 22,
            $sformatf("refresh at +%0d bank %0d", ev[14].cyc - t0, ev[14].b));
      // group 4, relaxed: RD at ACT+4, WR at +6, PRE at WR+2
      base = ev[15].cyc;
      check(ev[15].c == CMD_ACT && ev[15].b == 0 && ev[15].r == 7, "group 4 ACT");
      check(ev[16].c == CMD_RD && ev[16].cyc - base == 4 && ev[16].rinv, "group 4 read after tRCD+1");
      check(ev[17].c == CMD_WR && ev[17].cyc - base == 6 && ev[17].d == wdata, "group 4 write after tCCD+1");
      check(ev[18].c == CMD_PRE && ev[18].cyc - base == 8, $sformatf("group 4 PRE at +%0d", ev[18].cyc - base));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
