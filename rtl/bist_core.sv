// bist_core: the built-in self-test circuit for the embedded SDRAM.
//
// Tests the dual-bank SDRAM at its real clock rate (TCLKT) and, when it
// fails, narrows down which AC timing parameter lacks margin and where the
// failing cell is. Blocks:
//   bist_clock_gen        BIST_ON synchroniser, start pulse, run enable
//   bist_controller       test flow (interleave -> bank by bank -> relaxed
//                         -> one parameter at a time) and march sequencing
//   row/col_addr_gen      up/down address counters
//   stage_refresh_counter march stage/pass, refresh timer and count
//   sdram_data_gen (x2)   write data, and expected data for reads
//   rw_ctrl_gen           SDRAM commands with programmed AC timing
//   dout_comparator       expected/real DOUT compare after the read latency
//   error_type_analyzer   per-phase failure record and verdict
//   bist_clock_counter    clock number
//   clock_number_gen      clock number and address of the first failures
//   bist_out_if           ERR and the serial RED output
//
// After the flow ends, `done` goes high and stays high until the next test,
// and RED sends, MSB first from the next cycle on, the frame
//   1 | result[1:0] | param_mask[4:0] | bank_mask[1:0] | count |
//   entry[FAIL_DEPTH-1] ... entry[0]
// where param_mask bit i is parameter i in the order tRC, tRAS, tRCD, tRP,
// tCCD, and each entry is {clock number[31:0], phase[2:0], param[2:0], bank,
// row, column}; unused entries are zero. RD_LAT is the number of cycles from
// a read on `mem_*` to its data on `dout` (CAS latency plus register stages
// on the way, 4 at the top level). The `done` output and the frame layout
// are choices of this design.
module bist_core
  import bist_pkg::*;
#(
  parameter int unsigned ROW_W      = bist_pkg::SD_ROW_W,
  parameter int unsigned COL_W      = bist_pkg::SD_COL_W,
  parameter int unsigned DATA_W     = bist_pkg::SD_DATA_W,
  parameter timing_t     TM         = bist_pkg::TM_MIN,
  parameter int unsigned MARGIN     = bist_pkg::SD_MARGIN,
  parameter int unsigned RD_LAT     = bist_pkg::CAS_LAT + 2,
  parameter int unsigned REF_INT    = bist_pkg::SD_REF_INT,
  parameter int unsigned FAIL_DEPTH = 4,
  localparam int unsigned CNT_W     = 32,
  localparam int unsigned INFO_W    = 7 + ROW_W + COL_W,
  localparam int unsigned NUM_W     = $clog2(FAIL_DEPTH + 1),
  localparam int unsigned FRAME_W   = 10 + NUM_W + FAIL_DEPTH * (CNT_W + INFO_W)
) (
  input  logic                tclkt,
  input  logic                rst_n,
  input  logic                bist_on,
  // to the memory (through the multiplexer array)
  output logic [ROW_W-1:0]    mem_row,
  output logic [COL_W-1:0]    mem_col,
  output strobe_t [NBANK-1:0] mem_stb,
  output logic [DATA_W-1:0]   mem_din,
  // from the memory
  input  logic [DATA_W-1:0]   dout,
  // results
  output logic                err,
  output logic                red,
  output logic                done,
  output logic [19:0]         ref_count
);
  localparam int unsigned TAG_W = 3 + ROW_W + COL_W;

  logic start, run, clr, ctl_done;
  phase_t phase;
  param_t param;
  timing_t tm;
  logic grp_start, grp_is_ref, grp_intlv, grp_bank, grp_ready, grp_idle;
  stage_ops_t grp_ops;
  logic addr_load, addr_down, col_step, row_step, col_last, row_last;
  logic stage_clr, stage_adv, stage_last, bg, ref_req, ref_bank, ref_ack;
  logic [1:0] stage;
  logic phase_start, phase_end, phase_fail, any_fail;
  logic [NBANK-1:0] phase_bank_fail, bank_mask;
  logic [NPARAM-1:0] param_mask;
  result_t result;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic [DATA_W-1:0] wdata, expected;
  logic rd_issue, rd_bank, rd_bg, rd_inv;
  logic [TAG_W-1:0] rd_tag, exp_tag, err_tag;
  logic exp_valid, cmp_err;
  logic [CNT_W-1:0] clk_num;
  logic [FAIL_DEPTH-1:0][CNT_W+INFO_W-1:0] entries;
  logic [NUM_W-1:0] fail_cnt;
  logic red_busy;

  bist_clock_gen u_clkgen (
    .tclkt, .rst_n, .bist_on, .done(ctl_done), .start, .run);

  bist_controller #(.TM(TM), .MARGIN(MARGIN), .DRAIN(RD_LAT + 2)) u_ctrl (
    .clk(tclkt), .rst_n, .start, .clr, .running(), .done(ctl_done),
    .phase, .param, .tm,
    .grp_start, .grp_is_ref, .grp_intlv, .grp_bank, .grp_ops, .grp_ready, .grp_idle,
    .addr_load, .addr_down, .col_step, .row_step, .col_last, .row_last,
    .stage_clr, .stage_adv, .stage, .stage_last, .ref_req, .ref_bank, .ref_ack,
    .phase_start, .phase_end, .phase_fail, .phase_bank_fail);

  row_addr_gen #(.ROW_W(ROW_W)) u_row (
    .clk(tclkt), .rst_n, .load(addr_load), .down(addr_down), .step(row_step),
    .row, .last(row_last));

  col_addr_gen #(.COL_W(COL_W)) u_col (
    .clk(tclkt), .rst_n, .load(addr_load), .down(addr_down), .step(col_step),
    .col, .last(col_last));

  stage_refresh_counter #(.REF_INT(REF_INT), .REF_CNT_W(20)) u_stage (
    .clk(tclkt), .rst_n, .clr, .stage_clr, .adv(stage_adv), .stage, .bg, .last(stage_last),
    .ref_en(run), .ref_req, .ref_ack, .ref_bank, .ref_count);

  sdram_data_gen #(.DATA_W(DATA_W)) u_wdata (
    .bg, .inv(1'b0), .row0(row[0]), .col0(col[0]), .data(wdata));

  rw_ctrl_gen #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W)) u_rw (
    .clk(tclkt), .rst_n, .start(grp_start), .ready(grp_ready), .is_ref(grp_is_ref),
    .intlv(grp_intlv), .bank(grp_bank), .two_ops(grp_ops.two_ops),
    .op0(grp_ops.op0), .op1(grp_ops.op1), .row, .col, .bg, .wdata, .tm,
    .idle(grp_idle),
    .mem_row, .mem_col, .mem_stb, .mem_din, .rd_issue, .rd_bank, .rd_bg, .rd_inv);

  // tag of a read: bank, row, column, background, polarity
  assign rd_tag = {rd_bank, mem_row, mem_col, rd_bg, rd_inv};

  dout_comparator #(.DATA_W(DATA_W), .TAG_W(TAG_W), .RD_LAT(RD_LAT)) u_cmp (
    .clk(tclkt), .rst_n, .clr, .rd_issue, .rd_tag, .exp_valid, .exp_tag,
    .expected, .dout, .err(cmp_err), .err_tag);

  sdram_data_gen #(.DATA_W(DATA_W)) u_edata (
    .bg(exp_tag[1]), .inv(exp_tag[0]), .row0(exp_tag[2 + COL_W]),
    .col0(exp_tag[2]), .data(expected));

  error_type_analyzer u_eta (
    .clk(tclkt), .rst_n, .clr, .phase_start, .phase_end, .phase, .param,
    .err(cmp_err), .err_bank(err_tag[TAG_W-1]), .phase_fail, .phase_bank_fail,
    .any_fail, .result, .param_mask, .bank_mask);

  bist_clock_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk(tclkt), .rst_n, .clr, .en(run), .count(clk_num));

  clock_number_gen #(.FAIL_DEPTH(FAIL_DEPTH), .CNT_W(CNT_W), .INFO_W(INFO_W)) u_cng (
    .clk(tclkt), .rst_n, .clr, .err(cmp_err), .clk_num,
    .info({phase, param, err_tag[TAG_W-1:2]}), .entries, .count(fail_cnt));

  bist_out_if #(.FRAME_W(FRAME_W)) u_out (
    .clk(tclkt), .rst_n, .fail(any_fail), .send(ctl_done),
    .frame({1'b1, result, param_mask, bank_mask, fail_cnt, entries}),
    .err_o(err), .red, .busy(red_busy));

  always_ff @(posedge tclkt or negedge rst_n) begin
    if (!rst_n)        done <= 1'b0;
    else if (start)    done <= 1'b0;
    else if (ctl_done) done <= 1'b1;
  end
endmodule
