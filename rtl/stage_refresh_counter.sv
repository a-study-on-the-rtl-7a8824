// stage_refresh_counter: march stage counter and refresh counter.
//
// Stage part: `stage` (0..3) selects the march element being run and `bg` the
// background pass (0..1). `stage_clr` (and `clr`) restarts at stage 0 of
// pass 0; `adv` moves to
// the next stage, and from stage 3 to stage 0 of the next pass. `last` is high
// in stage 3 of pass 1.
//
// Refresh part: while `ref_en` is high a timer counts TCLKT cycles and wraps
// every REF_INT cycles; each wrap raises `ref_req`, which stays high until
// the controller answers with `ref_ack` when it queues the refresh. The
// timer keeps running while a request waits, so the refresh rate is exactly
// one per REF_INT cycles however long the controller takes to answer (as
// long as it answers within REF_INT cycles). Refreshes alternate between bank A and bank B
// (`ref_bank`), so each bank gets 512 of the 1024 refreshes every 16 ms that
// the memory needs; REF_INT = 1562 is 16 ms / 1024 at 100 MHz. `ref_count`
// counts issued refreshes since `clr`; `stage_clr` leaves the refresh part
// running.
module stage_refresh_counter #(
  parameter int unsigned REF_INT   = bist_pkg::SD_REF_INT,
  parameter int unsigned REF_CNT_W = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 stage_clr,
  input  logic                 adv,
  output logic [1:0]           stage,
  output logic                 bg,
  output logic                 last,
  input  logic                 ref_en,
  output logic                 ref_req,
  input  logic                 ref_ack,
  output logic                 ref_bank,
  output logic [REF_CNT_W-1:0] ref_count
);
  localparam int unsigned TMR_W = $clog2(REF_INT + 1);
  logic [TMR_W-1:0] tmr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
      bg    <= 1'b0;
    end else if (clr || stage_clr) begin
      stage <= '0;
      bg    <= 1'b0;
    end else if (adv) begin
      stage <= stage + 1'b1;
      if (stage == 2'd3) bg <= ~bg;
    end
  end

  assign last = (stage == 2'd3) && bg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr       <= '0;
      ref_req   <= 1'b0;
      ref_bank  <= 1'b0;
      ref_count <= '0;
    end else if (clr) begin
      tmr       <= '0;
      ref_req   <= 1'b0;
      ref_bank  <= 1'b0;
      ref_count <= '0;
    end else begin
      if (ref_ack && ref_req) begin
        ref_req   <= 1'b0;
        ref_bank  <= ~ref_bank;
        ref_count <= ref_count + 1'b1;
      end
      if (ref_en) begin
        if (tmr == TMR_W'(REF_INT - 1)) begin
          tmr     <= '0;
          ref_req <= 1'b1;
        end else begin
          tmr <= tmr + 1'b1;
        end
      end
    end
  end
endmodule
