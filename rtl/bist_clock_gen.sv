// bist_clock_gen: start and run control of the BIST in the TCLKT domain.
//
// BIST_ON comes from outside the chip and is asynchronous to the external
// test clock TCLKT. It passes a two-flop synchroniser; its rising edge gives
// a one-cycle `start` pulse, and `run` stays high from that pulse until the
// controller reports `done`. The whole BIST runs on TCLKT and uses `run` as
// its clock enable rather than a gated clock (a choice of this design; the
// block is only named as the BIST clock generator). A new test needs BIST_ON
// to go low and high again.
//
// Timing: `start` is high in the third TCLKT cycle after BIST_ON rises.
module bist_clock_gen (
  input  logic tclkt,
  input  logic rst_n,
  input  logic bist_on,
  input  logic done,
  output logic start,
  output logic run
);
  logic [1:0] sync;
  logic       on_d;

  always_ff @(posedge tclkt or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= '0;
      on_d  <= 1'b0;
      start <= 1'b0;
      run   <= 1'b0;
    end else begin
      sync  <= {sync[0], bist_on};
      on_d  <= sync[1];
      start <= sync[1] & ~on_d & ~run;
      if (start)     run <= 1'b1;
      else if (done) run <= 1'b0;
    end
  end
endmodule
