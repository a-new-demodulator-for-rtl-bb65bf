// spd_counter: high frequency pulse counter of the slot period detector.
//
// Counts the high frequency pulses (hfp) that arrive while the comparator
// output e is 1; this is the AND of e and the pulse train. The count is the
// slot period C_k of one quarter symbol. The decision block asserts restart
// in the first cycle of every slot: the counter then drops the old count and
// starts again from this cycle's pulse, so no pulse is lost at a slot edge.
//
// Interface: clk, rst_n (asynchronous, active low), restart, e, hfp
// (one-cycle pulse strobe, tie to 1 to count every clock), q (count).
// Timing: q is registered; a pulse counted in cycle t shows in q at t+1.
// Own choices: the counter saturates at its maximum instead of wrapping, so
// an over-long slot still reads as the largest count; restart is synchronous.
module spd_counter #(
  parameter int unsigned CNT_W = ippm_pkg::CNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             e,
  input  logic             hfp,
  output logic [CNT_W-1:0] q
);

  logic inc;
  assign inc = e & hfp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= '0;
    else if (restart)
      q <= CNT_W'(inc);
    else if (inc && (q != '1))
      q <= q + 1'b1;
  end

endmodule
