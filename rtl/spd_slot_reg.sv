// spd_slot_reg: slot register ("Reg1".."Reg4") of the slot period detector.
//
// Holds the count C_k of one quarter symbol for the decision block. It loads
// d at the clock edge of a cycle in which en is 1 and keeps its value
// otherwise, like an enabled D flip-flop bank.
//
// Interface: clk, rst_n (asynchronous, active low, clears to 0), en, d, q.
// Timing: q shows the loaded value one cycle after en.
module spd_slot_reg #(
  parameter int unsigned W = ippm_pkg::CNT_W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
