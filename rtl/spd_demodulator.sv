// spd_demodulator: slot period detector (SPD) receiver for 2-bit I-PPM.
//
// Instead of correlating the received signal with four reference waveforms,
// the receiver measures how long the signal stays dark in each quarter
// symbol. The comparator flags samples below the threshold; the counter
// counts high frequency pulses while the flag is set; at the end of every
// quarter symbol the count is parked in one of four slot registers; once all
// four are loaded the decision block takes the slot with the largest count as
// the empty slot and its index as the two received bits. The chain is the
// reference receiver's: ADC sample -> comparator -> counter -> Reg1..Reg4 ->
// decision.
//
// Interface: sample is the ADC code, one per clock; th is the threshold
// (half the "on" level); hfp is a pulse strobe (1 = count this clock; tie to
// 1 to count every clock); start aligns the symbol timer (first slot begins
// the cycle after start). Outputs: e (comparator), data (detected 16-bit
// word, filled from bit 0), sym/sym_valid (each detected symbol),
// word_valid (eighth symbol of a word), counts (the four slot registers).
// Timing: sym_valid rises three cycles after the last sample of a symbol.
module spd_demodulator
  import ippm_pkg::*;
#(
  parameter int unsigned SLOT_LEN = SLOT_LEN_DEFAULT,
  parameter int unsigned ADC_W    = ippm_pkg::ADC_W_DEF,
  parameter int unsigned CNT_W    = ippm_pkg::CNT_W_DEF,
  parameter int unsigned WORD_W   = ippm_pkg::WORD_W_DEF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [ADC_W-1:0]              sample,
  input  logic [ADC_W-1:0]              th,
  input  logic                          hfp,
  output logic                          e,
  output logic [WORD_W-1:0]             data,
  output sym_t                          sym,
  output logic                          sym_valid,
  output logic                          word_valid,
  output logic [N_SLOTS-1:0][CNT_W-1:0] counts
);

  logic [CNT_W-1:0]   q;
  logic               restart;
  logic [N_SLOTS-1:0] en_reg;

  spd_comparator #(.ADC_W(ADC_W)) u_comp (
    .sample (sample),
    .th     (th),
    .e      (e)
  );

  spd_counter #(.CNT_W(CNT_W)) u_counter (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (restart),
    .e       (e),
    .hfp     (hfp),
    .q       (q)
  );

  for (genvar k = 0; k < N_SLOTS; k++) begin : g_reg
    spd_slot_reg #(.W(CNT_W)) u_reg (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en_reg[k]),
      .d     (q),
      .q     (counts[k])
    );
  end

  spd_decision #(
    .SLOT_LEN (SLOT_LEN),
    .CNT_W    (CNT_W),
    .WORD_W   (WORD_W)
  ) u_decision (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .r          (counts),
    .en_reg     (en_reg),
    .restart    (restart),
    .data       (data),
    .sym        (sym),
    .sym_valid  (sym_valid),
    .word_valid (word_valid)
  );

endmodule
