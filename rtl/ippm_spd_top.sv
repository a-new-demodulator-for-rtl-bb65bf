// ippm_spd_top: I-PPM visible light link with a slot period detector receiver.
//
// Transmit side: the I-PPM modulator turns 16-bit words into a light on/off
// signal (tx_ippm) that drives the LED. Receive side: the photodetector and
// ADC, which are outside this logic, return one sample per clock on
// rx_sample; the slot period detector recovers the words from it. The two
// sides share a clock but are joined only through the off-chip optical path,
// so a loop-back test connects tx_ippm to rx_sample through a model of that
// path.
//
// Interface: tx_start/tx_data/tx_busy/tx_ippm/tx_sym/tx_sym_first as in
// ippm_modulator; rx_start, rx_sample, rx_hfp and the rx_* outputs as in
// spd_demodulator. The threshold is the parameter TH (10 ADC codes, the
// value of the reference FPGA build, meant as half the received "on"
// level). Both sides use SLOT_LEN clocks per slot.
module ippm_spd_top
  import ippm_pkg::*;
#(
  parameter int unsigned SLOT_LEN = SLOT_LEN_DEFAULT,
  parameter int unsigned TH       = TH_DEFAULT
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // transmitter
  input  logic                          tx_start,
  input  logic [WORD_W_DEF-1:0]             tx_data,
  output logic                          tx_busy,
  output logic                          tx_ippm,
  output sym_t                          tx_sym,
  output logic                          tx_sym_first,
  // receiver
  input  logic                          rx_start,
  input  logic [ADC_W_DEF-1:0]              rx_sample,
  input  logic                          rx_hfp,
  output logic                          rx_e,
  output logic [WORD_W_DEF-1:0]             rx_data,
  output sym_t                          rx_sym,
  output logic                          rx_sym_valid,
  output logic                          rx_word_valid,
  output logic [N_SLOTS-1:0][CNT_W_DEF-1:0] rx_counts
);

  ippm_modulator #(.SLOT_LEN(SLOT_LEN)) u_mod (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (tx_start),
    .data      (tx_data),
    .busy      (tx_busy),
    .ippm      (tx_ippm),
    .sym       (tx_sym),
    .sym_first (tx_sym_first)
  );

  spd_demodulator #(.SLOT_LEN(SLOT_LEN)) u_spd (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (rx_start),
    .sample     (rx_sample),
    .th         (ADC_W_DEF'(TH)),
    .hfp        (rx_hfp),
    .e          (rx_e),
    .data       (rx_data),
    .sym        (rx_sym),
    .sym_valid  (rx_sym_valid),
    .word_valid (rx_word_valid),
    .counts     (rx_counts)
  );

endmodule
