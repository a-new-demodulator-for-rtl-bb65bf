// ippm_pkg: constants and helpers shared by the I-PPM modulator and the
// slot period detector (SPD) receiver.
//
// I-PPM with n bits per symbol divides a symbol of period Tb into 2^n slots.
// The light is on (level V) in every slot except slot i, where i is the
// unsigned value of the symbol's bits; slot 0 is sent first. This design uses
// n = 2 (four slots per symbol), as in the 2-bit grouping of the reference
// simulation, and a 16-bit data word carried as eight symbols, least
// significant pair first. The 16-bit word, 8-bit counter, 7-bit ADC sample
// and threshold value 10 are the sizes of the reference FPGA schematic; the
// slot length is this design's own choice.
package ippm_pkg;

  localparam int unsigned BITS_PER_SYM = 2;                  // n
  localparam int unsigned N_SLOTS      = 1 << BITS_PER_SYM;  // 2^n slots per symbol
  localparam int unsigned WORD_W_DEF    = 16;                 // data[15..0]
  localparam int unsigned CNT_W_DEF     = 8;                  // counter q[7..0]
  localparam int unsigned ADC_W_DEF     = 7;                  // digital[6..0]
  localparam int unsigned TH_DEFAULT   = 10;                 // datab[] = 10
  localparam int unsigned SLOT_LEN_DEFAULT = 200;            // clocks per slot (own choice)

  typedef logic [BITS_PER_SYM-1:0] sym_t;
  typedef logic [N_SLOTS-1:0]      codeword_t;

  // Codeword of symbol i: bit k is the light level during slot k (bit 0 is
  // sent first). All slots are on except slot i.
  function automatic codeword_t ippm_codeword(input sym_t i);
    codeword_t cw;
    cw = '1;
    cw[i] = 1'b0;
    return cw;
  endfunction

endpackage
