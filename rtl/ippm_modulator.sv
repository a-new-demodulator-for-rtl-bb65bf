// ippm_modulator: mux-based inverse pulse position modulator.
//
// Splits a WORD_W-bit word into 2-bit symbols, least significant pair first,
// and sends each as one I-PPM symbol of N_SLOTS slots of SLOT_LEN clocks. The
// output is the light level: 1 (on) in every slot except slot i, where i is
// the symbol's value, which is dark. The symbol value selects its codeword
// from a table (a multiplexer over the four codewords) and the slot counter
// selects the bit of that codeword that is sent. Between words the light
// stays on.
//
// Interface: start (sampled at a clock edge) loads data; the first slot
// begins in the next cycle and the word takes (WORD_W / 2) * N_SLOTS *
// SLOT_LEN cycles. A start in the last cycle of a word sends the next word
// back to back; a start at any other time restarts with the new word.
// busy is 1 while a word is sent; sym is the symbol being sent (the grouped
// data) and sym_first marks the first cycle of each symbol.
//
// Following the reference: the codeword rule (slot i empty for symbol i,
// slot 0 first), two bits per symbol, the 16-bit word and its LSB-first
// grouping. Own choices: the start/busy handshake, the idle level and
// SLOT_LEN.
module ippm_modulator
  import ippm_pkg::*;
#(
  parameter int unsigned SLOT_LEN = SLOT_LEN_DEFAULT,
  parameter int unsigned WORD_W   = ippm_pkg::WORD_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [WORD_W-1:0] data,
  output logic              busy,
  output logic              ippm,
  output sym_t              sym,
  output logic              sym_first
);

  localparam int unsigned SYMS   = WORD_W / BITS_PER_SYM;
  localparam int unsigned TICK_W = (SLOT_LEN > 1) ? $clog2(SLOT_LEN) : 1;
  localparam int unsigned POS_W  = (SYMS > 1) ? $clog2(SYMS) : 1;

  logic [WORD_W-1:0] word;
  logic [TICK_W-1:0] tick;
  sym_t              slot;
  logic [POS_W-1:0]  pos;

  logic last_tick, last_slot, last_sym;
  assign last_tick = (tick == TICK_W'(SLOT_LEN-1));
  assign last_slot = (slot == sym_t'(N_SLOTS-1));
  assign last_sym  = (pos == POS_W'(SYMS-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      word <= '0;
      tick <= '0;
      slot <= '0;
      pos  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      word <= data;
      tick <= '0;
      slot <= '0;
      pos  <= '0;
    end else if (busy) begin
      if (!last_tick) begin
        tick <= tick + 1'b1;
      end else begin
        tick <= '0;
        slot <= slot + 1'b1;
        if (last_slot) begin
          pos <= pos + 1'b1;
          if (last_sym) busy <= 1'b0;
        end
      end
    end
  end

  // Codeword table and slot multiplexer
  codeword_t table_q [N_SLOTS];
  always_comb begin
    for (int k = 0; k < N_SLOTS; k++)
      table_q[k] = ippm_codeword(sym_t'(k));
  end

  assign sym       = word[pos*BITS_PER_SYM +: BITS_PER_SYM];
  assign sym_first = busy && (slot == '0) && (tick == '0);
  assign ippm      = busy ? table_q[sym][slot] : 1'b1;

endmodule
