// spd_decision: slot timing and empty-slot decision of the slot period detector.
//
// The block does two jobs. First, it times the quarter symbols: a cycle
// counter splits every symbol into N_SLOTS slots of SLOT_LEN clocks. In the
// first cycle of each slot it asserts restart to the pulse counter and
// enables the slot register of the slot that has just ended (en_reg[k-1]
// for slot k, en_reg[N_SLOTS-1] at the start of the next symbol), so that
// register k holds the count C_k of slot k. Second, one cycle after the last
// register is loaded it compares the held counts and takes the slot with the
// largest count as the empty slot; its index is the detected 2-bit symbol.
// Symbol p of a word (p = 0 first) is written into data[2p+1:2p], so data
// fills from the least significant end and holds the whole word after the
// eighth symbol.
//
// Interface: start aligns the timer: the first slot of symbol 0 of a word
// begins in the cycle after start is sampled; a start in mid-symbol drops the
// partial symbol. r holds the four slot registers (r[0] = Reg1). Outputs:
// en_reg, restart, data (detected word), sym/sym_valid (each detected symbol,
// one-cycle strobe), word_valid (strobe with the eighth symbol of a word).
// Timing: sym_valid rises three cycles after the last cycle of a symbol.
//
// Following the reference receiver: four slot registers, largest count wins,
// 16-bit detected word filled pair by pair from bit 0. Own choices: the start
// input (the receiver needs symbol timing and the reference does not say how
// it gets it), SLOT_LEN, ties resolved toward the lower slot index, and the
// word register is only overwritten, never cleared, between words.
module spd_decision
  import ippm_pkg::*;
#(
  parameter int unsigned SLOT_LEN = SLOT_LEN_DEFAULT,
  parameter int unsigned CNT_W    = ippm_pkg::CNT_W_DEF,
  parameter int unsigned WORD_W   = ippm_pkg::WORD_W_DEF
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [N_SLOTS-1:0][CNT_W-1:0]     r,
  output logic [N_SLOTS-1:0]                en_reg,
  output logic                              restart,
  output logic [WORD_W-1:0]                 data,
  output sym_t                              sym,
  output logic                              sym_valid,
  output logic                              word_valid
);

  localparam int unsigned SYMS  = WORD_W / BITS_PER_SYM;
  localparam int unsigned TICK_W = (SLOT_LEN > 1) ? $clog2(SLOT_LEN) : 1;
  localparam int unsigned POS_W  = (SYMS > 1) ? $clog2(SYMS) : 1;

  logic              active;     // timer running
  logic [TICK_W-1:0] tick;       // cycle within the slot
  sym_t              slot;       // slot within the symbol
  logic [POS_W-1:0]  sym_pos;    // symbol within the word being received
  logic [POS_W-1:0]  dec_pos;    // position of the symbol being decided
  logic              full;       // first cycle after a complete symbol
  logic              decide;     // all four slot registers hold this symbol

  logic end_sym;
  assign end_sym = active && (slot == sym_t'(N_SLOTS-1)) && (tick == TICK_W'(SLOT_LEN-1));

  // Slot timer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      tick    <= '0;
      slot    <= '0;
      sym_pos <= '0;
      dec_pos <= '0;
      full    <= 1'b0;
      decide  <= 1'b0;
    end else begin
      full   <= end_sym;
      decide <= full;
      if (end_sym) dec_pos <= sym_pos;
      if (start) begin
        active  <= 1'b1;
        tick    <= '0;
        slot    <= '0;
        sym_pos <= '0;
      end else if (active) begin
        if (tick == TICK_W'(SLOT_LEN-1)) begin
          tick <= '0;
          slot <= slot + 1'b1;
          if (slot == sym_t'(N_SLOTS-1))
            sym_pos <= (sym_pos == POS_W'(SYMS-1)) ? '0 : sym_pos + 1'b1;
        end else begin
          tick <= tick + 1'b1;
        end
      end
    end
  end

  // Register enables and counter restart, in the first cycle of each slot
  always_comb begin
    en_reg  = '0;
    restart = !active || (tick == '0);
    if (active && tick == '0 && slot != '0)
      en_reg[slot - 1'b1] = 1'b1;
    if (full)
      en_reg[N_SLOTS-1] = 1'b1;
  end

  // Largest count wins; ties go to the lower slot index
  sym_t best;
  always_comb begin
    best = '0;
    for (int k = 1; k < N_SLOTS; k++)
      if (r[k] > r[best]) best = sym_t'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data       <= '0;
      sym        <= '0;
      sym_valid  <= 1'b0;
      word_valid <= 1'b0;
    end else begin
      sym_valid  <= decide;
      word_valid <= decide && (dec_pos == POS_W'(SYMS-1));
      if (decide) begin
        sym <= best;
        data[dec_pos*BITS_PER_SYM +: BITS_PER_SYM] <= best;
      end
    end
  end

  // The register of the last slot is loaded one cycle into the next symbol
  // and read one cycle later, so a slot must last at least two clocks.
  initial assert (SLOT_LEN >= 2) else $error("SLOT_LEN must be at least 2");

endmodule
