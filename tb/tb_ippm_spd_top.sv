// tb_ippm_spd_top: end-to-end loop-back of the I-PPM link at its default
// parameters (200 clocks per slot, threshold 10).
// The modulator's light output goes through a model of the optical path and
// ADC: a delay of D clocks, on level 20 / off level 0 codes and uniform
// noise. The receiver is started D clocks after the transmitter so that its
// slots line up with the delayed signal (one run starts it early instead, to
// show that a small offset is tolerated). Every word sent must come back
// whole, one symbol every 4 * 200 clocks, and each symbol three clocks after
// its last sample. Counted, and required at least once: each of the four
// symbol values, noise flipping the comparator, pulse-strobe gaps while the
// signal is dark, back-to-back words and the offset run.
module tb_ippm_spd_top;
  import ippm_pkg::*;
  localparam int unsigned L = SLOT_LEN_DEFAULT;
  localparam int unsigned D = 6;       // channel delay in clocks
  localparam int unsigned NWORDS = 12;

  logic clk = 0, rst_n = 0;
  logic tx_start = 0, tx_busy, tx_ippm, tx_sym_first;
  logic [15:0] tx_data = '0;
  sym_t tx_sym;
  logic rx_start = 0, rx_hfp = 1, rx_e, rx_sym_valid, rx_word_valid;
  logic [6:0] rx_sample = 7'd20;
  logic [15:0] rx_data;
  sym_t rx_sym;
  logic [N_SLOTS-1:0][7:0] rx_counts;

  ippm_spd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int noise = 0;
  longint start_cyc = 0;
  bit early = 0;
  logic [15:0] words [NWORDS];
  int n_rx_words = 0, n_syms = 0;
  int sym_hist [N_SLOTS];
  int noise_flips = 0, hfp_gaps = 0, b2b = 0, offset_runs = 0;
  longint cyc = 0, last_sym_cyc = -1;
  bit last_was_word_end = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (NWORDS * 8 * 4 * L + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Optical path and ADC model: delay line, levels, noise
  logic [D-1:0] dly;
  logic         start_dly [D];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    dly <= {dly[D-2:0], tx_ippm};
    for (int i = D - 1; i > 0; i--) start_dly[i] <= start_dly[i-1];
    start_dly[0] <= tx_start;
  end
  always @(negedge clk) begin
    int lvl;
    lvl = dly[D-1] ? 20 : 0;
    if (noise > 0) lvl += int'($urandom % (2*noise + 1)) - noise;
    if (lvl < 0) lvl = 0;
    rx_sample = 7'(lvl);
    rx_hfp = ($urandom % 8) != 0;
    rx_start = early ? tx_start : start_dly[D-1];
  end

  // Mechanism counters on the received side
  always @(posedge clk) if (rst_n) begin
    if (rx_e && !dly[D-1] && !rx_hfp) hfp_gaps++;
    if (rx_e && dly[D-1]) noise_flips++;
  end

  // Received symbols and words
  always @(negedge clk) if (rst_n && rx_sym_valid) begin
    sym_hist[rx_sym]++;
    // within a word, one symbol every 4 * L clocks
    if (last_sym_cyc >= 0 && !last_was_word_end && last_sym_cyc > start_cyc + 3)
      check(cyc - last_sym_cyc == 4 * L, $sformatf("symbol interval %0d", cyc - last_sym_cyc));
    last_sym_cyc = cyc;
    last_was_word_end = rx_word_valid;
    n_syms++;
    if (rx_word_valid) begin
      check(rx_data == words[n_rx_words], $sformatf("word %0d: got %h sent %h", n_rx_words, rx_data, words[n_rx_words]));
      n_rx_words++;
    end
  end

  // Latency: the receiver's first slot begins the clock after rx_start, so
  // the last sample of every symbol is a multiple of 4 * L clocks after the
  // rx_start clock, and the symbol must be out three clocks later.

  int lat_checks = 0;
  always @(posedge clk) if (rx_start) start_cyc <= cyc;
  always @(negedge clk) begin
    if (rst_n && rx_sym_valid) begin
      check((cyc - start_cyc - 3) % (4 * L) == 0 && cyc - start_cyc >= 3,
            $sformatf("latency: symbol out %0d clocks after rx_start", cyc - start_cyc));
      lat_checks++;
    end
  end

  task automatic send_word(input int idx, input bit back_to_back);
    words[idx] = (idx == 0) ? 16'b1101100001100011 : 16'($urandom);
    if (!back_to_back) @(negedge clk);
    tx_data  = words[idx];
    tx_start = 1;
    @(negedge clk);
    tx_start = 0;
    // wait to the last cycle of the word
    repeat (8 * 4 * L - 2) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < N_SLOTS; k++) sym_hist[k] = 0;
    dly = '1;
    for (int i = 0; i < int'(D); i++) start_dly[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    // clean channel, separate words
    send_word(0, 0);
    send_word(1, 0);
    // noisy channel, back-to-back words
    noise = 12;
    send_word(2, 0);
    for (int i = 3; i < 8; i++) begin
      @(negedge clk);
      send_word(i, 1);
      b2b++;
    end
    // receiver started early: its slots lead the signal by D clocks
    noise = 4;
    repeat (3 * 4 * L) @(negedge clk);
    early = 1;
    offset_runs++;
    for (int i = 8; i < int'(NWORDS); i++) send_word(i, 0);
    repeat (2 * L) @(negedge clk);
    check(n_rx_words == NWORDS, $sformatf("received %0d of %0d words", n_rx_words, NWORDS));
    for (int k = 0; k < N_SLOTS; k++)
      check(sym_hist[k] > 0, $sformatf("symbol value %0d never decided", k));
    check(noise_flips > 0, "noise never flipped the comparator");
    check(hfp_gaps > 0, "no strobe gaps while dark");
    check(b2b > 0, "no back-to-back words");
    check(offset_runs > 0, "no offset run");
    check(lat_checks >= int'(NWORDS) * 8, "latency checks");
    $display("symbols %0d (%0d/%0d/%0d/%0d), noise flips %0d, strobe gaps %0d, back-to-back %0d",
             n_syms, sym_hist[0], sym_hist[1], sym_hist[2], sym_hist[3], noise_flips, hfp_gaps, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
