// tb_spd_demodulator: slot period detector fed with synthetic ADC samples.
// The testbench builds I-PPM symbols itself (on level 20 codes, off level 0,
// optional uniform noise, threshold 10) and drives a random pulse strobe.
// From the samples it drives, it counts for every slot the cycles with
// sample < th and hfp = 1; that count must appear in the slot registers, the
// detected symbol must be the slot with the largest count and, for the
// noise-limited runs, the symbol that was sent. Words must come out whole
// with word_valid. Runs: the reference simulation word 1101100001100011
// without noise, random words with noise, and random words with hfp held at 1.
module tb_spd_demodulator;
  import ippm_pkg::*;
  localparam int unsigned L = 20;
  localparam int unsigned MAXSYM = 64;

  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] sample, th;
  logic hfp, e, sym_valid, word_valid;
  logic [15:0] data;
  sym_t sym;
  logic [N_SLOTS-1:0][7:0] counts;

  spd_demodulator #(.SLOT_LEN(L)) dut (
    .clk, .rst_n, .start, .sample, .th, .hfp, .e, .data, .sym, .sym_valid,
    .word_valid, .counts);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_cnt [MAXSYM][N_SLOTS];
  sym_t sent [MAXSYM];
  int n_dec = 0, n_words = 0, n_sent = 0;
  logic [15:0] sent_words [MAXSYM/8];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check every decided symbol against the testbench's own slot counts
  always @(negedge clk) begin
    if (rst_n && sym_valid) begin
      int b;
      b = 0;
      for (int k = 1; k < N_SLOTS; k++) if (exp_cnt[n_dec][k] > exp_cnt[n_dec][b]) b = k;
      for (int k = 0; k < N_SLOTS; k++)
        check(int'(counts[k]) == exp_cnt[n_dec][k],
              $sformatf("symbol %0d slot %0d count %0d expected %0d", n_dec, k, counts[k], exp_cnt[n_dec][k]));
      check(sym == sym_t'(b), $sformatf("symbol %0d decided %0d expected %0d", n_dec, sym, b));
      check(sym == sent[n_dec], $sformatf("symbol %0d decided %0d sent %0d", n_dec, sym, sent[n_dec]));
      check(word_valid == (n_dec % 8 == 7), "word_valid");
      if (word_valid) begin
        check(data == sent_words[n_dec / 8], $sformatf("word %h sent %h", data, sent_words[n_dec / 8]));
        n_words++;
      end
      n_dec++;
    end
  end

  // Drive one word, LSB pair first; noise is the half-width of uniform noise,
  // hfp_mode 0 = random strobe, 1 = every cycle
  task automatic drive_word(input logic [15:0] w, input int noise, input int hfp_mode);
    sent_words[n_sent / 8] = w;
    for (int p = 0; p < 8; p++) begin
      sym_t s;
      s = sym_t'(w[2*p +: 2]);
      sent[n_sent] = s;
      for (int k = 0; k < N_SLOTS; k++) exp_cnt[n_sent][k] = 0;
      for (int c = 0; c < int'(4*L); c++) begin
        int slot, lvl;
        slot = c / L;
        lvl = (slot == int'(s)) ? 0 : 20;
        if (noise > 0) lvl += int'($urandom % (2*noise + 1)) - noise;
        if (lvl < 0) lvl = 0;
        @(negedge clk);
        start = 0;
        sample = 7'(lvl);
        hfp = (hfp_mode == 1) ? 1'b1 : (($urandom % 4) != 0);
        if (lvl < int'(th) && hfp) exp_cnt[n_sent][slot]++;
      end
      n_sent++;
    end
  endtask

  initial begin
    th = 7'd10;
    sample = 7'd20;
    hfp = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    @(negedge clk) start = 1;
    drive_word(16'b1101100001100011, 0, 0);
    for (int i = 0; i < 3; i++) drive_word(16'($urandom), 8, 0);
    for (int i = 0; i < 3; i++) drive_word(16'($urandom), 0, 1);
    @(negedge clk) sample = 7'd20;
    repeat (4*L) @(posedge clk);
    check(n_dec >= n_sent, $sformatf("decided %0d of %0d symbols", n_dec, n_sent));
    check(n_words == n_sent / 8, "words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
