// tb_spd_ber_sweep: bit error rate of the slot period detector against
// Eb/N0, next to a correlator receiver.
//
// Random 2-bit symbols (on level A = 20 codes, off level 0, 8 clocks per
// slot) get white Gaussian noise and are quantised to 7-bit ADC codes
// (clipped to 0..127) for the receiver. Per sample, sigma^2 = Eb / (2 Eb/N0)
// with Eb = 3 * L * A^2 / 2, the energy of the three lit slots over two bits.
// The same noisy, unquantised samples feed a reference correlator in the
// testbench: it picks the slot with the smallest sum, which is what four
// matched filters against the four codewords decide. The sweep runs 0 to 16
// dB in 2 dB steps with 2000 symbols per point and prints both bit error
// rates.
//
// Checks: every slot count of the receiver against the testbench's own count
// of samples below the threshold; the receiver's error rate is high at 0 dB,
// falls with Eb/N0 (within statistical slack) and is near zero at 16 dB;
// the correlator makes fewer errors than the slot period detector overall
// and at 6, 8 and 10 dB, as expected of a receiver that uses the whole
// waveform rather than the time below threshold.
module tb_spd_ber_sweep;
  import ippm_pkg::*;
  localparam int unsigned L = 8;
  localparam int          A = 20;
  localparam int          NPTS = 9;
  localparam int          NSYM = 2000;
  localparam int          TOTAL = NPTS * NSYM;

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
  sym_t sent [TOTAL];
  sym_t corr_dec [TOTAL];
  int exp_cnt [TOTAL][N_SLOTS];
  int err_spd [NPTS], err_cor [NPTS];
  int n_dec = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  function automatic int popcount2(input sym_t v);
    return int'(v[0]) + int'(v[1]);
  endfunction

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    repeat (TOTAL * 4 * L + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && sym_valid && n_dec < TOTAL) begin
      int ok_cnt;
      ok_cnt = 1;
      for (int k = 0; k < N_SLOTS; k++)
        if (int'(counts[k]) != exp_cnt[n_dec][k]) ok_cnt = 0;
      check(ok_cnt == 1, $sformatf("symbol %0d slot counts", n_dec));
      err_spd[n_dec / NSYM] += popcount2(sym ^ sent[n_dec]);
      err_cor[n_dec / NSYM] += popcount2(corr_dec[n_dec] ^ sent[n_dec]);
      n_dec++;
    end
  end

  initial begin
    real ber_s [NPTS], ber_c [NPTS];
    int tot_s, tot_c;
    th = 7'd10;
    sample = 7'(A);
    hfp = 1'b1;
    for (int p = 0; p < NPTS; p++) begin err_spd[p] = 0; err_cor[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) start = 1;
    for (int n = 0; n < TOTAL; n++) begin
      real g, sigma, x;
      real sums [N_SLOTS];
      sym_t s;
      int best, code;
      g = 10.0 ** ((2.0 * real'(n / NSYM)) / 10.0);
      sigma = $sqrt(3.0 * real'(L) * real'(A * A) / (4.0 * g));
      s = sym_t'($urandom);
      sent[n] = s;
      for (int k = 0; k < N_SLOTS; k++) begin exp_cnt[n][k] = 0; sums[k] = 0.0; end
      for (int c = 0; c < int'(4 * L); c++) begin
        int slot;
        slot = c / int'(L);
        x = ((slot == int'(s)) ? 0.0 : real'(A)) + sigma * gauss();
        sums[slot] += x;
        code = $rtoi(x + 0.5);
        if (x < 0.0) code = 0;
        if (code > 127) code = 127;
        @(negedge clk);
        start = 0;
        sample = 7'(code);
        if (code < int'(th)) exp_cnt[n][slot]++;
      end
      best = 0;
      for (int k = 1; k < N_SLOTS; k++) if (sums[k] < sums[best]) best = k;
      corr_dec[n] = sym_t'(best);
    end
    @(negedge clk) sample = 7'(A);
    repeat (8) @(posedge clk);
    check(n_dec == TOTAL, $sformatf("decided %0d of %0d symbols", n_dec, TOTAL));
    tot_s = 0; tot_c = 0;
    $display("Eb/N0 dB   BER slot period detector   BER correlator");
    for (int p = 0; p < NPTS; p++) begin
      ber_s[p] = real'(err_spd[p]) / real'(2 * NSYM);
      ber_c[p] = real'(err_cor[p]) / real'(2 * NSYM);
      tot_s += err_spd[p];
      tot_c += err_cor[p];
      $display("%6d     %10.5f                 %10.5f", 2 * p, ber_s[p], ber_c[p]);
    end
    check(ber_s[0] > 0.15, "high error rate at 0 dB");
    for (int p = 1; p < NPTS; p++)
      check(ber_s[p] <= ber_s[p-1] + 0.02, $sformatf("error rate rises at %0d dB", 2 * p));
    check(ber_s[NPTS-1] < 0.002, "error rate near zero at 16 dB");
    check(tot_c < tot_s, $sformatf("correlator errors %0d, slot period detector %0d", tot_c, tot_s));
    for (int p = 3; p <= 5; p++)
      check(err_cor[p] < err_spd[p], $sformatf("correlator not better at %0d dB", 2 * p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
