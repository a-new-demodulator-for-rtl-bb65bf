// tb_spd_decision: slot timing and decision test.
// The testbench plays the counter and the four slot registers: when the
// block enables register k it loads the count chosen for that slot of that
// symbol. Checked every cycle against the cycle count since start: the
// register enables (end of each slot), the counter restart (first cycle of
// each slot), and, three cycles after each symbol, the detected symbol
// (largest count, lower slot on a tie), its place in the data word, the
// word strobe and the whole word. A second start in mid-symbol checks that
// the timer realigns and the partial symbol is dropped.
module tb_spd_decision;
  import ippm_pkg::*;
  localparam int unsigned L    = 5;
  localparam int unsigned NSYM = 20;
  localparam int unsigned CW   = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N_SLOTS-1:0][CW-1:0] r;
  logic [N_SLOTS-1:0] en_reg;
  logic restart;
  logic [15:0] data;
  sym_t sym;
  logic sym_valid, word_valid;

  spd_decision #(.SLOT_LEN(L), .CNT_W(CW), .WORD_W(16)) dut (
    .clk, .rst_n, .start, .r, .en_reg, .restart, .data, .sym, .sym_valid, .word_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, ties = 0, words = 0, syms_seen = 0;
  int c;                       // cycle since start (0 = first slot cycle)
  bit running = 0;
  logic [CW-1:0] vals [NSYM][N_SLOTS];
  logic [15:0] exp_word;

  function automatic int argmax(int s);
    int b = 0;
    for (int k = 1; k < N_SLOTS; k++) if (vals[s][k] > vals[s][b]) b = k;
    return b;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL c=%0d %s", c, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Register model: load the chosen count of the slot that just ended
  always @(posedge clk) begin
    if (running) begin
      for (int k = 0; k < N_SLOTS - 1; k++)
        if (en_reg[k]) r[k] <= vals[(c / (4*L)) % NSYM][k];
      if (en_reg[N_SLOTS-1] && c >= int'(4*L))
        r[N_SLOTS-1] <= vals[(c / (4*L) - 1) % NSYM][N_SLOTS-1];
    end
    if (start) c <= 0; else c <= c + 1;
  end

  // Per-cycle checks, half a cycle after the edge
  always @(negedge clk) begin
    if (running && c <= int'(NSYM*4*L) + 2) begin
      logic [N_SLOTS-1:0] en_exp;
      en_exp = '0;
      if (c % L == 0 && (c / L) % 4 != 0) en_exp[(c / L) % 4 - 1] = 1'b1;
      if (c % (4*L) == 0 && c > 0) en_exp[N_SLOTS-1] = 1'b1;
      check(en_reg == en_exp, $sformatf("en_reg=%b expected %b", en_reg, en_exp));
      check(restart == (c % L == 0), "restart");
      if (c >= int'(4*L) + 2 && (c - 2) % (4*L) == 0) begin
        int s, b;
        s = (c - 2) / (4*L) - 1;
        b = argmax(s);
        exp_word[2*(s % 8) +: 2] = 2'(b);
        syms_seen++;
        check(sym_valid, "sym_valid missing");
        check(sym == sym_t'(b), $sformatf("symbol %0d: got %0d expected %0d", s, sym, b));
        check(data[2*(s % 8) +: 2] == 2'(b), "data position");
        check(word_valid == (s % 8 == 7), "word_valid");
        if (s % 8 == 7) begin
          words++;
          check(data == exp_word, $sformatf("word %h expected %h", data, exp_word));
        end
      end else begin
        check(!sym_valid && !word_valid, "unexpected strobe");
      end
    end
  end

  task automatic fill_vals();
    for (int s = 0; s < NSYM; s++) begin
      for (int k = 0; k < N_SLOTS; k++) vals[s][k] = CW'($urandom % 200);
      if (s % 4 == 1) begin    // a tie for the largest count
        int a = $urandom % 3;
        vals[s][a] = 8'd250;
        vals[s][a + 1 + ($urandom % (3 - a))] = 8'd250;
        ties++;
      end else begin
        vals[s][$urandom % 4] = 8'd230;
      end
    end
  endtask

  initial begin
    r = '0;
    exp_word = '0;
    c = 0;
    fill_vals();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // before start nothing may be enabled or decided
    repeat (10) begin
      @(negedge clk);
      check(en_reg == '0 && !sym_valid, "idle");
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    running = 1;
    repeat (NSYM*4*L + 4) @(posedge clk);
    // second stream, started in the middle of a symbol
    repeat (2*L + 1) @(posedge clk);
    running = 0;
    fill_vals();
    exp_word = data;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    running = 1;
    repeat (NSYM*4*L + 4) @(posedge clk);
    check(syms_seen == 2*NSYM, $sformatf("symbols decided %0d", syms_seen));
    check(words >= 4, "words");
    check(ties > 0, "ties exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
