// tb_ippm_modulator: checks the I-PPM waveform cycle by cycle.
// For each word the expected light level at cycle c after start is worked
// out from the rule "symbol p = bits [2p+1:2p], slot (c / L) % 4 is dark
// exactly when it equals the symbol". Also checked: busy for 8 * 4 * L
// cycles, the grouped symbol output, light on when idle, a back-to-back word
// (start in the last cycle of a word) and the word of the reference
// simulation, 1101100001100011.
module tb_ippm_modulator;
  import ippm_pkg::*;
  localparam int unsigned L = 3;
  localparam int unsigned WORD_CYC = 8 * 4 * L;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] data;
  logic busy, ippm, sym_first;
  sym_t sym;
  int checks = 0, failures = 0, back_to_back = 0;

  ippm_modulator #(.SLOT_LEN(L), .WORD_W(16)) dut (
    .clk, .rst_n, .start, .data, .busy, .ippm, .sym, .sym_first);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send word w; if next_valid, assert start for next_w in the last cycle.
  task automatic send(input logic [15:0] w, input bit chain, input logic [15:0] next_w);
    for (int c = 0; c < int'(WORD_CYC); c++) begin
      int p, slot, s;
      @(negedge clk);
      start = 0;
      p = c / (4*L);
      slot = (c / L) % 4;
      s = int'(w[2*p +: 2]);
      check(busy, "busy low during a word");
      check(ippm == (slot != s), $sformatf("word %h cycle %0d: ippm=%0b", w, c, ippm));
      check(sym == sym_t'(s), "grouped symbol");
      check(sym_first == (c % (4*L) == 0), "sym_first");
      if (chain && c == int'(WORD_CYC) - 1) begin
        start = 1;
        data = next_w;
        back_to_back++;
      end
    end
  endtask

  initial begin
    data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) begin
      @(negedge clk);
      check(!busy && ippm, "idle light on");
    end
    // reference simulation word
    @(negedge clk); start = 1; data = 16'b1101100001100011;
    send(16'b1101100001100011, 0, '0);
    @(negedge clk);
    check(!busy && ippm, "idle after word");
    // random words, the last two back to back
    for (int i = 0; i < 6; i++) begin
      logic [15:0] w1, w2;
      w1 = 16'($urandom);
      w2 = 16'($urandom);
      @(negedge clk); start = 1; data = w1;
      send(w1, 1, w2);
      send(w2, 0, '0);
      @(negedge clk);
      check(!busy && ippm, "idle after word");
    end
    check(back_to_back > 0, "back-to-back words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
