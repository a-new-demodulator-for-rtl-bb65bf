// tb_spd_slot_reg: random test of the enabled slot register.
// d and en are driven at random; q must take d after a cycle with en = 1 and
// hold otherwise.
module tb_spd_slot_reg;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0;
  logic en;
  logic [W-1:0] d, q, ref_q;
  int checks = 0, failures = 0;

  spd_slot_reg #(.W(W)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; d = '0; ref_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom % 4) == 0;
      d  = W'($urandom);
      @(posedge clk);
      if (en) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL q=%0d expected %0d", q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
