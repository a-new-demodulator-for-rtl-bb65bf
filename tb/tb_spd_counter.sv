// tb_spd_counter: random test of the gated pulse counter.
// restart, e and hfp are driven at random; a reference count (restart loads
// e&hfp, otherwise add e&hfp, holding at the maximum) is compared with q
// every cycle. A long run with e = hfp = 1 and no restart checks that the
// count saturates.
module tb_spd_counter;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0;
  logic restart, e, hfp;
  logic [W-1:0] q;
  int ref_q;
  int checks = 0, failures = 0, saturated = 0;

  spd_counter #(.CNT_W(W)) dut (.clk, .rst_n, .restart, .e, .hfp, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic ee, input logic h);
    restart = r; e = ee; hfp = h;
    @(posedge clk);
    if (r) ref_q = int'(ee & h);
    else if ((ee & h) && ref_q < (1 << W) - 1) ref_q++;
    #1;
    checks++;
    if (q !== W'(ref_q)) begin
      failures++;
      if (failures < 10) $display("FAIL q=%0d expected %0d", q, ref_q);
    end
    if (ref_q == (1 << W) - 1) saturated++;
  endtask

  initial begin
    restart = 0; e = 0; hfp = 0; ref_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (q !== '0) failures++;
    for (int i = 0; i < 3000; i++)
      step(($urandom % 40) == 0, ($urandom % 4) != 0, ($urandom % 3) != 0);
    step(1, 1, 1);
    for (int i = 0; i < 300; i++) step(0, 1, 1);
    if (saturated == 0) begin
      failures++;
      $display("FAIL counter never reached its maximum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
