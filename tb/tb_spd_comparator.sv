// tb_spd_comparator: exhaustive test of the threshold comparator.
// Every pair (sample, th) of 7-bit codes is applied and e is compared with
// the rule e = 1 exactly when sample < th.
module tb_spd_comparator;
  localparam int unsigned W = 7;
  logic [W-1:0] sample, th;
  logic         e;
  int checks = 0, failures = 0;

  spd_comparator #(.ADC_W(W)) dut (.sample(sample), .th(th), .e(e));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < (1 << W); t++) begin
      for (int s = 0; s < (1 << W); s++) begin
        sample = W'(s);
        th     = W'(t);
        #1;
        checks++;
        if (e !== (s < t)) begin
          failures++;
          if (failures < 10) $display("FAIL sample=%0d th=%0d e=%0b", s, t, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
