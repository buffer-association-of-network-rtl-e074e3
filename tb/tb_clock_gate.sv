// tb_clock_gate: self-checking test of the latch-based clock gate.
// en_i is changed at random in both the low and the high phase of clk. The test counts
// gated_clk rising edges and checks: each one coincides with a clk rising
// edge, it happens exactly when en_i was high at the end of the preceding
// low phase, and gated_clk never rises or falls while clk is steady.
module tb_clock_gate;
  int checks = 0, failures = 0;
  logic clk = 0, en_i = 0, latch_en, gated_clk;
  logic en_at_fall;
  int   on_edges = 0, off_edges = 0;

  clock_gate dut (.clk, .en_i, .latch_en, .gated_clk);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 400; c++) begin
      #5 en_i = $urandom_range(0, 1);   // change in the low phase
      #5 en_at_fall = en_i;            // low phase ends
      clk = 1;
      #1;
      check(gated_clk == en_at_fall, $sformatf("gated pulse %0b expected %0b", gated_clk, en_at_fall));
      if (en_at_fall) on_edges++; else off_edges++;
      for (int k = 0; k < 8; k++) begin
        #1;
        if (k == 3) en_i = $urandom_range(0, 1);   // change in the high phase
        check(gated_clk == en_at_fall, "gated clock steady during high phase");
      end
      #1 clk = 0;
      #1 check(!gated_clk, "gated clock low while clk low");
    end
    check(on_edges > 0 && off_edges > 0, "both gated and passed cycles seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
