// tb_ltr_delay: self-checking test of the LTR hold-off counter.
// For every hold-off value 0..15 a flit is made available and the cycles
// until ltr_zero are counted: they must equal ltr_value. ltr_zero must then
// stay high until the grant, and the next flit must wait the full hold-off
// again.
module tb_ltr_delay;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic ltr_avail, ltr_gnt, ltr_zero;
  logic [3:0] ltr_value, ltr_count;

  ltr_delay #(.LTR_W(4)) dut (.clk, .rst, .ltr_avail, .ltr_value, .ltr_gnt, .ltr_zero, .ltr_count);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_cycles;
    ltr_avail = 0; ltr_gnt = 0; ltr_value = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int v = 0; v < 16; v++) begin
      ltr_value = 4'(v);
      for (int f = 0; f < 2; f++) begin       // two back-to-back flits
        ltr_avail = 1;
        wait_cycles = 0;
        #1;
        while (!ltr_zero && wait_cycles < 40) begin
          @(negedge clk); #1; wait_cycles++;
        end
        check(wait_cycles == v, $sformatf("value %0d flit %0d waited %0d", v, f, wait_cycles));
        // hold without grant: must stay ready
        repeat (2) begin @(negedge clk); #1; check(ltr_zero, "stays ready until granted"); end
        ltr_gnt = 1;
        @(negedge clk);
        ltr_gnt = 0;
      end
      ltr_avail = 0;
      #1 check(!ltr_zero, "not ready without a flit");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
