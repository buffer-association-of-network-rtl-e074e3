// tb_slot_state_table: self-checking test of the slot state table.
// A model array of occupied flags predicts the offered slot (lowest free),
// any_free and the occupied count while random allocations and releases of
// occupied slots run, including cycles doing both and runs to a full table.
module tb_slot_state_table;
  localparam int S = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic alloc, release_en, any_free;
  logic [2:0] release_slot, free_slot;
  logic [3:0] used;
  bit   occ [S];
  int   nused, exp_free, fulls;

  slot_state_table #(.SLOTS(S)) dut (.clk, .rst, .alloc, .release_en, .release_slot, .free_slot, .any_free, .used);

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
    alloc = 0; release_en = 0; release_slot = 0; fulls = 0;
    foreach (occ[s]) occ[s] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      int r;
      exp_free = -1; nused = 0;
      for (int s = S - 1; s >= 0; s--) if (!occ[s]) exp_free = s;
      foreach (occ[s]) nused += occ[s];
      if (exp_free < 0) fulls++;
      check(any_free == (exp_free >= 0), "any_free");
      if (exp_free >= 0) check(free_slot == 3'(exp_free), $sformatf("free_slot %0d exp %0d", free_slot, exp_free));
      check(used == 4'(nused), "used count");
      // bias towards filling in the first half, draining in the second
      alloc = (exp_free >= 0) && ($urandom_range(0, 9) < ((t % 200) < 100 ? 8 : 3));
      release_en = 0;
      if (nused > 0 && $urandom_range(0, 9) < ((t % 200) < 100 ? 3 : 8)) begin
        do r = $urandom_range(0, S - 1); while (!occ[r]);
        release_en = 1; release_slot = 3'(r);
      end
      @(negedge clk);
      if (release_en) occ[release_slot] = 0;
      if (alloc) occ[exp_free] = 1;
    end
    check(fulls > 0, "table was filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
