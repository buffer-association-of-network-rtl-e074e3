// tb_damq_buffer: self-checking test of the link-listed DAMQ buffer.
// A model keeps one queue per VC. Random pushes to random VCs and pops of
// random non-empty VCs run, with simultaneous push and pop (also on the same
// VC) and phases that fill the whole shared buffer from a single VC. Every
// cycle the head flit and non-empty flag of every VC, full and the occupancy
// are compared with the model, so FIFO order per VC, the sharing of slots
// and the freeing of slots are all checked.
module tb_damq_buffer;
  localparam int W = 32, V = 4, S = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic push, pop, full;
  logic [1:0] push_vc, pop_vc;
  logic [W-1:0] push_data;
  logic [V-1:0] vc_nonempty;
  logic [V-1:0][W-1:0] head_data;
  logic [3:0] used;
  logic [W-1:0] q [V][$];
  int total, fulls = 0, same_vc_both = 0, one_vc_full = 0;

  damq_buffer #(.DATA_W(W), .NUM_VC(V), .SLOTS(S)) dut (
    .clk, .rst, .push, .push_vc, .push_data, .pop, .pop_vc,
    .vc_nonempty, .head_data, .full, .used);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_vc = 0; pop_vc = 0; push_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      int phase, nonempty_cnt, pv;
      phase = (t / 150) % 4;   // 0: mixed, 1: fill, 2: drain, 3: single-VC fill
      total = 0;
      for (int v = 0; v < V; v++) total += q[v].size();
      // compare with the model
      check(used == 4'(total), $sformatf("used %0d exp %0d", used, total));
      check(full == (total == S), "full flag");
      if (total == S) begin
        fulls++;
        for (int v = 0; v < V; v++) if (q[v].size() == S) one_vc_full++;
      end
      for (int v = 0; v < V; v++) begin
        check(vc_nonempty[v] == (q[v].size() != 0), $sformatf("vc %0d nonempty", v));
        if (q[v].size() != 0) check(head_data[v] == q[v][0], $sformatf("vc %0d head %h exp %h", v, head_data[v], q[v][0]));
      end
      // choose stimulus
      push_vc = (phase == 3) ? 2'd2 : 2'($urandom);
      push_data = $urandom;
      push = (total < S) && ($urandom_range(0, 9) < (phase == 2 ? 2 : (phase == 0 ? 6 : 9)));
      nonempty_cnt = 0;
      for (int v = 0; v < V; v++) if (q[v].size() != 0) nonempty_cnt++;
      pop = (nonempty_cnt > 0) && ($urandom_range(0, 9) < (phase == 2 ? 9 : (phase == 0 ? 5 : 1)));
      if (pop) begin
        do pv = $urandom_range(0, V - 1); while (q[pv].size() == 0);
        pop_vc = 2'(pv);
        if (push && $urandom_range(0, 2) == 0) push_vc = pop_vc;   // same VC both ways
        if (push && push_vc == pop_vc) same_vc_both++;
      end
      @(negedge clk);
      if (pop)  void'(q[pop_vc].pop_front());
      if (push) q[push_vc].push_back(push_data);
    end
    check(fulls > 0, "buffer filled");
    check(one_vc_full > 0, "one VC took every slot");
    check(same_vc_both > 0, "push and pop on the same VC in one cycle");
    $display("full=%0d single_vc_full=%0d same_vc_push_pop=%0d", fulls, one_vc_full, same_vc_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
