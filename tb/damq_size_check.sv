// damq_size_check: test helper that exercises one damq_buffer of a given
// size. It fills the whole buffer from a single VC, checks full and the used
// count, then drains while refilling other VCs, and checks per-VC order
// against queue models. It reports its check and failure counts and raises
// done at the end.
module damq_size_check #(
  parameter int unsigned SLOTS = 4
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int W = 32, V = 4, SW = $clog2(SLOTS);
  logic push, pop, full;
  logic [1:0] push_vc, pop_vc;
  logic [W-1:0] push_data;
  logic [V-1:0] vc_nonempty;
  logic [V-1:0][W-1:0] head_data;
  logic [SW:0] used;
  logic [W-1:0] q [V][$];

  damq_buffer #(.DATA_W(W), .NUM_VC(V), .SLOTS(SLOTS)) dut (
    .clk, .rst, .push, .push_vc, .push_data, .pop, .pop_vc,
    .vc_nonempty, .head_data, .full, .used);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL slots=%0d @%0t: %s", SLOTS, $time, what); end
  endtask

  function automatic int total();
    int n = 0;
    for (int v = 0; v < V; v++) n += q[v].size();
    return n;
  endfunction

  task automatic step(bit pu, int pvc, bit po, int ovc);
    push = pu; push_vc = 2'(pvc); push_data = $urandom; pop = po; pop_vc = 2'(ovc);
    @(negedge clk);
    if (po) void'(q[ovc].pop_front());
    if (pu) q[pvc].push_back(push_data);
    push = 0; pop = 0;
    check(int'(used) == total() && full == (total() == SLOTS), "occupancy");
    for (int v = 0; v < V; v++) begin
      check(vc_nonempty[v] == (q[v].size() != 0), "non-empty flag");
      if (q[v].size() != 0) check(head_data[v] == q[v][0], "head flit in order");
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    push = 0; pop = 0; push_vc = 0; pop_vc = 0; push_data = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int round = 0; round < 4; round++) begin
      int fv;
      fv = round % V;
      for (int s = 0; s < SLOTS; s++) step(1, fv, 0, 0);      // one VC takes every slot
      check(full && int'(used) == SLOTS, "single VC filled the buffer");
      // drain the filling VC while other VCs take the freed slots; a slot
      // freed at an edge is offered from the next cycle, so a full buffer
      // takes no flit in the cycle it frees one
      for (int s = 0; s < 2 * SLOTS; s++)
        step(total() < SLOTS, (fv + 1 + (s % (V - 1))) % V, q[fv].size() != 0, fv);
      while (total() > 0) begin
        int v;
        do v = $urandom_range(0, V - 1); while (q[v].size() == 0);
        step(0, 0, 1, v);
      end
    end
    done = 1;
  end
endmodule
