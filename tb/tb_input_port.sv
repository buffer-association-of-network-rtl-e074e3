// tb_input_port: self-checking test of one router input port.
// Directed parts check the timing:
//  - a lone flit is requested in the cycle after its write (LTR 0);
//  - with LTR value L the request comes L cycles later;
//  - with all four VCs loaded, grants every cycle serve the VCs in strict
//    round-robin order, one flit per cycle.
// A random part then pushes flits to random VCs and grants at random. A model
// with one queue per VC checks every cycle:
//  - the offered flit is the oldest flit of the offered VC;
//  - the one-hot destination matches the flit's top bits;
//  - an ungranted offer is held;
//  - credit_out pulses exactly on grants;
//  - full matches the model.
module tb_input_port;
  localparam int P = 8, W = 32, V = 4, S = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic in_valid, credit_out, full, req, gnt;
  logic [W-1:0] in_data, req_data;
  logic [1:0] in_vc, req_vc;
  logic [3:0] ltr_value, used;
  logic [P-1:0] req_dest;
  logic [W-1:0] q [V][$];
  int fulls = 0, holds = 0;

  input_port #(.NUM_PORTS(P), .DATA_W(W), .NUM_VC(V), .SLOTS(S), .LTR_W(4)) dut (
    .clk, .rst, .in_valid, .in_data, .in_vc, .ltr_value, .credit_out, .full, .used,
    .req, .req_dest, .req_data, .req_vc, .gnt);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int qtotal();
    int n = 0;
    for (int v = 0; v < V; v++) n += q[v].size();
    return n;
  endfunction

  // apply one cycle of stimulus and update the model at the edge
  task automatic step(bit push, logic [1:0] vc, logic [W-1:0] data, bit grant);
    logic [1:0] gvc;
    in_valid = push; in_vc = vc; in_data = data; gnt = grant;
    #1;
    check(credit_out == grant, "credit_out follows the grant");
    if (grant) begin
      check(req && q[req_vc].size() != 0 && req_data == q[req_vc][0],
            $sformatf("granted flit %h vc %0d is the oldest of its VC", req_data, req_vc));
    end
    gvc = req_vc;
    @(negedge clk);
    if (grant) void'(q[gvc].pop_front());
    if (push) q[vc].push_back(data);
    in_valid = 0; gnt = 0;
    #1;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [1:0] last_vc;
    bit last_req, last_gnt;
    in_valid = 0; in_data = 0; in_vc = 0; gnt = 0; ltr_value = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    #1;
    check(!req && !full, "empty after reset");
    // lone flit, LTR 0: requested right after the write edge
    step(1, 2'd1, 32'h6000_0b23, 0);
    check(req && req_vc == 2'd1 && req_dest == 8'b0000_1000, "lone flit requested next cycle");
    step(0, 0, 0, 1);
    check(!req, "port idle after the pop");
    // LTR hold-off of 1..5 cycles
    for (int L = 1; L <= 5; L++) begin
      ltr_value = 4'(L);
      step(1, 2'd3, {3'(L), 29'h111ef}, 0);
      lat = 0;
      while (!req && lat < 20) begin step(0, 0, 0, 0); lat++; end
      check(lat == L, $sformatf("LTR %0d: request after %0d cycles", L, lat));
      step(0, 0, 0, 1);
    end
    ltr_value = 0;
    // round robin over the VCs at one flit per cycle
    for (int k = 0; k < 8; k++) step(1, 2'(k % 4), {3'(k), 29'(k)}, 0);
    for (int k = 0; k < 8; k++) begin
      check(req && req_vc == 2'(k % 4), $sformatf("round robin step %0d vc %0d", k, req_vc));
      step(0, 0, 0, 1);
    end
    check(!req && qtotal() == 0, "all drained");
    // random traffic
    last_req = 0; last_gnt = 0; last_vc = 0;
    for (int t = 0; t < 3000; t++) begin
      bit p, g;
      logic [W-1:0] d;
      ltr_value = ((t / 500) % 2) ? 4'($urandom_range(0, 2)) : 4'd0;
      #1;
      check(full == (qtotal() == S), "full flag");
      if (qtotal() == S) fulls++;
      if (req) begin
        check(q[req_vc].size() != 0 && req_data == q[req_vc][0], "offered flit is oldest of its VC");
        check(req_dest == (8'b1 << req_data[31:29]), "destination decode");
      end
      if (last_req && !last_gnt) begin
        check(req && req_vc == last_vc, "ungranted offer is held");
        holds++;
      end
      d = $urandom;
      p = (qtotal() < S) && $urandom_range(0, 9) < ((t / 300) % 2 ? 8 : 4);
      g = req && $urandom_range(0, 9) < ((t / 300) % 2 ? 3 : 8);
      last_req = req; last_gnt = g; last_vc = req_vc;
      step(p, 2'($urandom), d, g);
    end
    check(fulls > 0 && holds > 0, "buffer full and held offers both occurred");
    $display("full=%0d held=%0d", fulls, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
