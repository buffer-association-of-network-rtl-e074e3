// tb_rr_arbiter: self-checking test of the rotating-priority arbiter.
// A reference model keeps its own priority pointer (port 0 first after
// reset, then the port after the last one granted) and predicts the grant for
// random request patterns and random advance. It also checks directly that
// port 0 wins right after reset and that four always-requesting ports are
// served in strict rotation.
module tb_rr_arbiter;
  localparam int N = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [N-1:0] req, gnt;
  logic [2:0]   gnt_idx;
  logic         gnt_valid, advance;
  int           prio;

  rr_arbiter #(.N(N)) dut (.clk, .rst, .req, .advance, .gnt, .gnt_idx, .gnt_valid);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int expected(logic [N-1:0] r, int p);
    for (int i = 0; i < N; i++) if (r[(p + i) % N]) return (p + i) % N;
    return -1;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    req = '0; advance = 0; prio = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // after reset port 0 has the top priority
    req = '1; #1;
    check(gnt == 5'b00001, "port 0 first after reset");
    // strict rotation among ports 1..4 with all requesting
    req = 5'b11110; advance = 1;
    for (int k = 0; k < 8; k++) begin
      #1;
      check(gnt_idx == 3'(1 + (k % 4)) && gnt_valid, $sformatf("rotation step %0d got %0d", k, gnt_idx));
      @(negedge clk);
    end
    prio = 0;   // the last grant went to port 4, so port 0 is next
    for (int k = 0; k < 400; k++) begin
      req = N'($urandom); advance = $urandom_range(0, 3) != 0;
      #1;
      e = expected(req, prio);
      if (e < 0) check(!gnt_valid && gnt == '0, "no grant without request");
      else check(gnt_valid && gnt == (N'(1) << e) && gnt_idx == 3'(e),
                 $sformatf("req=%b prio=%0d exp=%0d got=%b", req, prio, e, gnt));
      @(negedge clk);
      if (e >= 0 && advance) prio = (e + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
