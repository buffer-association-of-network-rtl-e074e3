// tb_noc_top: end-to-end test of the clock-gated router at its default size
// (8 ports, 32-bit flits, 4 VCs, 16 slots per input).
// Besides the checks of the router core test (listed below), this test:
//  - switches en_i off for stretches of cycles, also in mid-traffic. While
//    gated, gated_clk must stay low and the outputs must not change. No
//    flit may be lost across a gated stretch;
//  - holds en_i low during reset, to check that reset still takes effect;
//  - runs a permutation pattern (input i to output i+k) to check that all
//    eight outputs deliver one flit per cycle (full throughput).
// Each flit carries {destination, source port, VC, sequence number}. Senders
// respect the input credits (credit_out). A downstream model returns output
// credits after random delays and sometimes withholds them. For every flit
// that leaves, the test checks:
//  - the output port equals the destination field;
//  - out_vc equals the flit's VC;
//  - flits of one source and VC arrive in order, none lost or duplicated;
//  - an output never sends more flits than the downstream buffer can hold.
// A directed part checks the two-edge latency of a lone flit, a flit leaving
// on each output, and the LTR delay. The test counts output contention,
// credit stalls, full input buffers, LTR hold-offs and cycles with several
// outputs busy at once, and fails any of these that never happened.
module tb_noc_top;
  localparam int P = 8, W = 32, V = 4, S = 16, LW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en_i = 0, latch_en, gated_clk;
  bit   eff = 0;               // the last rising edge reached the router
  int   n_gated = 0, tput_flits = 0;
  logic [P-1:0]            in_valid, credit_out, in_full, out_avail, credit_in;
  logic [P-1:0][W-1:0]     in_data, out_data;
  logic [P-1:0][1:0]       in_vc, out_vc;
  logic [P-1:0][LW-1:0]    ltr_value;

  noc_top dut (
    .clk, .rst, .en_i, .latch_en, .gated_clk, .in_valid, .in_data, .in_vc, .ltr_value, .credit_out, .in_full,
    .out_data, .out_vc, .out_avail, .credit_in);

  always #5 clk = ~clk;

  int up_cr [P];            // sender-side credits per input
  int down_cr [P];          // slots the downstream model owes back per output
  int next_seq [P][V];      // next sequence number to send per source/VC
  int exp_seq [P][V];       // next sequence number expected per source/VC
  int sent = 0, received = 0;
  int n_contend = 0, n_credit_stall = 0, n_full = 0, n_ltr = 0, n_parallel = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [W-1:0] mk(int dest, int src, int vc, int seq);
    return {3'(dest), 3'(src), 2'(vc), 24'(seq)};
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard and mechanism counters, sampled after each edge
  always @(negedge clk) if (!rst && eff) begin
    int busy, n;
    busy = 0;
    for (int o = 0; o < P; o++) begin
      if (out_avail[o]) begin
        logic [W-1:0] f;
        int src, vc, seq;
        f = out_data[o];
        src = int'(f[28:26]); vc = int'(f[25:24]); seq = int'(f[23:0]);
        busy++;
        received++;
        check(int'(f[31:29]) == o, $sformatf("flit %h left on output %0d", f, o));
        check(out_vc[o] == 2'(vc), "VC carried through");
        check(src < P && seq == exp_seq[src][vc], $sformatf("order src %0d vc %0d seq %0d exp %0d", src, vc, seq, exp_seq[src][vc]));
        if (src < P) exp_seq[src][vc] = seq + 1;
      end
      n = 0;
      for (int i = 0; i < P; i++) if (dut.u_router.arb_req[o][i]) n++;
      if (n > 1) n_contend++;
      for (int i = 0; i < P; i++)
        if (dut.u_router.req[i] && dut.u_router.req_dest[i][o] && !dut.u_router.has_credit[o]) n_credit_stall++;
      if (in_full[o]) n_full++;
    end
    if (busy > 1) n_parallel++;
    tput_flits += busy;
  end

  // counts LTR hold-off cycles
  for (genvar i = 0; i < P; i++) begin : g_ltr
    always @(negedge clk)
      if (!rst && eff && dut.u_router.g_in[i].u_port.ltr_avail && !dut.u_router.g_in[i].u_port.ltr_zero) n_ltr++;
  end

  // one cycle of stimulus: valid flits chosen by the caller, credits returned at random
  // en = 0: a gated cycle; inputs are held idle and nothing may change
  task automatic cycle(logic [P-1:0] v, logic [P-1:0][W-1:0] d, int credit_pct, bit en = 1);
    logic [P-1:0] cr;
    logic [P-1:0][W-1:0] hold_data;
    logic [P-1:0] hold_avail;
    if (!en) begin
      en_i = 0; in_valid = '0; credit_in = '0;
      hold_data = out_data; hold_avail = out_avail;
      @(posedge clk);
      #1;
      check(!gated_clk && !latch_en, "clock gated while en_i is low");
      check(out_data == hold_data && out_avail == hold_avail, "outputs frozen while gated");
      eff = 0;
      n_gated++;
      @(negedge clk);
      return;
    end
    en_i = 1;
    for (int i = 0; i < P; i++) begin
      in_valid[i] = v[i] && up_cr[i] > 0;
      in_data[i]  = d[i];
      in_vc[i]    = d[i][25:24];
      credit_in[i] = (down_cr[i] > 0) && ($urandom_range(0, 99) < credit_pct);
    end
    #1;
    cr = credit_out;                      // pops of the coming edge
    @(posedge clk);
    eff = 1;
    for (int i = 0; i < P; i++) begin
      if (in_valid[i]) begin
        up_cr[i]--; sent++;
        next_seq[i][int'(in_data[i][25:24])]++;
      end
      if (cr[i]) up_cr[i]++;
    end
    @(negedge clk);
  endtask

  // downstream slots used: an output flit takes a credit, the model frees it later
  always @(negedge clk) if (!rst && eff) for (int o = 0; o < P; o++) if (out_avail[o]) begin
    down_cr[o]++;
    check(down_cr[o] <= S, $sformatf("output %0d overran the downstream buffer", o));
  end
  always @(posedge clk) if (!rst && en_i) for (int o = 0; o < P; o++) if (credit_in[o]) down_cr[o]--;

  initial begin
    logic [P-1:0][W-1:0] d;
    logic [P-1:0] v;
    int lat;
    in_valid = 0; in_data = 0; in_vc = 0; credit_in = 0; ltr_value = '0;
    for (int i = 0; i < P; i++) begin
      up_cr[i] = S; down_cr[i] = 0;
      for (int c = 0; c < V; c++) begin next_seq[i][c] = 0; exp_seq[i][c] = 0; end
    end
    repeat (3) @(negedge clk);
    #1;
    check(out_avail == '0 && in_full == '0 && out_data == '0, "reset works with en_i low");
    rst = 0;
    cycle('0, '0, 100, 0);
    // lone flits: each output once, latency of two edges
    for (int o = 0; o < P; o++) begin
      d = '0; v = '0;
      d[(o + 1) % P] = mk(o, (o + 1) % P, 3, next_seq[(o + 1) % P][3]);
      v[(o + 1) % P] = 1;
      cycle(v, d, 100);
      check(!(|out_avail), "nothing out one edge after the write");
      cycle('0, '0, 100);
      check(out_avail == (P'(1) << o), $sformatf("lone flit out on %0d after two edges", o));
      repeat (2) cycle('0, '0, 100);
    end
    // LTR delay of 3 on input 2
    ltr_value[2] = 4'd3;
    d = '0; v = '0;
    d[2] = mk(4, 2, 0, next_seq[2][0]); v[2] = 1;
    cycle(v, d, 100);
    lat = 1;
    while (!out_avail[4] && lat < 20) begin cycle('0, '0, 100); lat++; end
    check(lat == 2 + 3, $sformatf("LTR 3 adds three cycles: latency %0d", lat));
    ltr_value = '0;
    // full throughput: permutation traffic, every input sends every cycle
    for (int k = 1; k <= 3; k++) begin
      for (int t = 0; t < 12; t++) begin
        for (int i = 0; i < P; i++) d[i] = mk((i + k) % P, i, t % V, next_seq[i][t % V]);
        cycle('1, d, 100);
        if (t == 1) tput_flits = 0;      // first flits leave after two edges
      end
      check(tput_flits == 10 * P, $sformatf("permutation %0d: %0d flits in 10 cycles", k, tput_flits));
      for (int t = 0; t < 4; t++) cycle('0, '0, 100);
    end
    // random traffic in phases: light, heavy, hotspot, credit-starved, LTR;
    // en_i is dropped for short stretches
    for (int t = 0; t < 4000; t++) begin
      int phase, pct, cpct;
      if ($urandom_range(0, 99) < 3) repeat ($urandom_range(1, 4)) cycle('0, '0, 0, 0);
      phase = (t / 400) % 5;
      pct  = (phase == 0) ? 25 : 90;
      cpct = (phase == 3) ? 5 : 70;
      for (int i = 0; i < P; i++) ltr_value[i] = (phase == 4) ? LW'($urandom_range(0, 3)) : '0;
      for (int i = 0; i < P; i++) begin
        int dest, vc;
        dest = (phase == 2) ? 0 : $urandom_range(0, P - 1);
        vc   = $urandom_range(0, V - 1);
        d[i] = mk(dest, i, vc, next_seq[i][vc]);
        v[i] = $urandom_range(0, 99) < pct;
      end
      cycle(v, d, cpct);
    end
    // drain
    ltr_value = '0;
    for (int t = 0; t < 200; t++) cycle('0, '0, 100);
    check(sent == received, $sformatf("sent %0d received %0d", sent, received));
    check(n_contend > 0, "output contention happened");
    check(n_credit_stall > 0, "credit stall happened");
    check(n_full > 0, "an input buffer filled");
    check(n_ltr > 0, "LTR hold-off happened");
    check(n_parallel > 0, "several outputs busy in one cycle");
    check(n_gated > 0, "gated cycles happened");
    $display("sent=%0d received=%0d contention=%0d credit_stall=%0d full=%0d ltr=%0d parallel=%0d gated=%0d",
             sent, received, n_contend, n_credit_stall, n_full, n_ltr, n_parallel, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
