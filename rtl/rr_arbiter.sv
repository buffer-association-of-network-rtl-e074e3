// rr_arbiter: rotating-priority arbiter, one per output port.
//
// Grants at most one of N requesters per cycle (single arbitration). After
// reset, requester 0 has the highest priority. When a grant is actually used
// (advance = 1), the priority moves to the requester just after the one
// granted. An idle requester is therefore skipped and the grant goes to the
// next active requester in rotating order.
//
// gnt is combinational in req. The priority pointer is updated at the clock
// edge. Reset is synchronous and active high.
module rr_arbiter #(
  parameter int unsigned N = noc_pkg::NUM_PORTS,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N-1:0]     req,
  input  logic             advance,   // the granted request was consumed
  output logic [N-1:0]     gnt,
  output logic [IDX_W-1:0] gnt_idx,
  output logic             gnt_valid
);
  logic [IDX_W-1:0] prio;   // index with the highest priority

  always_comb begin
    int unsigned k;
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      k = (32'(prio) + i) % N;
      if (!gnt_valid && req[k]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IDX_W'(k);
        gnt[k]    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                         prio <= '0;
    else if (gnt_valid && advance)   prio <= IDX_W'((32'(gnt_idx) + 1) % N);
  end

`ifndef SYNTHESIS
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
  a_subset: assert property (@(posedge clk) disable iff (rst) (gnt & ~req) == '0);
`endif
endmodule
