// ltr_delay: LTR hold-off counter of an input port.
//
// Delays the offer of each new head flit to the arbiter by ltr_value clock
// cycles. When ltr_avail rises for a new flit and ltr_value is zero,
// ltr_zero is high at once and the flit can be requested in that same cycle.
// Otherwise ltr_count is loaded with ltr_value - 1 and counts down once per
// cycle. ltr_zero goes high when the count reaches zero, exactly ltr_value
// cycles after the flit became available. ltr_zero stays high until ltr_gnt
// takes the flit. The next flit then starts a new hold-off. ltr_value is
// sampled once per flit, in its first waiting cycle, so a change of
// ltr_value never delays a flit that is already waiting.
//
// The signal names and the behaviour (zero count: no delay; non-zero count:
// a delay of that many cycles) follow the design. The exact counting is this
// design's choice. Reset is synchronous and active high.
module ltr_delay #(
  parameter int unsigned LTR_W = noc_pkg::LTR_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ltr_avail,   // a head flit is waiting
  input  logic [LTR_W-1:0] ltr_value,   // hold-off in cycles
  input  logic             ltr_gnt,     // the waiting flit was taken
  output logic             ltr_zero,    // the flit may be requested
  output logic [LTR_W-1:0] ltr_count
);
  logic loaded;   // a hold-off is running or finished for the current flit

  always_comb begin
    if (!ltr_avail)   ltr_zero = 1'b0;
    else if (!loaded) ltr_zero = (ltr_value == '0);
    else              ltr_zero = (ltr_count == '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      loaded    <= 1'b0;
      ltr_count <= '0;
    end else if (ltr_gnt || !ltr_avail) begin
      loaded    <= 1'b0;
      ltr_count <= '0;
    end else if (!loaded) begin
      loaded    <= 1'b1;
      ltr_count <= (ltr_value != '0) ? ltr_value - 1'b1 : '0;
    end else if (ltr_count != '0) begin
      ltr_count <= ltr_count - 1'b1;
    end
  end

`ifndef SYNTHESIS
  a_gnt_only_when_ready: assert property (@(posedge clk) disable iff (rst) ltr_gnt |-> ltr_zero);
`endif
endmodule
