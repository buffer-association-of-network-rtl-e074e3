// output_port: output latch and credit counter of one router output.
//
// The flit switched to this output by the crossbar is captured at the clock
// edge into a holding register. The register keeps the last flit on out_data
// and out_vc until the next one arrives. out_avail is high for the one cycle
// after each capture.
//
// The output also counts credits: the free buffer slots of the downstream
// receiver. The count starts at CREDITS after reset. Each flit sent uses one
// credit, and each pulse on credit_in returns one. has_credit tells the
// arbiter whether a flit may be sent this cycle.
//
// Flits leave one edge after the grant. Reset is synchronous and active high.
// The design calls this stage a latch. Here it is built from edge-triggered
// flops, which hold data the same way. The credit scheme is this design's
// choice for the credit_in inputs of the router.
module output_port #(
  parameter int unsigned DATA_W  = noc_pkg::DATA_W,
  parameter int unsigned NUM_VC  = noc_pkg::NUM_VC,
  parameter int unsigned CREDITS = noc_pkg::SLOTS,
  localparam int unsigned VW     = (NUM_VC > 1) ? $clog2(NUM_VC) : 1,
  localparam int unsigned CW     = $clog2(CREDITS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  input  logic [VW-1:0]     in_vc,
  input  logic              credit_in,
  output logic              has_credit,
  output logic [DATA_W-1:0] out_data,
  output logic [VW-1:0]     out_vc,
  output logic              out_avail,
  output logic [CW-1:0]     credits
);
  assign has_credit = (credits != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_data  <= '0;
      out_vc    <= '0;
      out_avail <= 1'b0;
      credits   <= CW'(CREDITS);
    end else begin
      out_avail <= in_valid;
      if (in_valid) begin
        out_data <= in_data;
        out_vc   <= in_vc;
      end
      credits <= credits - CW'(in_valid) + CW'(credit_in);
    end
  end

`ifndef SYNTHESIS
  a_send_with_credit: assert property (@(posedge clk) disable iff (rst) in_valid |-> has_credit);
  a_credit_bound: assert property (@(posedge clk) disable iff (rst)
    !(credit_in && !in_valid && credits == CW'(CREDITS)));
`endif
endmodule
