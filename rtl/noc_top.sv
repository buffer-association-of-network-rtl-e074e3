// noc_top: clock-gated 8x8 DAMQ virtual-channel router.
//
// The top puts the latch-based clock gate in front of the router core. The
// core runs on gated_clk, which carries clock pulses only while en_i is high
// (or while rst is high, so that a reset always reaches the registers). With
// en_i low the whole router is frozen and holds every flit it buffers.
//
// Ports, per router port p (0 .. NUM_PORTS-1):
//  - in_valid/in_data/in_vc[p]: one incoming flit and its VC number;
//  - ltr_value[p]: LTR hold-off, in cycles, of input p;
//  - credit_out[p]: one pulse per buffer slot freed at input p;
//  - in_full[p]: input p has no free slot;
//  - out_data/out_vc/out_avail[p]: one outgoing flit; out_avail is high for
//    one cycle per flit;
//  - credit_in[p]: one pulse per slot freed downstream of output p.
// A flit's destination port is held in its top bits (see noc_pkg).
// Timing is that of noc_router, counted in gated_clk cycles. Inputs should
// change away from the rising edge of clk.
module noc_top #(
  parameter int unsigned NUM_PORTS = noc_pkg::NUM_PORTS,
  parameter int unsigned DATA_W    = noc_pkg::DATA_W,
  parameter int unsigned NUM_VC    = noc_pkg::NUM_VC,
  parameter int unsigned SLOTS     = noc_pkg::SLOTS,
  parameter int unsigned LTR_W     = noc_pkg::LTR_W,
  localparam int unsigned VW       = (NUM_VC > 1) ? $clog2(NUM_VC) : 1
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              en_i,
  output logic                              latch_en,
  output logic                              gated_clk,
  input  logic [NUM_PORTS-1:0]              in_valid,
  input  logic [NUM_PORTS-1:0][DATA_W-1:0]  in_data,
  input  logic [NUM_PORTS-1:0][VW-1:0]      in_vc,
  input  logic [NUM_PORTS-1:0][LTR_W-1:0]   ltr_value,
  output logic [NUM_PORTS-1:0]              credit_out,
  output logic [NUM_PORTS-1:0]              in_full,
  output logic [NUM_PORTS-1:0][DATA_W-1:0]  out_data,
  output logic [NUM_PORTS-1:0][VW-1:0]      out_vc,
  output logic [NUM_PORTS-1:0]              out_avail,
  input  logic [NUM_PORTS-1:0]              credit_in
);
  clock_gate u_cg (
    .clk,
    .en_i      (en_i | rst),
    .latch_en,
    .gated_clk
  );

  noc_router #(
    .NUM_PORTS(NUM_PORTS), .DATA_W(DATA_W), .NUM_VC(NUM_VC),
    .SLOTS(SLOTS), .LTR_W(LTR_W)
  ) u_router (
    .clk (gated_clk),
    .rst,
    .in_valid, .in_data, .in_vc, .ltr_value,
    .credit_out, .in_full,
    .out_data, .out_vc, .out_avail,
    .credit_in
  );
endmodule
