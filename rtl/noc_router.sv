// noc_router: NUM_PORTS x NUM_PORTS virtual-channel router core.
//
// Datapath: input port (DAMQ buffer, VC choice, LTR hold-off, decode logic)
// -> one rotating-priority arbiter per output -> crossbar -> output latch.
//  - Each input port offers one head flit per cycle, with a one-hot request
//    for its destination output.
//  - Output o's arbiter grants one of the inputs that request o. An input is
//    only considered while the output still has a downstream credit.
//  - The grant pops the flit from its input buffer in the same cycle and sets
//    the crossbar path, so the flit is in the output latch at the next edge.
//  - All outputs work in parallel, so flits to different outputs never block
//    each other.
//  - The VC number travels with the flit and comes out unchanged.
//
// Timing: a flit presented on in_* before edge t is written at edge t and
// appears on out_* (with out_avail) after edge t+1 when it meets no
// contention and ltr_value = 0. Each port accepts one flit per cycle and each
// output sends one per cycle, so traffic without output conflicts runs at
// full throughput. credit_out[i] pulses when input i frees a buffer slot.
// credit_in[o] returns a credit to output o.
// Reset is synchronous and active high.
module noc_router #(
  parameter int unsigned NUM_PORTS = noc_pkg::NUM_PORTS,
  parameter int unsigned DATA_W    = noc_pkg::DATA_W,
  parameter int unsigned NUM_VC    = noc_pkg::NUM_VC,
  parameter int unsigned SLOTS     = noc_pkg::SLOTS,
  parameter int unsigned LTR_W     = noc_pkg::LTR_W,
  localparam int unsigned VW       = (NUM_VC > 1) ? $clog2(NUM_VC) : 1,
  localparam int unsigned SW       = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned IW       = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  logic                              clk,
  input  logic                              rst,
  // inputs
  input  logic [NUM_PORTS-1:0]              in_valid,
  input  logic [NUM_PORTS-1:0][DATA_W-1:0]  in_data,
  input  logic [NUM_PORTS-1:0][VW-1:0]      in_vc,
  input  logic [NUM_PORTS-1:0][LTR_W-1:0]   ltr_value,
  output logic [NUM_PORTS-1:0]              credit_out,
  output logic [NUM_PORTS-1:0]              in_full,
  // outputs
  output logic [NUM_PORTS-1:0][DATA_W-1:0]  out_data,
  output logic [NUM_PORTS-1:0][VW-1:0]      out_vc,
  output logic [NUM_PORTS-1:0]              out_avail,
  input  logic [NUM_PORTS-1:0]              credit_in
);
  localparam int unsigned XW = DATA_W + VW;   // crossbar word: {vc, flit}

  logic [NUM_PORTS-1:0]                 req;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]  req_dest;   // [input][output]
  logic [NUM_PORTS-1:0][DATA_W-1:0]     req_data;
  logic [NUM_PORTS-1:0][VW-1:0]         req_vc;
  logic [NUM_PORTS-1:0]                 in_gnt;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]  arb_req;    // [output][input]
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]  arb_gnt;    // [output][input]
  logic [NUM_PORTS-1:0]                 has_credit;
  logic [NUM_PORTS-1:0][XW-1:0]         xb_in, xb_out;
  logic [NUM_PORTS-1:0]                 xb_valid;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    logic [SW:0] used;
    input_port #(
      .NUM_PORTS(NUM_PORTS), .DATA_W(DATA_W), .NUM_VC(NUM_VC),
      .SLOTS(SLOTS), .LTR_W(LTR_W)
    ) u_port (
      .clk, .rst,
      .in_valid   (in_valid[i]),
      .in_data    (in_data[i]),
      .in_vc      (in_vc[i]),
      .ltr_value  (ltr_value[i]),
      .credit_out (credit_out[i]),
      .full       (in_full[i]),
      .used       (used),
      .req        (req[i]),
      .req_dest   (req_dest[i]),
      .req_data   (req_data[i]),
      .req_vc     (req_vc[i]),
      .gnt        (in_gnt[i])
    );
    assign xb_in[i] = {req_vc[i], req_data[i]};
  end

  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++)
      for (int unsigned i = 0; i < NUM_PORTS; i++)
        arb_req[o][i] = req[i] && req_dest[i][o] && has_credit[o];
    for (int unsigned i = 0; i < NUM_PORTS; i++) begin
      in_gnt[i] = 1'b0;
      for (int unsigned o = 0; o < NUM_PORTS; o++)
        in_gnt[i] = in_gnt[i] | arb_gnt[o][i];
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    logic [IW-1:0] gnt_idx;
    logic          gnt_valid;
    logic [$clog2(SLOTS + 1)-1:0] credits;

    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst,
      .req       (arb_req[o]),
      .advance   (1'b1),
      .gnt       (arb_gnt[o]),
      .gnt_idx,
      .gnt_valid
    );

    output_port #(.DATA_W(DATA_W), .NUM_VC(NUM_VC), .CREDITS(SLOTS)) u_out (
      .clk, .rst,
      .in_valid   (xb_valid[o]),
      .in_data    (xb_out[o][DATA_W-1:0]),
      .in_vc      (xb_out[o][XW-1:DATA_W]),
      .credit_in  (credit_in[o]),
      .has_credit (has_credit[o]),
      .out_data   (out_data[o]),
      .out_vc     (out_vc[o]),
      .out_avail  (out_avail[o]),
      .credits
    );
  end

  crossbar #(.NUM_PORTS(NUM_PORTS), .W(XW)) u_xbar (
    .in_data   (xb_in),
    .sel       (arb_gnt),
    .out_data  (xb_out),
    .out_valid (xb_valid)
  );
endmodule
