// input_port: one router input (DAMQ buffer, VC choice, LTR hold-off, decode).
//
// Incoming flits are written into the port's DAMQ buffer under the VC number
// that comes with them (in_valid, in_data, in_vc). Each cycle the port offers
// the head flit of one non-empty VC to the arbiters (req, req_dest, req_data,
// req_vc):
//  - VCs are taken in round-robin order;
//  - the choice is held until the flit is granted, so one head flit waits at
//    a time;
//  - the offer is delayed by the LTR hold-off (ltr_value cycles per flit);
//  - the decode logic turns the flit's destination field into a one-hot
//    output request.
// gnt pops the flit in the same cycle. It also sends one pulse on
// credit_out, because a buffer slot has been freed for the upstream sender.
//
// Timing: a flit written at edge t can be requested in the cycle after t (with
// ltr_value = 0), so a lone flit leaves the buffer at edge t+1. The port can
// accept and send one flit per cycle.
// The buffer and the per-port LTR count come from the design. The
// round-robin VC choice, holding the choice until the grant, and the credit
// pulse are this design's choices.
module input_port #(
  parameter int unsigned NUM_PORTS = noc_pkg::NUM_PORTS,
  parameter int unsigned DATA_W    = noc_pkg::DATA_W,
  parameter int unsigned NUM_VC    = noc_pkg::NUM_VC,
  parameter int unsigned SLOTS     = noc_pkg::SLOTS,
  parameter int unsigned LTR_W     = noc_pkg::LTR_W,
  localparam int unsigned VW       = (NUM_VC > 1) ? $clog2(NUM_VC) : 1,
  localparam int unsigned SW       = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [DATA_W-1:0]    in_data,
  input  logic [VW-1:0]        in_vc,
  input  logic [LTR_W-1:0]     ltr_value,
  output logic                 credit_out,
  output logic                 full,
  output logic [SW:0]          used,
  output logic                 req,
  output logic [NUM_PORTS-1:0] req_dest,
  output logic [DATA_W-1:0]    req_data,
  output logic [VW-1:0]        req_vc,
  input  logic                 gnt
);
  logic [NUM_VC-1:0]             vc_nonempty;
  logic [NUM_VC-1:0][DATA_W-1:0] head_data;
  logic [VW-1:0]                 rr_ptr, held_vc, pick_vc, cur_vc;
  logic                          held, pick_ok, ltr_avail, ltr_zero, dest_ok;
  logic [LTR_W-1:0]              ltr_count;

  damq_buffer #(.DATA_W(DATA_W), .NUM_VC(NUM_VC), .SLOTS(SLOTS)) u_buf (
    .clk, .rst,
    .push      (in_valid),
    .push_vc   (in_vc),
    .push_data (in_data),
    .pop       (gnt),
    .pop_vc    (cur_vc),
    .vc_nonempty,
    .head_data,
    .full,
    .used
  );

  // Round-robin pick among non-empty VCs, starting at rr_ptr.
  always_comb begin
    int unsigned k;
    pick_ok = 1'b0;
    pick_vc = '0;
    for (int unsigned i = 0; i < NUM_VC; i++) begin
      k = (32'(rr_ptr) + i) % NUM_VC;
      if (!pick_ok && vc_nonempty[k]) begin
        pick_ok = 1'b1;
        pick_vc = VW'(k);
      end
    end
  end

  assign cur_vc    = held ? held_vc : pick_vc;
  assign ltr_avail = held || pick_ok;

  ltr_delay #(.LTR_W(LTR_W)) u_ltr (
    .clk, .rst,
    .ltr_avail,
    .ltr_value,
    .ltr_gnt  (gnt),
    .ltr_zero,
    .ltr_count
  );

  logic [$clog2(NUM_PORTS > 1 ? NUM_PORTS : 2)-1:0] dest_idx;
  route_decode #(.NUM_PORTS(NUM_PORTS), .DATA_W(DATA_W)) u_dec (
    .flit        (head_data[cur_vc]),
    .dest        (dest_idx),
    .dest_onehot (req_dest),
    .dest_ok
  );

  assign req        = ltr_avail && ltr_zero && dest_ok;
  assign req_data   = head_data[cur_vc];
  assign req_vc     = cur_vc;
  assign credit_out = gnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      held    <= 1'b0;
      held_vc <= '0;
      rr_ptr  <= '0;
    end else if (gnt) begin
      held   <= 1'b0;
      rr_ptr <= VW'((32'(cur_vc) + 1) % NUM_VC);
    end else if (ltr_avail) begin
      held    <= 1'b1;
      held_vc <= cur_vc;
    end
  end

`ifndef SYNTHESIS
  a_gnt_needs_req: assert property (@(posedge clk) disable iff (rst) gnt |-> req);
`endif
endmodule
