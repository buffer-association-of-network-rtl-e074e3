// damq_buffer: link-listed dynamically allocated multi-queue (DAMQ).
//
// One shared flit SRAM of SLOTS entries holds the flits of all NUM_VC virtual
// channels of an input port. Each VC is a linked list through that SRAM:
//  - the slot state table says which slots are occupied;
//  - the VC ID table keeps, per VC, a valid bit and head and tail pointers;
//  - a next-pointer table links each slot to the following flit of its VC.
// A VC takes slots only while it holds flits, so one busy VC can use the
// whole buffer.
//
// Write (push): the flit goes into the lowest free slot, and the slot is
// marked occupied. If the VC was empty (a new VC), its head and tail both
// point to the new slot. Otherwise the old tail's next pointer is set to the
// new slot and only the tail pointer moves.
// Read (pop of pop_vc): the slot at the VC's head is freed. If head equals
// tail, that was the last flit: the list ends and the VC ID table marks the
// VC empty. Otherwise only the head pointer moves to the next slot.
// A push and a pop may happen in the same cycle, also on the same VC.
//
// head_data[v] is the flit at the head of VC v, read asynchronously, and is
// valid while vc_nonempty[v] is high. A pushed flit is visible at the head
// from the cycle after the push edge. full means no free slot: a push while
// full is not allowed (upstream credits prevent it) and is ignored.
// Reset (synchronous, active high) empties every VC.
//
// The write and read sequences follow the DAMQ flow of the design. The
// lowest-free-slot policy and the asynchronous SRAM read are this design's
// choices.
module damq_buffer #(
  parameter int unsigned DATA_W = noc_pkg::DATA_W,
  parameter int unsigned NUM_VC = noc_pkg::NUM_VC,
  parameter int unsigned SLOTS  = noc_pkg::SLOTS,
  localparam int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned VW    = (NUM_VC > 1) ? $clog2(NUM_VC) : 1
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           push,
  input  logic [VW-1:0]                  push_vc,
  input  logic [DATA_W-1:0]              push_data,
  input  logic                           pop,
  input  logic [VW-1:0]                  pop_vc,
  output logic [NUM_VC-1:0]              vc_nonempty,
  output logic [NUM_VC-1:0][DATA_W-1:0]  head_data,
  output logic                           full,
  output logic [SW:0]                    used
);
  logic [DATA_W-1:0] sram     [SLOTS];
  logic [SW-1:0]     next_ptr [SLOTS];
  logic [SW-1:0]     head     [NUM_VC];
  logic [SW-1:0]     tail     [NUM_VC];
  logic [NUM_VC-1:0] vc_valid;

  logic          any_free;
  logic [SW-1:0] free_slot;
  logic          do_push, do_pop;

  assign full    = !any_free;
  assign do_push = push && any_free;
  assign do_pop  = pop && vc_valid[pop_vc];

  slot_state_table #(.SLOTS(SLOTS)) u_slots (
    .clk, .rst,
    .alloc        (do_push),
    .release_en   (do_pop),
    .release_slot (head[pop_vc]),
    .free_slot,
    .any_free,
    .used
  );

  always_comb begin
    vc_nonempty = vc_valid;
    for (int unsigned v = 0; v < NUM_VC; v++)
      head_data[v] = sram[head[v]];
  end

  // Flit SRAM and next-pointer table: written only, never reset.
  always_ff @(posedge clk) begin
    if (do_push) begin
      sram[free_slot] <= push_data;
      if (vc_valid[push_vc]) next_ptr[tail[push_vc]] <= free_slot;
    end
  end

  // VC ID table: valid bit, head and tail pointer per VC.
  always_ff @(posedge clk) begin
    if (rst) begin
      vc_valid <= '0;
      for (int unsigned v = 0; v < NUM_VC; v++) begin
        head[v] <= '0;
        tail[v] <= '0;
      end
    end else begin
      for (int unsigned v = 0; v < NUM_VC; v++) begin
        logic pu, po, last;
        pu   = do_push && (push_vc == VW'(v));
        po   = do_pop  && (pop_vc  == VW'(v));
        last = (head[v] == tail[v]);
        if (po && pu) begin
          if (last) head[v] <= free_slot;
          else      head[v] <= next_ptr[head[v]];
          tail[v] <= free_slot;
        end else if (po) begin
          if (last) vc_valid[v] <= 1'b0;
          else      head[v]     <= next_ptr[head[v]];
        end else if (pu) begin
          if (!vc_valid[v]) head[v] <= free_slot;
          tail[v]     <= free_slot;
          vc_valid[v] <= 1'b1;
        end
      end
    end
  end

`ifndef SYNTHESIS
  a_no_push_when_full: assert property (@(posedge clk) disable iff (rst) push |-> any_free);
  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (rst) pop |-> vc_valid[pop_vc]);
`endif
endmodule
