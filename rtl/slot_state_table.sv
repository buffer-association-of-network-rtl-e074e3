// slot_state_table: slot state table of a DAMQ input buffer.
//
// One occupied flag per buffer slot. The table always offers the
// lowest-numbered free slot (free_slot, with any_free). A slot is marked
// occupied when alloc is high at a clock edge, and marked free when release
// is high. Both may happen in one cycle on different slots. A slot released
// in a cycle cannot be offered before the next cycle. used counts the
// occupied slots.
//
// Reset (synchronous, active high) frees every slot. The table itself comes
// from the DAMQ scheme. Offering the lowest free slot is this design's choice.
module slot_state_table #(
  parameter int unsigned SLOTS = noc_pkg::SLOTS,
  localparam int unsigned SW   = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          alloc,        // take free_slot this cycle
  input  logic          release_en,   // free release_slot this cycle
  input  logic [SW-1:0] release_slot,
  output logic [SW-1:0] free_slot,
  output logic          any_free,
  output logic [SW:0]   used
);
  logic [SLOTS-1:0] occupied;

  always_comb begin
    free_slot = '0;
    any_free  = 1'b0;
    for (int unsigned s = 0; s < SLOTS; s++) begin
      if (!any_free && !occupied[s]) begin
        any_free  = 1'b1;
        free_slot = SW'(s);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      occupied <= '0;
      used     <= '0;
    end else begin
      if (release_en)          occupied[release_slot] <= 1'b0;
      if (alloc && any_free)   occupied[free_slot]    <= 1'b1;
      used <= used + (SW+1)'(alloc && any_free) - (SW+1)'(release_en);
    end
  end

`ifndef SYNTHESIS
  a_release_occupied: assert property (@(posedge clk) disable iff (rst)
    release_en |-> occupied[release_slot]);
  a_alloc_free: assert property (@(posedge clk) disable iff (rst) alloc |-> any_free);
`endif
endmodule
