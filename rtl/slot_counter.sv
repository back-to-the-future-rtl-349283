// Time-slot identifier of the C-slow pipeline.
//
// Every clock cycle carries a time-slot ID between 0 and C-1, and a cycle with
// ID t is followed by one with ID (t+1) mod C. Threads are bound statically to
// a slot, which is what lets a C-slow pipeline run without extra forwarding
// paths. The counter holds its value while the pipeline is frozen (D-cache
// bank conflict or store-buffer stall), so that slot IDs stay aligned with the
// contents of the minor pipeline registers.
// Interface: `freeze` holds the count; `slot` is the ID of the current cycle.
// Reset starts at slot 0 (a choice of this design).
module slot_counter #(
  parameter int unsigned C = 8
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         freeze,
  output logic [$clog2(C > 1 ? C : 2)-1:0] slot
);
  always_ff @(posedge clk) begin
    if (rst)
      slot <= '0;
    else if (!freeze)
      slot <= (slot == $bits(slot)'(C - 1)) ? '0 : slot + 1'b1;
  end
endmodule
