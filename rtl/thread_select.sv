// Two-level round-robin fetch thread selection.
//
// T hardware threads are bound statically to C time slots: thread j*C+s
// belongs to slot s (threads 0 and 8 to slot 0, 1 and 9 to slot 1, ... for
// C=8, T=16). The first level is the time-slot ID, which picks the set of T/C
// threads; the second level picks, in round-robin order, one ready thread of
// that set. A slot with no ready thread issues nothing that cycle.
// Interface: `ready` has one bit per thread; `sel_valid`/`sel_tid` give the
// choice for slot `slot` combinationally. `advance` (a fetch slot was used)
// moves that slot's round-robin pointer past the chosen member.
module thread_select #(
  parameter int unsigned C = 8,
  parameter int unsigned T = 16
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [$clog2(C > 1 ? C : 2)-1:0]   slot,
  input  logic [T-1:0]                       ready,
  input  logic                               advance,
  output logic                               sel_valid,
  output logic [7:0]                         sel_tid
);
  localparam int unsigned M  = T / C;                 // threads per slot
  localparam int unsigned MW = $clog2(M > 1 ? M : 2);

  logic [MW-1:0] ptr [C];
  logic [MW-1:0] sel_member;

  always_comb begin
    sel_valid  = 1'b0;
    sel_member = '0;
    // scan from the pointer, M members, wrapping around
    for (int k = M - 1; k >= 0; k--) begin
      int unsigned m;
      m = (int'(ptr[slot]) + k) % M;
      if (ready[m * C + int'(slot)]) begin
        sel_valid  = 1'b1;
        sel_member = MW'(m);
      end
    end
    sel_tid = 8'(int'(sel_member) * C + int'(slot));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < C; s++) ptr[s] <= '0;
    end else if (advance && sel_valid) begin
      ptr[slot] <= (int'(sel_member) == M - 1) ? '0 : sel_member + 1'b1;
    end
  end
endmodule
