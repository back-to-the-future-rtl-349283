// Shared store buffer with one entry per hardware thread.
//
// A store leaves the memory stage by writing its word address and data into
// its thread's entry; if that entry still holds an earlier store, the core
// freezes until the entry drains. Loads check the addresses of all entries
// and, on a match, take the data from the buffer (store-to-load forwarding),
// which resolves read-after-write hazards between a store that has not yet
// reached memory and a later load. The load's own thread's entry wins when
// several match, otherwise the lowest-numbered matching entry. Entries drain
// one at a time, in round-robin order, to the write-through memory port; the
// entry chosen for draining stays chosen until the memory accepts it.
// Addresses are physical word addresses, already translated by the data TLB
// (all stores are full words in this design).
// Interface: `ins_*` inserts at the clock edge; `ins_full` is combinational
// for `ins_tid`. `lk_*` is a combinational lookup. `dr_valid/dr_addr/dr_data`
// present the drain request, held until `dr_ack` removes the entry at the
// clock edge.
module store_buffer #(
  parameter int unsigned T = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ins_en,
  input  logic [7:0]  ins_tid,
  input  logic [31:0] ins_addr,
  input  logic [31:0] ins_data,
  output logic        ins_full,
  input  logic [7:0]  lk_tid,
  input  logic [31:0] lk_addr,
  output logic        lk_hit,
  output logic [31:0] lk_data,
  output logic        dr_valid,
  output logic [31:0] dr_addr,
  output logic [31:0] dr_data,
  input  logic        dr_ack,
  output logic        empty
);
  localparam int unsigned IW = $clog2(T > 1 ? T : 2);

  logic [T-1:0] v;
  logic [29:0]  a [T];
  logic [31:0]  d [T];
  logic [IW-1:0] ptr, rsel, dsel;
  logic          locked;

  assign ins_full = v[ins_tid[IW-1:0]];
  assign empty    = (v == '0);

  always_comb begin
    lk_hit  = 1'b0;
    lk_data = '0;
    for (int i = T - 1; i >= 0; i--) begin
      if (v[i] && a[i] == lk_addr[31:2]) begin
        lk_hit  = 1'b1;
        lk_data = d[i];
      end
    end
    if (v[lk_tid[IW-1:0]] && a[lk_tid[IW-1:0]] == lk_addr[31:2]) begin
      lk_hit  = 1'b1;
      lk_data = d[lk_tid[IW-1:0]];
    end
  end

  always_comb begin
    dr_valid = 1'b0;
    rsel     = '0;
    for (int k = T - 1; k >= 0; k--) begin
      int unsigned i;
      i = (int'(ptr) + k) % T;
      if (v[i]) begin
        dr_valid = 1'b1;
        rsel     = IW'(i);
      end
    end
    if (locked) dr_valid = 1'b1;
    dsel    = locked ? ptr : rsel;
    dr_addr = {a[dsel], 2'b00};
    dr_data = d[dsel];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v      <= '0;
      ptr    <= '0;
      locked <= 1'b0;
    end else begin
      // while locked, ptr names the entry being drained
      if (dr_ack && dr_valid) begin
        v[dsel] <= 1'b0;
        ptr     <= (int'(dsel) == T - 1) ? '0 : dsel + 1'b1;
        locked  <= 1'b0;
      end else if (dr_valid && !locked) begin
        ptr    <= rsel;
        locked <= 1'b1;
      end
      if (ins_en && !v[ins_tid[IW-1:0]]) begin
        v[ins_tid[IW-1:0]] <= 1'b1;
        a[ins_tid[IW-1:0]] <= ins_addr[31:2];
        d[ins_tid[IW-1:0]] <= ins_data;
      end
    end
  end
endmodule
