// Translation lookaside buffer, used both as the instruction TLB of each
// I-cache bank and as the data TLB of each D-cache bank.
//
// ENTRIES translations in a WAYS-way set-associative array (32 entries in
// 4 ways, so 8 sets). The set is chosen by the low bits of the virtual page
// number, and the rest of it is the tag. The lookup is combinational:
// `lk_vaddr` in, `lk_hit` and the physical address `lk_paddr` out, with the
// page offset passed through unchanged. When the user sees a miss it raises
// `miss`. If no walk is in flight, the TLB latches that page and asks the
// page-table walker for its translation. The answer is written into the
// set's round-robin victim way, and `fill_done` pulses in that cycle, which
// is when the threads parked on this TLB are woken to try again.
// The size and associativity follow the source. The page size (4 KB), the
// round-robin replacement, the missing address-space tag (all threads share
// one address space), the walk protocol and the reset state (all entries
// invalid) are this design's choices.
// Walk interface: `w_req`/`w_addr` (page base, virtual) held until `w_gnt`,
// then the physical page base arrives on `w_rdata` with `w_rvalid`. This is
// the same request/grant/return protocol as the cache refills, so walks go
// through a mem_arbiter.
module tlb #(
  parameter int unsigned ENTRIES   = 32,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned PAGE_BITS = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] lk_vaddr,
  output logic        lk_hit,
  output logic [31:0] lk_paddr,
  input  logic        miss,
  output logic        fill_done,
  // page-table walk port
  output logic        w_req,
  output logic [31:0] w_addr,
  input  logic        w_gnt,
  input  logic        w_rvalid,
  input  logic [31:0] w_rdata
);
  localparam int unsigned SETS = ENTRIES / WAYS;
  localparam int unsigned VPNW = 32 - PAGE_BITS;
  localparam int unsigned SB   = $clog2(SETS > 1 ? SETS : 2);
  localparam int unsigned TGW  = VPNW - SB;
  localparam int unsigned WB   = $clog2(WAYS > 1 ? WAYS : 2);

  logic [TGW-1:0]  tags  [SETS][WAYS];
  logic [VPNW-1:0] ppns  [SETS][WAYS];
  logic [WAYS-1:0] valid [SETS];
  logic [WB-1:0]   rr    [SETS];

  logic [VPNW-1:0] vpn;
  logic [SB-1:0]   set;
  assign vpn = lk_vaddr[31:PAGE_BITS];
  assign set = vpn[SB-1:0];

  always_comb begin
    lk_hit   = 1'b0;
    lk_paddr = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[set][w] && tags[set][w] == vpn[VPNW-1 -: TGW]) begin
        lk_hit   = 1'b1;
        lk_paddr = {ppns[set][w], lk_vaddr[PAGE_BITS-1:0]};
      end
  end

  typedef enum logic [1:0] { IDLE, REQ, WAIT } st_e;
  st_e             st;
  logic [VPNW-1:0] wvpn;
  logic [SB-1:0]   wset;

  assign w_req     = (st == REQ);
  assign w_addr    = {wvpn, {PAGE_BITS{1'b0}}};
  assign fill_done = (st == WAIT) && w_rvalid;
  assign wset      = wvpn[SB-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= IDLE;
      wvpn <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        rr[s]    <= '0;
      end
    end else begin
      unique case (st)
        IDLE: if (miss && !lk_hit) begin
          st   <= REQ;
          wvpn <= vpn;
        end
        REQ:  if (w_gnt) st <= WAIT;
        WAIT: if (w_rvalid) begin
          st                  <= IDLE;
          valid[wset][rr[wset]] <= 1'b1;
          tags[wset][rr[wset]]  <= wvpn[VPNW-1 -: TGW];
          ppns[wset][rr[wset]]  <= w_rdata[31:PAGE_BITS];
          rr[wset]              <= (rr[wset] == WB'(WAYS - 1)) ? '0 : rr[wset] + 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end

  // a walk is only started for a page that really missed
  a_walk_on_miss: assert property (@(posedge clk) disable iff (rst)
    (st == IDLE && miss) |-> !lk_hit);
endmodule
