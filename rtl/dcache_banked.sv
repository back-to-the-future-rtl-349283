// Shared, banked L1 data cache.
//
// NBANK banks of BANK_BYTES each, WAYS-way set associative, LINE_BYTES lines.
// Consecutive lines go to consecutive banks (bank = line address mod NBANK).
// All threads share all banks, so two loads that reach the same bank closer
// together than the bank's cycle time collide: a bank stays busy for
// BANK_BUSY clock cycles after it accepts a load, and a load that finds its
// bank busy raises `conflict`, on which the core freezes the whole pipeline
// until the bank is free again.
// A load that misses starts a refill of its line in that bank (one refill in
// flight per bank); the core replays the load and parks the thread until the
// bank's `fill_done` pulses. The replacement victim is chosen by a per-set
// round-robin pointer. Stores are written through: the store buffer drains a
// word to memory and to this cache (`wr_en`) only if the line is present; a
// store miss does not allocate. The store-write port is separate from the
// load port and does not occupy the bank.
// Interface: ld_req/ld_addr give ld_hit/ld_data/conflict combinationally;
// refills use mreq/mreq_addr/mgnt per bank and a shared mrvalid/mrdata line
// return. `refill_busy` is high while any refill is in flight.
module dcache_banked #(
  parameter int unsigned NBANK      = 8,
  parameter int unsigned BANK_BYTES = 16384,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned BANK_BUSY  = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  // pipeline load port
  input  logic                    ld_req,
  input  logic [31:0]             ld_addr,
  output logic                    ld_hit,
  output logic [31:0]             ld_data,
  output logic                    conflict,
  output logic [$clog2(NBANK > 1 ? NBANK : 2)-1:0] ld_bank,
  // write-through update from the store buffer
  input  logic                    wr_en,
  input  logic [31:0]             wr_addr,
  input  logic [31:0]             wr_data,
  // refill status
  output logic [NBANK-1:0]        fill_done,
  output logic                    refill_busy,
  // refill ports, one per bank
  output logic [NBANK-1:0]        mreq,
  output logic [31:0]             mreq_addr [NBANK],
  input  logic [NBANK-1:0]        mgnt,
  input  logic [NBANK-1:0]        mrvalid,
  input  logic [LINE_BYTES*8-1:0] mrdata
);
  localparam int unsigned SETS = BANK_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned WPL  = LINE_BYTES / 4;
  localparam int unsigned OB   = $clog2(LINE_BYTES);
  localparam int unsigned BB   = $clog2(NBANK > 1 ? NBANK : 2);
  localparam int unsigned SB   = $clog2(SETS);
  localparam int unsigned WB   = $clog2(WAYS > 1 ? WAYS : 2);
  localparam int unsigned TB   = 32 - OB - BB - SB;
  localparam int unsigned NLINE = NBANK * SETS * WAYS;
  localparam int unsigned CW   = $clog2(BANK_BUSY + 1);

  logic [31:0]      data  [NLINE * WPL];
  logic [TB-1:0]    tags  [NLINE];
  logic [NLINE-1:0] valid;
  logic [WB-1:0]    rr    [NBANK * SETS];
  logic [CW-1:0]    busy  [NBANK];

  function automatic int unsigned line_of(int unsigned b, int unsigned s, int unsigned w);
    return (b * SETS + s) * WAYS + w;
  endfunction

  // ---------------- load lookup ----------------
  logic [BB-1:0] lb;
  logic [SB-1:0] ls;
  logic [TB-1:0] lt;
  assign lb = BB'(ld_addr[OB +: BB]);
  assign ls = ld_addr[OB + BB +: SB];
  assign lt = ld_addr[31 -: TB];
  assign ld_bank = lb;

  always_comb begin
    ld_hit  = 1'b0;
    ld_data = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[line_of(int'(lb), int'(ls), w)] && tags[line_of(int'(lb), int'(ls), w)] == lt) begin
        ld_hit  = 1'b1;
        ld_data = data[line_of(int'(lb), int'(ls), w) * WPL + int'(ld_addr[OB-1:2])];
      end
    end
  end

  assign conflict = ld_req && (busy[lb] != '0);

  // ---------------- write-through update ----------------
  logic [BB-1:0] wb_;
  logic [SB-1:0] ws;
  logic [TB-1:0] wt;
  assign wb_ = BB'(wr_addr[OB +: BB]);
  assign ws  = wr_addr[OB + BB +: SB];
  assign wt  = wr_addr[31 -: TB];

  // ---------------- per-bank refill state ----------------
  typedef enum logic [1:0] { IDLE, REQ, WAIT } st_e;
  st_e         st    [NBANK];
  logic [31:0] maddr [NBANK];

  always_comb begin
    refill_busy = 1'b0;
    for (int b = 0; b < NBANK; b++) begin
      mreq[b]      = (st[b] == REQ);
      mreq_addr[b] = maddr[b];
      fill_done[b] = (st[b] == WAIT) && mrvalid[b];
      if (st[b] != IDLE) refill_busy = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= '0;
      for (int b = 0; b < NBANK; b++) begin
        st[b]    <= IDLE;
        maddr[b] <= '0;
        busy[b]  <= '0;
      end
      for (int i = 0; i < NBANK * SETS; i++) rr[i] <= '0;
    end else begin
      for (int b = 0; b < NBANK; b++) begin
        if (busy[b] != '0) busy[b] <= busy[b] - 1'b1;
        unique case (st[b])
          REQ:  if (mgnt[b]) st[b] <= WAIT;
          WAIT: if (mrvalid[b]) begin
            int unsigned s, v;
            s = int'(maddr[b][OB + BB +: SB]);
            v = int'(rr[b * SETS + s]);
            st[b] <= IDLE;
            valid[line_of(b, s, v)] <= 1'b1;
            tags[line_of(b, s, v)]  <= maddr[b][31 -: TB];
            rr[b * SETS + s]        <= WB'(v + 1);
          end
          default: ;
        endcase
      end
      if (ld_req && busy[lb] == '0) begin
        busy[lb] <= CW'(BANK_BUSY - 1);
        if (!ld_hit && st[lb] == IDLE) begin
          st[lb]    <= REQ;
          maddr[lb] <= {ld_addr[31:OB], {OB{1'b0}}};
        end
      end
    end
  end

  // data array: line fills and write-through word updates
  always_ff @(posedge clk) begin
    for (int b = 0; b < NBANK; b++) begin
      if (st[b] == WAIT && mrvalid[b]) begin
        int unsigned s, v;
        s = int'(maddr[b][OB + BB +: SB]);
        v = int'(rr[b * SETS + s]);
        for (int w = 0; w < WPL; w++)
          data[line_of(b, s, v) * WPL + w] <= mrdata[w*32 +: 32];
      end
    end
    if (wr_en) begin
      for (int w = 0; w < WAYS; w++)
        if (valid[line_of(int'(wb_), int'(ws), w)] && tags[line_of(int'(wb_), int'(ws), w)] == wt)
          data[line_of(int'(wb_), int'(ws), w) * WPL + int'(wr_addr[OB-1:2])] <= wr_data;
    end
  end
endmodule
