// Arbiter for the core's single port to the next memory level (the L2).
//
// N requesters share one port: the C instruction-cache banks, the NBANK data
// cache banks (line refills) and the store buffer (word writes). A
// round-robin pointer picks one pending request when the port is idle. A
// read holds the port until its line returns and the line is routed to the
// requester that asked; a write completes when the memory accepts it.
// Only one request is outstanding at a time (a choice of this design).
// Interface, requester side: `req[i]` is held until `gnt[i]` pulses; the line
// returns with `rvalid[i]` and the shared `rdata`. Requester i is a write when
// `is_wr[i]` is high. Memory side: `m_req`/`m_we`/`m_addr`/`m_wdata` held
// until `m_ack`; for reads, `m_rvalid` with `m_rdata` ends the transaction.
module mem_arbiter #(
  parameter int unsigned N          = 17,
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [N-1:0]            req,
  input  logic [N-1:0]            is_wr,
  input  logic [31:0]             addr  [N],
  input  logic [31:0]             wdata [N],
  output logic [N-1:0]            gnt,
  output logic [N-1:0]            rvalid,
  output logic [LINE_BYTES*8-1:0] rdata,
  output logic                    m_req,
  output logic                    m_we,
  output logic [31:0]             m_addr,
  output logic [31:0]             m_wdata,
  input  logic                    m_ack,
  input  logic                    m_rvalid,
  input  logic [LINE_BYTES*8-1:0] m_rdata
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  typedef enum logic [1:0] { IDLE, ISSUE, WAIT_DATA } st_e;
  st_e           st;
  logic [IW-1:0] ptr, cur, pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int k = N - 1; k >= 0; k--) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (req[i]) begin
        any  = 1'b1;
        pick = IW'(i);
      end
    end
  end

  assign m_req   = (st == ISSUE);
  assign m_we    = is_wr[cur];
  assign m_addr  = addr[cur];
  assign m_wdata = wdata[cur];
  assign rdata   = m_rdata;

  always_comb begin
    gnt    = '0;
    rvalid = '0;
    if (st == ISSUE && m_ack)        gnt[cur]    = 1'b1;
    if (st == WAIT_DATA && m_rvalid) rvalid[cur] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st  <= IDLE;
      ptr <= '0;
      cur <= '0;
    end else begin
      unique case (st)
        IDLE: if (any) begin
          st  <= ISSUE;
          cur <= pick;
          ptr <= (int'(pick) == N - 1) ? '0 : pick + 1'b1;
        end
        ISSUE: if (m_ack) st <= is_wr[cur] ? IDLE : WAIT_DATA;
        WAIT_DATA: if (m_rvalid) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  // a requester must hold its request until granted
  property p_hold;
    @(posedge clk) disable iff (rst) (st == ISSUE) |-> req[cur];
  endproperty
  assert property (p_hold) else $error("mem_arbiter: request dropped before grant");
endmodule
