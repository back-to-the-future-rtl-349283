// One private instruction-cache bank (one bank per time slot).
//
// Direct-mapped, SIZE_BYTES of data in LINE_BYTES lines. The bank is read
// only in its own time slot, so it never sees two threads at once and has no
// bank conflicts. A lookup is combinational on `addr`. When a fetch (`req`)
// misses and no refill is in flight, the bank requests the line from the
// next memory level and waits; `fill_done` pulses in the cycle the line is
// written, which is when threads parked on this miss become ready again.
// Interface to the memory arbiter: `mreq`/`mreq_addr` held until `mgnt`,
// then the whole line arrives with `mrvalid`/`mrdata` (word 0 in bits 31:0).
// Timing: hit/instr are combinational; state changes on the clock edge.
module icache_bank #(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       req,
  input  logic [31:0]                addr,
  output logic                       hit,
  output logic [31:0]                instr,
  output logic                       fill_done,
  // refill port
  output logic                       mreq,
  output logic [31:0]                mreq_addr,
  input  logic                       mgnt,
  input  logic                       mrvalid,
  input  logic [LINE_BYTES*8-1:0]    mrdata
);
  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned WPL   = LINE_BYTES / 4;          // words per line
  localparam int unsigned OB    = $clog2(LINE_BYTES);      // offset bits
  localparam int unsigned IB    = $clog2(LINES);           // index bits
  localparam int unsigned TB    = 32 - OB - IB;            // tag bits

  logic [31:0]   data  [LINES * WPL];
  logic [TB-1:0] tags  [LINES];
  logic [LINES-1:0] valid;

  logic [IB-1:0] idx;
  logic [TB-1:0] tag;
  assign idx = addr[OB +: IB];
  assign tag = addr[31 -: TB];

  assign hit   = valid[idx] && tags[idx] == tag;
  assign instr = data[{idx, addr[OB-1:2]}];

  typedef enum logic [1:0] { IDLE, REQ, WAIT } st_e;
  st_e         st;
  logic [31:0] maddr;

  assign mreq      = (st == REQ);
  assign mreq_addr = maddr;
  assign fill_done = (st == WAIT) && mrvalid;

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= IDLE;
      valid <= '0;
      maddr <= '0;
    end else begin
      unique case (st)
        IDLE: if (req && !hit) begin
          st    <= REQ;
          maddr <= {addr[31:OB], {OB{1'b0}}};
        end
        REQ:  if (mgnt) st <= WAIT;
        WAIT: if (mrvalid) begin
          st <= IDLE;
          valid[maddr[OB +: IB]] <= 1'b1;
          tags[maddr[OB +: IB]]  <= maddr[31 -: TB];
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == WAIT && mrvalid)
      for (int w = 0; w < WPL; w++)
        data[{maddr[OB +: IB], w[OB-3:0]}] <= mrdata[w*32 +: 32];
  end
endmodule
