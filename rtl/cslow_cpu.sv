// C-slow retimed, time-multiplexed multithreaded MIPS core.
//
// The core is a single-issue, in-order, five-stage MIPS pipeline (fetch,
// decode, execute, memory, writeback) in which each of the four major
// pipeline registers is a chain of C minor registers (cslow_stage_reg). This
// gives 4C+1 stages (33 for C=8). Every clock cycle carries a time-slot ID,
// counting 0..C-1 round and round, and each of the T hardware threads is
// bound to slot tid mod C. Because every chain is exactly C deep, all stages
// work on the same time slot in a given cycle, so the stage logic, forwarding
// and hazard handling of the baseline five-stage pipeline are reused
// unchanged: from one thread's point of view the core is the baseline core
// running at 1/C of the clock.
//
// Fetch: the time slot picks T/C threads, a round-robin choice among the ready
//   ones picks the thread (thread_select), and that slot's private I-cache
//   bank (icache_bank, one per slot) supplies the instruction. An I-cache miss
//   parks the thread until its bank's refill completes. Each bank has its own
//   instruction TLB (tlb); a TLB miss parks the thread the same way until
//   the walk has filled that TLB.
// Decode: MIPS decode (mips_decoder) and the register file of the slot,
//   bank tid / C (regfile_cslow). An instruction that is not a multiply or
//   divide, from a thread with mul/div operations still in flight, is
//   replayed and the thread parked until they finish, so results are never
//   written out of order.
// Execute: ALU (int_alu), branch resolution (branch_unit), mul/div issue
//   into the 32C-cycle pipelined unit (muldiv_pipe) that writes the thread's
//   HI/LO. Operands are forwarded from the memory and writeback stages when
//   the producing instruction belongs to the same thread. MIPS delay slots are
//   kept; on a taken branch the one instruction of the thread fetched after
//   the delay slot is nullified.
// Memory: loads look in the shared store buffer (store_buffer, one entry per
//   thread) and then in the shared banked D-cache (dcache_banked). A bank
//   conflict freezes the whole pipeline; a miss replays the load, switches
//   the slot to the thread's siblings and parks the thread until its bank is
//   refilled. Stores go to the store buffer; a store whose thread entry is
//   still occupied freezes the pipeline until that entry drains. Addresses
//   are first translated by the data TLB of the addressed bank; a TLB miss
//   replays the load or store like a cache miss and parks the thread until
//   the walk has filled that TLB.
// Writeback: the slot's register file, bank tid / C.
// Refills and store write-through share one next-level memory port through
// mem_arbiter. The MCML cells (universal gate feeding a master-slave DFF)
// are instantiated alongside as a standalone cell check, with their own pins.
//
// Design choices not fixed by the source: the MIPS subset (see
// mips_decoder), no FPU, 4-KB pages with page-table walks answered outside
// the core through the pw_* port, no exceptions or interrupts, word-only
// loads and stores, write-through D-cache without write allocation, threads
// start at boot_pc[t] when thread_en[t] is set, replay-based thread switching
// on misses, and the memory port protocol.
//
// Interface: clk, rst (synchronous, active high); thread_en/boot_pc; the
// memory port m_* (request held until m_ack; reads end with m_rvalid and a
// whole line on m_rdata); the page-walk port pw_* (same protocol, one word:
// the virtual page base goes out, the physical page base comes back); perf, one-cycle event pulses; ug_*/ff_* MCML cell
// pins.
module cslow_cpu
  import cslow_pkg::*;
#(
  parameter int unsigned C           = 8,
  parameter int unsigned T           = 16,
  parameter int unsigned ICACHE_BYTES = 16384,
  parameter int unsigned DBANK_BYTES = 16384,
  parameter int unsigned DWAYS       = 4,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned BANK_BUSY   = 2,
  parameter int unsigned MD_STAGES   = 32,
  parameter int unsigned TLB_ENTRIES = 32,
  parameter int unsigned TLB_WAYS    = 4,
  parameter int unsigned PAGE_BITS   = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [T-1:0]            thread_en,
  input  logic [31:0]             boot_pc [T],
  // next-level memory port
  output logic                    m_req,
  output logic                    m_we,
  output logic [31:0]             m_addr,
  output logic [31:0]             m_wdata,
  input  logic                    m_ack,
  input  logic                    m_rvalid,
  input  logic [LINE_BYTES*8-1:0] m_rdata,
  // page-table walk port (virtual page base out, physical page base back)
  output logic                    pw_req,
  output logic [31:0]             pw_addr,
  input  logic                    pw_ack,
  input  logic                    pw_rvalid,
  input  logic [31:0]             pw_rdata,
  // events
  output perf_ev_t                perf,
  // MCML cell check pins
  input  logic [5:0]              ug_in,
  output logic [1:0]              ug_out,
  output logic [1:0]              ff_q
);
  localparam int unsigned NBANK = C;           // shared D-cache banks
  localparam int unsigned M     = T / C;       // threads per slot
  localparam int unsigned SLW   = $clog2(C > 1 ? C : 2);
  localparam int unsigned BKW   = $clog2(M > 1 ? M : 2);
  localparam int unsigned NREQ  = C + NBANK + 1;
  localparam int unsigned LB    = LINE_BYTES * 8;
  localparam int unsigned OB    = $clog2(LINE_BYTES);
  localparam int unsigned NTLB  = C + NBANK;   // walk requesters: I-TLBs, then D-TLBs
  localparam int unsigned TW    = $clog2(T > 1 ? T : 2);

  localparam int unsigned W_FD = $bits(if_id_t);
  localparam int unsigned W_DE = $bits(id_ex_t);
  localparam int unsigned W_EM = $bits(ex_mem_t);
  localparam int unsigned W_MW = $bits(mem_wb_t);

  // ------------------------------------------------------------------
  // time slot and freeze
  // ------------------------------------------------------------------
  logic           freeze, en;
  logic [SLW-1:0] slot;
  assign en = !freeze;

  slot_counter #(.C(C)) u_slot (.clk(clk), .rst(rst), .freeze(freeze), .slot(slot));

  // ------------------------------------------------------------------
  // per-thread state
  // ------------------------------------------------------------------
  word_t       pc  [T];
  word_t       npc [T];
  word_t       hi  [T];
  word_t       lo  [T];
  logic [T-1:0] imiss_wait, dmiss_wait, md_wait, itlb_wait, dtlb_wait;
  logic [SLW-1:0] dmiss_bank [T];
  logic [5:0]  md_pending [T];
  logic [T-1:0] ready;

  // ------------------------------------------------------------------
  // pipeline chains
  // ------------------------------------------------------------------
  if_id_t  fd_d, fd;
  id_ex_t  de_d, de;
  ex_mem_t em_d, em;
  mem_wb_t mw_d, mw;
  logic [W_FD-1:0] fd_q;
  logic [W_DE-1:0] de_q;
  logic [W_EM-1:0] em_q;
  logic [W_MW-1:0] mw_q;

  cslow_stage_reg #(.C(C), .W(W_FD)) u_fd (.clk(clk), .rst(rst), .en(en), .d(W_FD'(fd_d)), .q(fd_q));
  cslow_stage_reg #(.C(C), .W(W_DE)) u_de (.clk(clk), .rst(rst), .en(en), .d(W_DE'(de_d)), .q(de_q));
  cslow_stage_reg #(.C(C), .W(W_EM)) u_em (.clk(clk), .rst(rst), .en(en), .d(W_EM'(em_d)), .q(em_q));
  cslow_stage_reg #(.C(C), .W(W_MW)) u_mw (.clk(clk), .rst(rst), .en(en), .d(W_MW'(mw_d)), .q(mw_q));
  assign fd = if_id_t'(fd_q);
  assign de = id_ex_t'(de_q);
  assign em = ex_mem_t'(em_q);
  assign mw = mem_wb_t'(mw_q);

  // thread IDs cut to the width that indexes the per-thread state
  logic [TW-1:0] sel_t, fd_t, de_t, em_t, md_t;

  // cross-stage control (defined below)
  logic  mem_replay, id_replay, br_take, nullify;
  word_t br_target;
  word_t fd_npc;

  // ------------------------------------------------------------------
  // memory arbiter signals
  // ------------------------------------------------------------------
  logic [NREQ-1:0] a_req, a_wr, a_gnt, a_rv;
  word_t           a_addr  [NREQ];
  word_t           a_wdata [NREQ];
  logic [LB-1:0]   a_rdata;

  // page-table walk arbiter signals
  logic [NTLB-1:0] w_req, w_gnt, w_rv;
  word_t           w_addr  [NTLB];
  word_t           w_zero  [NTLB];
  word_t           w_rdata;

  // ------------------------------------------------------------------
  // FETCH
  // ------------------------------------------------------------------
  logic       sel_valid;
  tid_t       sel_tid;
  logic [C-1:0] ib_hit, ib_fill;
  word_t      ib_instr [C];
  logic       ihit, kill_if, fetch_ok, imiss, itmiss;
  word_t      if_pc, if_npc, if_pa;
  logic [C-1:0] it_hit_v, it_fill;
  word_t      it_pa [C];
  logic       it_hit;

  always_comb
    for (int t = 0; t < T; t++)
      ready[t] = thread_en[t] && !imiss_wait[t] && !dmiss_wait[t] && !md_wait[t] &&
                 !itlb_wait[t] && !dtlb_wait[t];

  thread_select #(.C(C), .T(T)) u_tsel (
    .clk(clk), .rst(rst), .slot(slot), .ready(ready), .advance(en),
    .sel_valid(sel_valid), .sel_tid(sel_tid)
  );

  assign sel_t = TW'(sel_tid);
  assign fd_t  = TW'(fd.tid);
  assign de_t  = TW'(de.tid);
  assign em_t  = TW'(em.tid);
  assign if_pc = pc[sel_t];

  // one instruction TLB per I-cache bank; the bank is only reached on a
  // TLB hit, with the physical address
  for (genvar b = 0; b < C; b++) begin : g_itlb
    tlb #(.ENTRIES(TLB_ENTRIES), .WAYS(TLB_WAYS), .PAGE_BITS(PAGE_BITS)) u_itlb (
      .clk(clk), .rst(rst),
      .lk_vaddr(if_pc), .lk_hit(it_hit_v[b]), .lk_paddr(it_pa[b]),
      .miss(en && itmiss && slot == SLW'(b)), .fill_done(it_fill[b]),
      .w_req(w_req[b]), .w_addr(w_addr[b]), .w_gnt(w_gnt[b]),
      .w_rvalid(w_rv[b]), .w_rdata(w_rdata)
    );
  end
  assign it_hit = it_hit_v[slot];
  assign if_pa  = it_pa[slot];

  for (genvar b = 0; b < C; b++) begin : g_ibank
    icache_bank #(.SIZE_BYTES(ICACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_ic (
      .clk(clk), .rst(rst),
      .req(en && sel_valid && slot == SLW'(b) && !kill_if && it_hit), .addr(if_pa),
      .hit(ib_hit[b]), .instr(ib_instr[b]), .fill_done(ib_fill[b]),
      .mreq(a_req[b]), .mreq_addr(a_addr[b]), .mgnt(a_gnt[b]),
      .mrvalid(a_rv[b]), .mrdata(a_rdata)
    );
    assign a_wr[b]    = 1'b0;
    assign a_wdata[b] = '0;
  end

  assign ihit = it_hit && ib_hit[slot];

  // the delay slot of a branch resolving now is being fetched now
  logic br_same_if, ds_in_id;
  assign br_same_if = br_take && sel_valid && de.tid == sel_tid;
  assign ds_in_id   = fd.valid && fd.tid == de.tid;
  assign nullify    = br_same_if && ds_in_id;
  assign kill_if    = (mem_replay && em.tid == sel_tid) ||
                      (id_replay && fd.tid == sel_tid) || nullify;
  assign fetch_ok   = sel_valid && ihit && !kill_if;
  assign itmiss     = sel_valid && !it_hit && !kill_if;
  assign imiss      = sel_valid && it_hit && !ib_hit[slot] && !kill_if;
  assign if_npc     = (br_same_if && !ds_in_id) ? br_target : npc[sel_t];

  always_comb begin
    fd_d       = '0;
    fd_d.valid = fetch_ok;
    fd_d.tid   = sel_tid;
    fd_d.pc    = if_pc;
    fd_d.npc   = if_npc;
    fd_d.instr = ib_instr[slot];
  end

  // ------------------------------------------------------------------
  // DECODE
  // ------------------------------------------------------------------
  dec_t  dec;
  word_t rf_rd1, rf_rd2;
  logic  kill_id, md_hazard;
  logic  wb_we;

  mips_decoder u_dec (.instr(fd.instr), .dec(dec));

  regfile_cslow #(.C(C), .T(T)) u_rf (
    .clk(clk),
    .rd_slot(slot), .rd_bank(BKW'(fd.tid / C)), .ra1(dec.rs), .ra2(dec.rt),
    .rd1(rf_rd1), .rd2(rf_rd2),
    .we(wb_we), .wr_slot(slot), .wr_bank(BKW'(mw.tid / C)), .wa(mw.dest), .wd(mw.result)
  );

  assign kill_id   = mem_replay && em.tid == fd.tid;
  assign md_hazard = !dec.is_md &&
                     (md_pending[fd_t] != '0 || (de.valid && de.dec.is_md && de.tid == fd.tid));
  assign id_replay = fd.valid && !kill_id && md_hazard;
  assign fd_npc    = (br_take && ds_in_id) ? br_target : fd.npc;

  always_comb begin
    de_d        = '0;
    de_d.valid  = fd.valid && !kill_id && !id_replay;
    de_d.tid    = fd.tid;
    de_d.pc     = fd.pc;
    de_d.npc    = fd_npc;
    de_d.dec    = dec;
    de_d.rs_val = rf_rd1;
    de_d.rt_val = rf_rd2;
  end

  // ------------------------------------------------------------------
  // EXECUTE
  // ------------------------------------------------------------------
  logic  kill_ex, ex_ok;
  word_t mem_result;
  word_t opa, opb, alu_b, alu_y, ex_result;
  logic [4:0] ex_shamt;
  logic  fwd_a_m, fwd_a_w, fwd_b_m, fwd_b_w;
  logic  br_taken_raw;
  logic  md_issue;

  assign kill_ex = mem_replay && em.tid == de.tid;
  assign ex_ok   = de.valid && !kill_ex;

  always_comb begin
    fwd_a_m = em.valid && em.reg_write && em.tid == de.tid && em.dest == de.dec.rs;
    fwd_b_m = em.valid && em.reg_write && em.tid == de.tid && em.dest == de.dec.rt;
    fwd_a_w = mw.valid && mw.reg_write && mw.tid == de.tid && mw.dest == de.dec.rs;
    fwd_b_w = mw.valid && mw.reg_write && mw.tid == de.tid && mw.dest == de.dec.rt;
    opa = fwd_a_m ? mem_result : fwd_a_w ? mw.result : de.rs_val;
    opb = fwd_b_m ? mem_result : fwd_b_w ? mw.result : de.rt_val;
  end

  assign alu_b    = de.dec.use_imm ? de.dec.imm : opb;
  assign ex_shamt = de.dec.shamt_var ? opa[4:0] : de.dec.shamt;

  int_alu u_alu (.op(de.dec.alu_op), .a(opa), .b(alu_b), .shamt(ex_shamt), .y(alu_y));

  branch_unit u_br (
    .br(de.dec.br), .jump_reg(de.dec.jump_reg), .jidx(de.dec.jidx), .pc(de.pc),
    .imm(de.dec.imm), .rs_val(opa), .rt_val(opb), .taken(br_taken_raw), .target(br_target)
  );
  assign br_take = ex_ok && de.dec.br != BR_NONE && br_taken_raw;

  always_comb begin
    if (de.dec.link)      ex_result = de.pc + 32'd8;
    else if (de.dec.mfhi) ex_result = hi[de_t];
    else if (de.dec.mflo) ex_result = lo[de_t];
    else                  ex_result = alu_y;
  end

  always_comb begin
    em_d            = '0;
    em_d.valid      = ex_ok;
    em_d.tid        = de.tid;
    em_d.pc         = de.pc;
    em_d.npc        = de.npc;
    em_d.dest       = de.dec.dest;
    em_d.reg_write  = de.dec.reg_write;
    em_d.result     = ex_result;
    em_d.is_load    = de.dec.is_load;
    em_d.is_store   = de.dec.is_store;
    em_d.store_data = opb;
  end

  // multiply / divide unit
  logic  md_out_valid;
  tid_t  md_out_tid;
  word_t md_out_hi, md_out_lo;
  assign md_issue = ex_ok && de.dec.is_md;

  muldiv_pipe #(.C(C), .STAGES(MD_STAGES)) u_md (
    .clk(clk), .rst(rst), .en(en),
    .in_valid(md_issue), .in_op(de.dec.md_op), .in_tid(de.tid), .in_a(opa), .in_b(opb),
    .out_valid(md_out_valid), .out_tid(md_out_tid), .out_hi(md_out_hi), .out_lo(md_out_lo)
  );
  assign md_t = TW'(md_out_tid);

  // ------------------------------------------------------------------
  // MEMORY
  // ------------------------------------------------------------------
  logic  is_ld, is_st, sb_hit, sb_full, sb_dr_valid, sb_empty;
  word_t sb_data, sb_dr_addr, sb_dr_data;
  logic  dc_req, dc_hit, dc_conflict;
  word_t dc_data;
  logic [SLW-1:0] dc_bank;
  logic [NBANK-1:0] dc_fill;
  logic  dc_refill_busy;
  logic  sb_stall, dc_miss;
  logic  dt_hit, dt_miss;
  logic [SLW-1:0] dt_bank;
  logic [NBANK-1:0] dt_hit_v, dt_fill;
  word_t dt_pa [NBANK];
  word_t mem_pa;

  assign is_ld = em.valid && em.is_load;
  assign is_st = em.valid && em.is_store;

  // one data TLB per D-cache bank. The bank bits lie inside the page offset
  // (PAGE_BITS >= OB + log2(NBANK)), so the virtual address picks the bank
  // and its TLB before translation. Loads and stores use physical addresses
  // from here on, in the store buffer as in the cache.
  assign dt_bank = SLW'((em.result >> OB) % NBANK);
  for (genvar b = 0; b < NBANK; b++) begin : g_dtlb
    tlb #(.ENTRIES(TLB_ENTRIES), .WAYS(TLB_WAYS), .PAGE_BITS(PAGE_BITS)) u_dtlb (
      .clk(clk), .rst(rst),
      .lk_vaddr(em.result), .lk_hit(dt_hit_v[b]), .lk_paddr(dt_pa[b]),
      .miss(en && dt_miss && dt_bank == SLW'(b)), .fill_done(dt_fill[b]),
      .w_req(w_req[C + b]), .w_addr(w_addr[C + b]), .w_gnt(w_gnt[C + b]),
      .w_rvalid(w_rv[C + b]), .w_rdata(w_rdata)
    );
  end
  assign dt_hit  = dt_hit_v[dt_bank];
  assign mem_pa  = dt_pa[dt_bank];
  assign dt_miss = (is_ld || is_st) && !dt_hit;

  store_buffer #(.T(T)) u_sb (
    .clk(clk), .rst(rst),
    .ins_en(is_st && dt_hit && !sb_full && en), .ins_tid(em.tid), .ins_addr(mem_pa),
    .ins_data(em.store_data), .ins_full(sb_full),
    .lk_tid(em.tid), .lk_addr(mem_pa), .lk_hit(sb_hit), .lk_data(sb_data),
    .dr_valid(sb_dr_valid), .dr_addr(sb_dr_addr), .dr_data(sb_dr_data),
    .dr_ack(a_gnt[NREQ-1]), .empty(sb_empty)
  );
  assign a_req[NREQ-1]   = sb_dr_valid;
  assign a_wr[NREQ-1]    = 1'b1;
  assign a_addr[NREQ-1]  = sb_dr_addr;
  assign a_wdata[NREQ-1] = sb_dr_data;

  assign dc_req = is_ld && dt_hit && !sb_hit;

  dcache_banked #(
    .NBANK(NBANK), .BANK_BYTES(DBANK_BYTES), .WAYS(DWAYS),
    .LINE_BYTES(LINE_BYTES), .BANK_BUSY(BANK_BUSY)
  ) u_dc (
    .clk(clk), .rst(rst),
    .ld_req(dc_req), .ld_addr(mem_pa), .ld_hit(dc_hit), .ld_data(dc_data),
    .conflict(dc_conflict), .ld_bank(dc_bank),
    .wr_en(a_gnt[NREQ-1]), .wr_addr(sb_dr_addr), .wr_data(sb_dr_data),
    .fill_done(dc_fill), .refill_busy(dc_refill_busy),
    .mreq(a_req[C +: NBANK]), .mreq_addr(a_addr[C +: NBANK]), .mgnt(a_gnt[C +: NBANK]),
    .mrvalid(a_rv[C +: NBANK]), .mrdata(a_rdata)
  );
  for (genvar b = 0; b < NBANK; b++) begin : g_dwr
    assign a_wr[C + b]    = 1'b0;
    assign a_wdata[C + b] = '0;
  end

  assign sb_stall   = is_st && dt_hit && sb_full;
  assign freeze     = dc_conflict || sb_stall;
  assign dc_miss    = dc_req && !dc_conflict && !dc_hit;
  assign mem_replay = dc_miss || dt_miss;
  assign mem_result = is_ld ? (sb_hit ? sb_data : dc_data) : em.result;

  always_comb begin
    mw_d           = '0;
    mw_d.valid     = em.valid && !mem_replay;
    mw_d.tid       = em.tid;
    mw_d.dest      = em.dest;
    mw_d.reg_write = em.reg_write;
    mw_d.result    = mem_result;
  end

  // ------------------------------------------------------------------
  // WRITEBACK
  // ------------------------------------------------------------------
  assign wb_we = en && mw.valid && mw.reg_write;

  // ------------------------------------------------------------------
  // next-level memory arbiter
  // ------------------------------------------------------------------
  mem_arbiter #(.N(NREQ), .LINE_BYTES(LINE_BYTES)) u_arb (
    .clk(clk), .rst(rst),
    .req(a_req), .is_wr(a_wr), .addr(a_addr), .wdata(a_wdata),
    .gnt(a_gnt), .rvalid(a_rv), .rdata(a_rdata),
    .m_req(m_req), .m_we(m_we), .m_addr(m_addr), .m_wdata(m_wdata),
    .m_ack(m_ack), .m_rvalid(m_rvalid), .m_rdata(m_rdata)
  );

  // page-table walks share one port through a second arbiter, one word wide
  for (genvar i = 0; i < NTLB; i++) begin : g_wz
    assign w_zero[i] = '0;
  end

  mem_arbiter #(.N(NTLB), .LINE_BYTES(4)) u_warb (
    .clk(clk), .rst(rst),
    .req(w_req), .is_wr('0), .addr(w_addr), .wdata(w_zero),
    .gnt(w_gnt), .rvalid(w_rv), .rdata(w_rdata),
    .m_req(pw_req), .m_we(), .m_addr(pw_addr), .m_wdata(),
    .m_ack(pw_ack), .m_rvalid(pw_rvalid), .m_rdata(pw_rdata)
  );

  // ------------------------------------------------------------------
  // per-thread state update
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < T; t++) begin
        pc[t]         <= boot_pc[t];
        npc[t]        <= boot_pc[t] + 32'd4;
        md_pending[t] <= '0;
        dmiss_bank[t] <= '0;
        hi[t]         <= '0;
        lo[t]         <= '0;
      end
      imiss_wait <= '0;
      dmiss_wait <= '0;
      md_wait    <= '0;
      itlb_wait  <= '0;
      dtlb_wait  <= '0;
    end else begin
      // wake-ups happen even while frozen
      for (int t = 0; t < T; t++) begin
        if (ib_fill[t % C]) imiss_wait[t] <= 1'b0;
        if (dc_fill[dmiss_bank[t]]) dmiss_wait[t] <= 1'b0;
        if (it_fill[t % C]) itlb_wait[t] <= 1'b0;
        if (dt_fill[dmiss_bank[t]]) dtlb_wait[t] <= 1'b0;
      end
      if (en) begin
        for (int t = 0; t < T; t++) begin
          logic [5:0] pend;
          pend = md_pending[t];
          if (md_issue && de.tid == tid_t'(t)) pend = pend + 1'b1;
          if (md_out_valid && md_out_tid == tid_t'(t)) pend = pend - 1'b1;
          md_pending[t] <= pend;
          if (md_wait[t] && md_pending[t] == '0) md_wait[t] <= 1'b0;

          if (mem_replay && em.tid == tid_t'(t)) begin
            pc[t]  <= em.pc;
            npc[t] <= em.npc;
          end else if (id_replay && fd.tid == tid_t'(t)) begin
            pc[t]  <= fd.pc;
            npc[t] <= fd_npc;
          end else if (br_take && de.tid == tid_t'(t)) begin
            if (ds_in_id || (fetch_ok && sel_tid == tid_t'(t))) begin
              pc[t]  <= br_target;
              npc[t] <= br_target + 32'd4;
            end else begin
              npc[t] <= br_target;
            end
          end else if (fetch_ok && sel_tid == tid_t'(t)) begin
            pc[t]  <= npc[t];
            npc[t] <= npc[t] + 32'd4;
          end
        end
        if (md_out_valid) begin
          hi[md_t] <= md_out_hi;
          lo[md_t] <= md_out_lo;
        end
        if (imiss && !ib_fill[slot]) imiss_wait[sel_t] <= 1'b1;
        if (itmiss && !it_fill[slot]) itlb_wait[sel_t] <= 1'b1;
        if (dc_miss && !dc_fill[dc_bank]) begin
          dmiss_wait[em_t] <= 1'b1;
          dmiss_bank[em_t] <= dc_bank;
        end
        if (dt_miss && !dt_fill[dt_bank]) begin
          dtlb_wait[em_t]  <= 1'b1;
          dmiss_bank[em_t] <= dt_bank;
        end
        if (id_replay) md_wait[fd_t] <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------
  // events
  // ------------------------------------------------------------------
  always_comb begin
    perf                = '0;
    perf.fetch          = en && fetch_ok;
    perf.retire         = en && mw.valid;
    perf.imiss_switch   = en && imiss;
    perf.dmiss_switch   = en && dc_miss;
    perf.itlb_switch    = en && itmiss;
    perf.dtlb_switch    = en && dt_miss;
    perf.md_block       = en && id_replay;
    perf.md_done        = en && md_out_valid;
    perf.branch_taken   = en && br_take;
    perf.branch_nullify = en && nullify;
    perf.bank_conflict  = dc_conflict;
    perf.sb_full_stall  = sb_stall;
    perf.sb_forward     = en && is_ld && sb_hit;
    perf.fwd_ex         = en && ex_ok && (fwd_a_m || fwd_b_m);
    perf.fwd_wb         = en && ex_ok && !(fwd_a_m || fwd_b_m) && (fwd_a_w || fwd_b_w);
    perf.slot_idle      = en && !sel_valid;
  end

  // ------------------------------------------------------------------
  // MCML cell check: universal gate into a master-slave DFF
  // ------------------------------------------------------------------
  mcml_ugate u_ug (
    .in1(ug_in[0]), .in2(ug_in[1]), .in3(ug_in[2]), .in4(ug_in[3]), .in5(ug_in[4]), .in6(ug_in[5]),
    .out(ug_out[0]), .out_b(ug_out[1])
  );
  mcml_dff u_ff (.clk(clk), .clk_b(!clk), .d(ug_out[0]), .d_b(ug_out[1]), .q(ff_q[0]), .q_b(ff_q[1]));

  // a frozen pipeline must be caused by the memory stage
  a_freeze_cause: assert property (@(posedge clk) disable iff (rst) freeze |-> em.valid);
endmodule
