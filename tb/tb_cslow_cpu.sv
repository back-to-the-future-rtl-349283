// End-to-end testbench of cslow_cpu at its default parameters (C=8, T=16).
//
// Every hardware thread runs its own copy of a small MIPS program (generated
// here, one 1-KB code region per thread) that exercises multiply and divide,
// stores immediately reloaded, loads of one shared word, a counted loop with
// a useful delay-slot instruction followed by one that must run only once
// (it is the instruction over-fetched on every taken loop branch), shifts and compares, and a JAL/JR
// subroutine call. The results are stored to a per-thread data area; the
// testbench computes the expected values itself and compares them with its
// memory model once every thread has finished and the store buffer has
// drained. Threads 12-15 are enabled later than the others, so that some
// slots run one thread for a while and others two.
// A page-table walker model answers TLB misses with a mapping that moves
// every page, so untranslated accesses would miss the checked locations.
// The memory model answers on the core's next-level port: a request is
// accepted after one cycle, a line returns MEM_LAT cycles after that.
// Checks also cover that each mechanism of the core happened at least once:
// instruction- and data-miss and TLB-miss thread switches, mul/div blocking, branch
// nullification, D-cache bank conflicts, store-buffer forwarding and full
// stalls, both forwarding paths and idle slots.
module tb_cslow_cpu;
  import cslow_pkg::*;
  localparam int C = 8, T = 16, N_ITER = 8, SHV = 3, MEM_LAT = 12, WALK_LAT = 6;
  localparam int MEMW = 65536;                   // 256 KB of words

  logic clk = 0, rst = 1;
  logic [T-1:0] thread_en;
  logic [31:0] boot_pc [T];
  logic m_req, m_we, m_ack = 0, m_rvalid = 0;
  logic [31:0] m_addr, m_wdata;
  logic [511:0] m_rdata;
  perf_ev_t perf;
  logic [5:0] ug_in = 6'b010101;
  logic [1:0] ug_out, ff_q;
  logic pw_req, pw_ack = 0, pw_rvalid = 0;
  logic [31:0] pw_addr, pw_rdata;

  int checks = 0, failures = 0;
  logic [31:0] mem [MEMW];
  longint cyc = 0;

  cslow_cpu dut (.clk(clk), .rst(rst), .thread_en(thread_en), .boot_pc(boot_pc),
    .m_req(m_req), .m_we(m_we), .m_addr(m_addr), .m_wdata(m_wdata), .m_ack(m_ack),
    .m_rvalid(m_rvalid), .m_rdata(m_rdata),
    .pw_req(pw_req), .pw_addr(pw_addr), .pw_ack(pw_ack), .pw_rvalid(pw_rvalid), .pw_rdata(pw_rdata),
    .perf(perf), .ug_in(ug_in), .ug_out(ug_out),
    .ff_q(ff_q));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- address translation ----------------
  // the page table maps virtual page v to physical page v XOR 8 (32 KB
  // apart), so data and code only land where the checks look for them if
  // every access was translated
  function automatic logic [31:0] PA(logic [31:0] va);
    return va ^ 32'h8000;
  endfunction

  // ---------------- instruction encoding ----------------
  function automatic logic [31:0] R(int rs, int rt, int rd, int sh, int fn);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] Jt(int op, logic [31:0] target);
    return {6'(op), target[27:2]};
  endfunction

  function automatic logic [31:0] code_base(int t); return 32'(t) * 32'h400; endfunction
  function automatic logic [31:0] data_base(int t); return 32'h10000 + 32'(t) * 32'h100; endfunction

  task automatic load_program(int t);
    logic [31:0] p [48];
    int k;
    k = t + 1;
    foreach (p[i]) p[i] = 32'd0;                      // nop = sll r0,r0,0
    p[0]  = I('h09, 0, 1, k);                          // addiu r1, r0, k
    p[1]  = I('h0f, 0, 2, 1);                          // lui   r2, 1
    p[2]  = I('h0d, 2, 2, t * 'h100);                  // ori   r2, r2, t*256
    p[3]  = I('h09, 0, 3, 0);                          // addiu r3, r0, 0
    p[4]  = I('h09, 0, 4, N_ITER);                     // addiu r4, r0, N
    p[5]  = I('h09, 0, 5, 0);                          // addiu r5, r0, 0
    p[6]  = I('h09, 0, 8, 0);                          // addiu r8, r0, 0
    p[7]  = I('h0f, 0, 14, 2);                         // lui   r14, 2 (shared word)
    p[8]  = I('h09, 0, 9, 5);                          // addiu r9, r0, 5
    p[9]  = R(1, 3, 0, 0, 'h18);                       // loop: mult r1, r3
    p[10] = R(0, 0, 6, 0, 'h12);                       // mflo  r6
    p[11] = R(5, 6, 5, 0, 'h21);                       // addu  r5, r5, r6
    p[12] = I('h2b, 2, 6, 0);                          // sw    r6, 0(r2)
    p[13] = I('h23, 2, 7, 0);                          // lw    r7, 0(r2)
    p[14] = R(5, 7, 5, 0, 'h21);                       // addu  r5, r5, r7
    p[15] = I('h23, 14, 13, 0);                        // lw    r13, 0(r14)
    p[16] = R(5, 13, 5, 0, 'h21);                      // addu  r5, r5, r13
    p[17] = I('h09, 2, 2, 4);                          // addiu r2, r2, 4
    p[18] = I('h09, 3, 3, 1);                          // addiu r3, r3, 1
    p[19] = I('h05, 3, 4, 9 - 20);                     // bne   r3, r4, loop
    p[20] = I('h09, 8, 8, 1);                          // (delay) addiu r8, r8, 1
    p[21] = R(5, 8, 5, 0, 'h23);                       // subu  r5, r5, r8 (runs once)
    p[22] = R(5, 9, 0, 0, 'h1a);                       // div   r5, r9
    p[23] = R(0, 0, 10, 0, 'h12);                      // mflo  r10
    p[24] = R(0, 0, 11, 0, 'h10);                      // mfhi  r11
    p[25] = R(0, 5, 12, 3, 'h00);                      // sll   r12, r5, 3
    p[26] = R(12, 1, 12, 0, 'h26);                     // xor   r12, r12, r1
    p[27] = R(0, 12, 15, 0, 'h23);                     // subu  r15, r0, r12
    p[28] = R(0, 15, 16, 2, 'h03);                     // sra   r16, r15, 2
    p[29] = R(15, 0, 17, 0, 'h2a);                     // slt   r17, r15, r0
    p[30] = I('h2b, 2, 5, 0);                          // sw    r5,  0(r2)
    p[31] = I('h2b, 2, 10, 4);                         // sw    r10, 4(r2)
    p[32] = I('h2b, 2, 11, 8);                         // sw    r11, 8(r2)
    p[33] = I('h2b, 2, 8, 12);                         // sw    r8, 12(r2)
    p[34] = I('h2b, 2, 16, 16);                        // sw    r16, 16(r2)
    p[35] = I('h2b, 2, 17, 20);                        // sw    r17, 20(r2)
    p[36] = Jt('h03, code_base(t) + 41 * 4);           // jal   sub
    p[37] = 32'd0;                                     // (delay) nop
    p[38] = I('h2b, 2, 18, 24);                        // sw    r18, 24(r2)
    p[39] = I('h04, 0, 0, -1);                         // done: beq r0, r0, done
    p[40] = 32'd0;                                     // (delay) nop
    p[41] = I('h09, 0, 18, 'h77);                      // sub: addiu r18, r0, 0x77
    p[42] = R(31, 0, 0, 0, 'h08);                      // jr    r31
    p[43] = I('h09, 18, 18, 1);                        // (delay) addiu r18, r18, 1
    foreach (p[i]) mem[(PA(code_base(t)) >> 2) + i] = p[i];
  endtask

  // ---------------- page-table walker model ----------------
  always begin
    @(posedge clk);
    if (pw_req && !rst) begin
      logic [31:0] a;
      a = pw_addr;
      #1 pw_ack = 1;
      @(posedge clk); #1 pw_ack = 0;
      repeat (WALK_LAT - 1) @(posedge clk);
      pw_rdata = PA(a) & 32'hffff_f000;
      #1 pw_rvalid = 1; @(posedge clk); #1 pw_rvalid = 0;
    end
  end

  // ---------------- memory model ----------------
  always begin
    @(posedge clk);
    if (m_req && !rst) begin
      logic we; logic [31:0] a, d;
      we = m_we; a = m_addr; d = m_wdata;
      #1 m_ack = 1;
      if (we) mem[a[17:2]] = d;
      @(posedge clk); #1 m_ack = 0;
      if (!we) begin
        repeat (MEM_LAT - 1) @(posedge clk);
        for (int w = 0; w < 16; w++) m_rdata[w*32 +: 32] = mem[(a[17:2] & 16'hfff0) + 16'(w)];
        #1 m_rvalid = 1; @(posedge clk); #1 m_rvalid = 0;
      end
    end
  end

  // ---------------- event counters ----------------
  int n_fetch, n_retire, n_imiss, n_dmiss, n_mdblk, n_mddone, n_taken, n_null, n_conf, n_sbfull,
      n_sbfwd, n_fwdex, n_fwdwb, n_idle, n_itlb, n_dtlb;
  always @(posedge clk) if (!rst) begin
    n_fetch  += int'(perf.fetch);        n_retire += int'(perf.retire);
    n_imiss  += int'(perf.imiss_switch); n_dmiss  += int'(perf.dmiss_switch);
    n_mdblk  += int'(perf.md_block);     n_mddone += int'(perf.md_done);
    n_taken  += int'(perf.branch_taken); n_null   += int'(perf.branch_nullify);
    n_conf   += int'(perf.bank_conflict); n_sbfull += int'(perf.sb_full_stall);
    n_sbfwd  += int'(perf.sb_forward);   n_fwdex  += int'(perf.fwd_ex);
    n_fwdwb  += int'(perf.fwd_wb);       n_idle   += int'(perf.slot_idle);
    n_itlb   += int'(perf.itlb_switch);  n_dtlb   += int'(perf.dtlb_switch);
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  task automatic happened(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  function automatic bit all_done();
    for (int t = 0; t < T; t++)
      if (mem[(PA(data_base(t)) >> 2) + 8 + 6] != 32'h78) return 0;
    return 1;
  endfunction

  initial begin
    longint t_start, t_end;
    foreach (mem[i]) mem[i] = 32'd0;
    mem[PA(32'h20000) >> 2] = SHV;
    for (int t = 0; t < T; t++) begin
      load_program(t);
      boot_pc[t] = code_base(t);
    end
    thread_en = {T{1'b1}} >> 4;               // the last four threads start late
    repeat (3) @(posedge clk);
    rst = 0;
    t_start = cyc;
    repeat (300) @(posedge clk);
    thread_en = '1;
    while (!all_done()) @(posedge clk);
    repeat (400) @(posedge clk);             // let the store buffer drain
    t_end = cyc;
    $display("all threads finished after %0d cycles", t_end - t_start);

    for (int t = 0; t < T; t++) begin
      int k;
      logic [31:0] acc, r12, r15, db;
      k   = t + 1;
      db  = PA(data_base(t)) >> 2;
      acc = 32'(56 * k + N_ITER * SHV - N_ITER);
      r12 = (acc << 3) ^ 32'(k);
      r15 = -r12;
      for (int i = 0; i < N_ITER; i++) chk($sformatf("t%0d product %0d", t, i), mem[db + i], 32'(k * i));
      chk($sformatf("t%0d acc", t),      mem[db + 8],  acc);
      chk($sformatf("t%0d quotient", t), mem[db + 9],  acc / 5);
      chk($sformatf("t%0d remainder", t), mem[db + 10], acc % 5);
      chk($sformatf("t%0d delay-slot count", t), mem[db + 11], 32'(N_ITER));
      chk($sformatf("t%0d sra", t),      mem[db + 12], 32'($signed(r15) >>> 2));
      chk($sformatf("t%0d slt", t),      mem[db + 13], 32'(r15[31]));
      chk($sformatf("t%0d jal/jr", t),   mem[db + 14], 32'h78);
    end
    checks++;
    if (ff_q !== 2'b01 || ug_out !== 2'b01) begin
      failures++; $display("FAIL MCML cell pins ug_out=%b ff_q=%b", ug_out, ff_q);
    end

    $display("event counts:");
    happened("fetches", n_fetch);
    happened("retired instructions", n_retire);
    happened("I-cache miss switches", n_imiss);
    happened("D-cache miss switches", n_dmiss);
    happened("mul/div blocks", n_mdblk);
    happened("mul/div completions", n_mddone);
    happened("taken branches", n_taken);
    happened("nullified fetches", n_null);
    happened("bank conflict freezes", n_conf);
    happened("store buffer full stalls", n_sbfull);
    happened("store-load forwards", n_sbfwd);
    happened("forwards from memory stage", n_fwdex);
    happened("forwards from writeback", n_fwdwb);
    happened("idle slots", n_idle);
    happened("I-TLB miss switches", n_itlb);
    happened("D-TLB miss switches", n_dtlb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
