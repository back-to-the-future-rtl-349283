// Workload testbench: two integer data-parallel kernels on cslow_cpu at its
// default parameters (C=8, T=16), scaled down to a few thousand
// instructions.
//
// * Histogram (threads 0-7). Each thread counts NH pixel values (0..255)
//   into 16 private bins of 16 values each. Every bin update is a load, an
//   increment and a store to the same word. Repeated bins therefore depend
//   on store-to-load forwarding and on the one-entry-per-thread store buffer.
// * Linear regression (threads 8-15). Each thread sums x, y, x*x and x*y
//   over NL points. The two products use the multiplier, and the following
//   MFLO waits out its 32C-cycle latency.
// Slot s runs histogram thread s and regression thread s+8, so every slot
// alternates between the two kernels as their threads park on misses and on
// the multiplier.
//
// The input data is generated here with a linear congruential sequence. The
// expected bins and sums are computed here as well, and compared with the
// memory model after every thread has set its done flag. Pages are mapped
// 32 KB away from their virtual addresses by the walker model, as in
// tb_cslow_cpu. The cycle count and the retired instruction count (IPC) are
// printed.
module tb_kernels;
  import cslow_pkg::*;
  localparam int C = 8, T = 16, NH = 64, NL = 24, MEM_LAT = 12, WALK_LAT = 6;
  localparam int MEMW = 65536;

  logic clk = 0, rst = 1;
  logic [T-1:0] thread_en;
  logic [31:0] boot_pc [T];
  logic m_req, m_we, m_ack = 0, m_rvalid = 0;
  logic [31:0] m_addr, m_wdata;
  logic [511:0] m_rdata;
  logic pw_req, pw_ack = 0, pw_rvalid = 0;
  logic [31:0] pw_addr, pw_rdata;
  perf_ev_t perf;
  logic [5:0] ug_in = 6'b010101;
  logic [1:0] ug_out, ff_q;

  int checks = 0, failures = 0;
  logic [31:0] mem [MEMW];
  longint cyc = 0, n_retire = 0;

  cslow_cpu dut (.clk(clk), .rst(rst), .thread_en(thread_en), .boot_pc(boot_pc),
    .m_req(m_req), .m_we(m_we), .m_addr(m_addr), .m_wdata(m_wdata), .m_ack(m_ack),
    .m_rvalid(m_rvalid), .m_rdata(m_rdata),
    .pw_req(pw_req), .pw_addr(pw_addr), .pw_ack(pw_ack), .pw_rvalid(pw_rvalid), .pw_rdata(pw_rdata),
    .perf(perf), .ug_in(ug_in), .ug_out(ug_out), .ff_q(ff_q));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (!rst && perf.retire) n_retire++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

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

  // virtual memory layout
  function automatic logic [31:0] code_base(int t); return 32'(t) * 32'h400; endfunction
  function automatic logic [31:0] in_base(int t);   return 32'h10000 + 32'(t) * 32'h200; endfunction
  function automatic logic [31:0] out_base(int t);  return 32'h20000 + 32'(t) * 32'h100; endfunction

  task automatic load_histogram(int t);
    logic [31:0] p [19];
    logic [31:0] ib, ob;
    ib = in_base(t); ob = out_base(t);
    p[0]  = I('h0f, 0, 1, int'(ib[31:16]));            // lui   r1, in_base
    p[1]  = I('h0d, 1, 1, int'(ib[15:0]));             // ori
    p[2]  = I('h09, 0, 2, NH);                         // addiu r2, r0, NH
    p[3]  = I('h0f, 0, 3, int'(ob[31:16]));            // lui   r3, out_base
    p[4]  = I('h0d, 3, 3, int'(ob[15:0]));             // ori
    p[5]  = I('h23, 1, 5, 0);                          // loop: lw r5, 0(r1)
    p[6]  = R(0, 5, 5, 4, 'h02);                       // srl   r5, r5, 4   (bin)
    p[7]  = R(0, 5, 5, 2, 'h00);                       // sll   r5, r5, 2   (word offset)
    p[8]  = R(3, 5, 6, 0, 'h21);                       // addu  r6, r3, r5
    p[9]  = I('h23, 6, 7, 0);                          // lw    r7, 0(r6)
    p[10] = I('h09, 7, 7, 1);                          // addiu r7, r7, 1
    p[11] = I('h2b, 6, 7, 0);                          // sw    r7, 0(r6)
    p[12] = I('h09, 2, 2, -1);                         // addiu r2, r2, -1
    p[13] = I('h05, 2, 0, 5 - 14);                     // bne   r2, r0, loop
    p[14] = I('h09, 1, 1, 4);                          // (delay) addiu r1, r1, 4
    p[15] = I('h09, 0, 8, 1);                          // addiu r8, r0, 1
    p[16] = I('h2b, 3, 8, 64);                         // sw    r8, 64(r3)  (done)
    p[17] = I('h04, 0, 0, -1);                         // beq   r0, r0, .
    p[18] = 32'd0;                                     // (delay) nop
    foreach (p[i]) mem[(PA(code_base(t)) >> 2) + i] = p[i];
  endtask

  task automatic load_linreg(int t);
    logic [31:0] p [30];
    logic [31:0] ib, ob;
    ib = in_base(t); ob = out_base(t);
    p[0]  = I('h0f, 0, 1, int'(ib[31:16]));            // lui   r1, in_base
    p[1]  = I('h0d, 1, 1, int'(ib[15:0]));             // ori
    p[2]  = I('h09, 0, 2, NL);                         // addiu r2, r0, NL
    p[3]  = I('h09, 0, 10, 0);                         // sx  = 0
    p[4]  = I('h09, 0, 11, 0);                         // sy  = 0
    p[5]  = I('h09, 0, 12, 0);                         // sxx = 0
    p[6]  = I('h09, 0, 13, 0);                         // sxy = 0
    p[7]  = I('h23, 1, 5, 0);                          // loop: lw r5, 0(r1)  x
    p[8]  = I('h23, 1, 6, 4);                          // lw    r6, 4(r1)     y
    p[9]  = R(10, 5, 10, 0, 'h21);                     // addu  sx, sx, x
    p[10] = R(11, 6, 11, 0, 'h21);                     // addu  sy, sy, y
    p[11] = R(5, 5, 0, 0, 'h18);                       // mult  x, x
    p[12] = R(0, 0, 7, 0, 'h12);                       // mflo  r7
    p[13] = R(12, 7, 12, 0, 'h21);                     // addu  sxx, sxx, r7
    p[14] = R(5, 6, 0, 0, 'h18);                       // mult  x, y
    p[15] = R(0, 0, 8, 0, 'h12);                       // mflo  r8
    p[16] = R(13, 8, 13, 0, 'h21);                     // addu  sxy, sxy, r8
    p[17] = I('h09, 2, 2, -1);                         // addiu r2, r2, -1
    p[18] = I('h05, 2, 0, 7 - 19);                     // bne   r2, r0, loop
    p[19] = I('h09, 1, 1, 8);                          // (delay) addiu r1, r1, 8
    p[20] = I('h0f, 0, 3, int'(ob[31:16]));            // lui   r3, out_base
    p[21] = I('h0d, 3, 3, int'(ob[15:0]));             // ori
    p[22] = I('h2b, 3, 10, 0);                         // sw    sx,  0(r3)
    p[23] = I('h2b, 3, 11, 4);                         // sw    sy,  4(r3)
    p[24] = I('h2b, 3, 12, 8);                         // sw    sxx, 8(r3)
    p[25] = I('h2b, 3, 13, 12);                        // sw    sxy, 12(r3)
    p[26] = I('h09, 0, 8, 1);                          // addiu r8, r0, 1
    p[27] = I('h2b, 3, 8, 64);                         // sw    r8, 64(r3)  (done)
    p[28] = I('h04, 0, 0, -1);                         // beq   r0, r0, .
    p[29] = 32'd0;                                     // (delay) nop
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

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic bit all_done();
    for (int t = 0; t < T; t++)
      if (mem[(PA(out_base(t)) >> 2) + 16] != 32'd1) return 0;
    return 1;
  endfunction

  initial begin
    longint t_start, t_end;
    logic [31:0] seed;
    foreach (mem[i]) mem[i] = 32'd0;
    seed = 32'h1234_5678;
    for (int t = 0; t < T; t++) begin
      if (t < 8) begin
        load_histogram(t);
        for (int i = 0; i < NH; i++) begin
          seed = seed * 32'd1664525 + 32'd1013904223;
          mem[(PA(in_base(t)) >> 2) + i] = 32'(seed[31:24]);
        end
      end else begin
        load_linreg(t);
        for (int i = 0; i < 2 * NL; i++) begin
          seed = seed * 32'd1664525 + 32'd1013904223;
          mem[(PA(in_base(t)) >> 2) + i] = 32'(seed[31:22]);
        end
      end
      boot_pc[t] = code_base(t);
    end
    thread_en = '1;
    repeat (3) @(posedge clk);
    rst = 0;
    t_start = cyc;
    while (!all_done()) @(posedge clk);
    t_end = cyc;
    repeat (400) @(posedge clk);             // let the store buffer drain
    $display("kernels finished after %0d cycles, %0d instructions retired, IPC %0.3f",
             t_end - t_start, n_retire, real'(n_retire) / real'(t_end - t_start));

    for (int t = 0; t < T; t++) begin
      logic [31:0] ib, ob;
      ib = PA(in_base(t)) >> 2;
      ob = PA(out_base(t)) >> 2;
      if (t < 8) begin
        int hist [16];
        foreach (hist[b]) hist[b] = 0;
        for (int i = 0; i < NH; i++) hist[mem[ib + i][7:4]]++;
        for (int b = 0; b < 16; b++) chk($sformatf("t%0d bin %0d", t, b), mem[ob + b], 32'(hist[b]));
      end else begin
        logic [31:0] sx, sy, sxx, sxy;
        sx = 0; sy = 0; sxx = 0; sxy = 0;
        for (int i = 0; i < NL; i++) begin
          sx  += mem[ib + 2*i];
          sy  += mem[ib + 2*i + 1];
          sxx += mem[ib + 2*i] * mem[ib + 2*i];
          sxy += mem[ib + 2*i] * mem[ib + 2*i + 1];
        end
        chk($sformatf("t%0d sum x", t),  mem[ob + 0], sx);
        chk($sformatf("t%0d sum y", t),  mem[ob + 1], sy);
        chk($sformatf("t%0d sum xx", t), mem[ob + 2], sxx);
        chk($sformatf("t%0d sum xy", t), mem[ob + 3], sxy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
