// Testbench for dcache_banked: load miss and refill, hits in all four ways of
// a set, round-robin eviction by a fifth line, bank conflict on back-to-back
// loads to one bank (none to different banks), write-through update of a
// present line. Memory words hold address ^ 32'h5A5A_0000 unless written.
// A random phase then runs 4000 cycles of random loads and write-through
// stores over 24 lines that share two sets in each of two banks, and checks
// conflict, hit and data every cycle against a model of the bank busy time,
// the refill in flight per bank and the lines resident per set (round-robin
// replacement with no invalidation keeps them in fill order).
module tb_dcache_banked;
  localparam int NB = 8;
  logic clk = 0, rst = 1;
  logic ld_req = 0;
  logic [31:0] ld_addr = 0, ld_data;
  logic ld_hit, conflict;
  logic [2:0] ld_bank;
  logic wr_en = 0;
  logic [31:0] wr_addr = 0, wr_data = 0;
  logic [NB-1:0] fill_done, mreq, mgnt = 0, mrvalid = 0;
  logic refill_busy;
  logic [31:0] mreq_addr [NB];
  logic [511:0] mrdata;
  int checks = 0, failures = 0;

  dcache_banked dut (.clk(clk), .rst(rst), .ld_req(ld_req), .ld_addr(ld_addr), .ld_hit(ld_hit),
    .ld_data(ld_data), .conflict(conflict), .ld_bank(ld_bank), .wr_en(wr_en), .wr_addr(wr_addr),
    .wr_data(wr_data), .fill_done(fill_done), .refill_busy(refill_busy), .mreq(mreq),
    .mreq_addr(mreq_addr), .mgnt(mgnt), .mrvalid(mrvalid), .mrdata(mrdata));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [31:0] mm [logic [31:0]];
  function automatic logic [31:0] memw(logic [31:0] a);
    return mm.exists(a) ? mm[a] : (a ^ 32'h5A5A_0000);
  endfunction
  always begin
    @(posedge clk);
    for (int b = 0; b < NB; b++) if (mreq[b] && !rst) begin
      logic [31:0] la;
      la = mreq_addr[b];
      #1 mgnt[b] = 1; @(posedge clk); #1 mgnt[b] = 0;
      repeat (2) @(posedge clk);
      for (int w = 0; w < 16; w++) mrdata[w*32 +: 32] = memw(la + 32'(w * 4));
      #1 mrvalid[b] = 1; @(posedge clk); #1 mrvalid[b] = 0;
      break;
    end
  end
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  // one load in one cycle; returns hit/conflict seen
  task automatic load(input logic [31:0] a, output logic h, output logic c, output logic [31:0] d);
    @(negedge clk); ld_addr = a; ld_req = 1; #1;
    h = ld_hit; c = conflict; d = ld_data;
    @(posedge clk); #1 ld_req = 0;
  endtask
  task automatic fill(input logic [31:0] a);
    logic h, c; logic [31:0] d;
    repeat (2) @(posedge clk);
    load(a, h, c, d);
    chk("miss first", !h && !c);
    if (h || c) $display("addr %h h=%0d c=%0d", a, h, c);
    wait (fill_done != 0); @(posedge clk);
    repeat (2) @(posedge clk);
    load(a, h, c, d);
    chk($sformatf("hit after fill %h", a), h && !c && d == memw(a));
  endtask

  initial begin
    logic h, c; logic [31:0] d;
    repeat (2) @(posedge clk); rst <= 0;
    // bank = addr[8:6], set = addr[14:9]; 4 lines of one set in bank 1
    for (int w = 0; w < 4; w++) fill(32'h0000_0040 + 32'(w) * 32'h8000);
    for (int w = 0; w < 4; w++) begin
      @(posedge clk);
      load(32'h0000_0044 + 32'(w) * 32'h8000, h, c, d);
      chk("all four ways hit", h && d == memw(32'h0000_0044 + 32'(w) * 32'h8000));
    end
    // bank conflict: two consecutive loads to bank 1
    @(posedge clk);
    @(negedge clk); ld_addr = 32'h0000_0048; ld_req = 1; #1 chk("first no conflict", !conflict && ld_hit);
    @(negedge clk); ld_addr = 32'h0000_804c; #1 chk("conflict same bank", conflict);
    @(negedge clk); #1 chk("free again", !conflict && ld_hit);
    // consecutive loads to different banks do not conflict
    @(negedge clk); ld_addr = 32'h0000_0080; #1 chk("bank 2 no conflict", !conflict);
    @(negedge clk); ld_addr = 32'h0000_0040; #1 chk("bank 1 after bank 2 no conflict", !conflict);
    @(posedge clk); #1 ld_req = 0;
    repeat (3) @(posedge clk);
    // write-through update of a present line
    @(negedge clk); wr_en = 1; wr_addr = 32'h0000_8050; wr_data = 32'hCAFE_F00D;
    @(negedge clk); wr_en = 0;
    load(32'h0000_8050, h, c, d);
    chk("write-through update", h && d == 32'hCAFE_F00D);
    // fifth line in the set evicts the first (round-robin)
    @(posedge clk);
    fill(32'h0002_0040);
    @(posedge clk);
    load(32'h0000_0040, h, c, d);
    chk("round-robin victim evicted", !h);
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic random_phase();
    logic [31:0] res [NB][64][$];      // resident line addresses, fill order
    int          busy_m [NB];
    bit          pend [NB], pend_old [NB];
    logic [31:0] pend_line [NB];
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    foreach (busy_m[b]) begin busy_m[b] = 0; pend[b] = 0; end
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] a, la;
      int b, st;
      bit exp_c, exp_h;
      @(negedge clk);
      a = 32'h0100_0000 + 32'($urandom_range(5)) * 32'h8000 + 32'($urandom_range(3, 4)) * 32'h200 +
          32'($urandom_range(1, 2)) * 32'h40 + 32'($urandom_range(15)) * 4;
      la = {a[31:6], 6'd0};
      b = int'(a[8:6]); st = int'(a[14:9]);
      ld_req = ($urandom_range(9) < 7);
      ld_addr = a;
      wr_en = 0;
      if (!refill_busy && $urandom_range(9) == 0) begin
        wr_en = 1;
        wr_addr = 32'h0100_0000 + 32'($urandom_range(5)) * 32'h8000 + 32'($urandom_range(3, 4)) * 32'h200 +
                  32'($urandom_range(1, 2)) * 32'h40 + 32'($urandom_range(15)) * 4;
        wr_data = $urandom;
      end
      #1;
      exp_c = ld_req && busy_m[b] != 0;
      exp_h = 0;
      foreach (res[b][st][i]) if (res[b][st][i] == la) exp_h = 1;
      if (ld_req) begin
        chk($sformatf("rand conflict %0d", n), conflict == exp_c);
        if (!exp_c) begin
          chk($sformatf("rand hit %0d %h", n, a), ld_hit == exp_h);
          if (exp_h) chk($sformatf("rand data %0d %h", n, a), ld_data == memw(a));
        end
      end
      // model of what the clock edge does
      // (a bank whose refill completes this cycle starts no new one)
      foreach (busy_m[k]) if (busy_m[k] != 0) busy_m[k]--;
      pend_old = pend;
      if (ld_req && !exp_c) begin
        busy_m[b] = 1;
        if (!exp_h && !pend_old[b]) begin pend[b] = 1; pend_line[b] = la; end
      end
      for (int k = 0; k < NB; k++) if (fill_done[k] && pend_old[k]) begin
        int s2;
        s2 = int'(pend_line[k][14:9]);
        if (res[k][s2].size() == 4) void'(res[k][s2].pop_front());
        res[k][s2].push_back(pend_line[k]);
        pend[k] = 0;
      end
      if (wr_en) mm[wr_addr] = wr_data;
    end
    @(negedge clk); ld_req = 0; wr_en = 0;
  endtask
endmodule
