// Testbench of tlb at its default size (32 entries, 4 ways, 4-KB pages).
//
// A page-table walker model answers each walk one cycle after the request
// with a grant and WALK_LAT cycles later with the translation
// pa_page(va) = va_page XOR 0x5A5A5. A reference model keeps, per set, the
// pages resident in fill order (round-robin replacement with no
// invalidation behaves as a FIFO of WAYS pages). First every one of the 32
// entries is filled and all must hit; then a 33rd page evicts the oldest page
// of its set; then random lookups over a pool of 48 pages check hit/miss,
// the physical address (offset passed through) and that each walk takes the
// expected number of cycles.
module tb_tlb;
  localparam int ENTRIES = 32, WAYS = 4, SETS = ENTRIES / WAYS, WALK_LAT = 3;

  logic clk = 0, rst = 1;
  logic [31:0] lk_vaddr, lk_paddr, w_addr, w_rdata;
  logic lk_hit, miss, fill_done, w_req, w_gnt, w_rvalid;
  int checks = 0, failures = 0;

  tlb #(.ENTRIES(ENTRIES), .WAYS(WAYS), .PAGE_BITS(12)) dut (
    .clk(clk), .rst(rst), .lk_vaddr(lk_vaddr), .lk_hit(lk_hit), .lk_paddr(lk_paddr),
    .miss(miss), .fill_done(fill_done),
    .w_req(w_req), .w_addr(w_addr), .w_gnt(w_gnt), .w_rvalid(w_rvalid), .w_rdata(w_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // walker model
  int unsigned walk_cnt = 0;
  always_ff @(posedge clk) begin
    w_gnt    <= 1'b0;
    w_rvalid <= 1'b0;
    if (rst) walk_cnt <= 0;
    else if (w_req && !w_gnt && walk_cnt == 0) begin
      w_gnt    <= 1'b1;
      walk_cnt <= WALK_LAT;
      w_rdata  <= {w_addr[31:12] ^ 20'h5A5A5, 12'h000};
    end else if (walk_cnt > 1) walk_cnt <= walk_cnt - 1;
    else if (walk_cnt == 1) begin
      w_rvalid <= 1'b1;
      walk_cnt <= 0;
    end
  end

  function automatic logic [31:0] xlate(logic [31:0] va);
    return {va[31:12] ^ 20'h5A5A5, va[11:0]};
  endfunction

  logic [19:0] res [SETS][$];

  function automatic bit resident(logic [19:0] vpn);
    foreach (res[vpn[2:0]][i]) if (res[vpn[2:0]][i] == vpn) return 1;
    return 0;
  endfunction

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // look one address up, compare with the model, and fill on a miss
  task automatic access(logic [31:0] va);
    bit exp_hit;
    int cyc;
    @(negedge clk);                    // one access per cycle, away from the edge
    exp_hit = resident(va[31:12]);
    lk_vaddr = va;
    #1;
    chk($sformatf("hit %h", va), lk_hit == exp_hit);
    if (lk_hit) chk($sformatf("paddr %h", va), lk_paddr == xlate(va));
    if (!lk_hit) begin
      miss = 1'b1;
      @(posedge clk);
      #1 miss = 1'b0;
      cyc = 0;
      while (!fill_done) begin
        @(posedge clk);
        #1 cyc++;
        if (cyc > 50) break;
      end
      // request seen after 1 cycle, grant 1 cycle later, data WALK_LAT after
      chk($sformatf("walk time %0d va %h", cyc, va), cyc == WALK_LAT + 1);
      @(posedge clk);
      #1;
      if (res[va[14:12]].size() == WAYS) void'(res[va[14:12]].pop_front());
      res[va[14:12]].push_back(va[31:12]);
      chk($sformatf("hit after fill %h", va), lk_hit && lk_paddr == xlate(va));
    end
  endtask

  logic [19:0] pool [48];

  initial begin
    lk_vaddr = '0;
    miss = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // fill every entry: 4 pages in each of the 8 sets
    for (int i = 0; i < ENTRIES; i++)
      access({20'(32'h00400 + i), 12'(i * 44)});
    for (int i = 0; i < ENTRIES; i++) begin
      lk_vaddr = {20'(32'h00400 + i), 12'h123};
      #1 chk($sformatf("capacity %0d", i), lk_hit && lk_paddr == xlate(lk_vaddr));
    end
    // a 33rd page in set 0 evicts the oldest page of that set
    access({20'h00800, 12'h0});
    lk_vaddr = {20'h00400, 12'h0};
    #1 chk("evicted oldest", !lk_hit);
    for (int i = 1; i < WAYS; i++) begin
      lk_vaddr = {20'(32'h00400 + i * SETS), 12'h0};
      #1 chk($sformatf("kept way %0d", i), lk_hit);
    end
    // random traffic
    foreach (pool[i]) pool[i] = 20'($urandom);
    for (int n = 0; n < 400; n++)
      access({pool[$urandom_range(47)], 12'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
