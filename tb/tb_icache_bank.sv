// Testbench for icache_bank: a miss requests the line, the refill writes it
// and pulses fill_done, later fetches hit with the right words; a conflicting
// line 16 KB away evicts it (direct mapped). A small memory model answers
// refills with word value = address ^ 32'hA5A5_0000. A random phase then
// runs 4000 cycles of random fetches over 4 tags x 4 indexes and checks hit
// and instruction every cycle against a model of the tag resident at each
// index and of the refill in flight.
module tb_icache_bank;
  logic clk = 0, rst = 1;
  logic req = 0;
  logic [31:0] addr = 0, instr, mreq_addr;
  logic hit, fill_done, mreq, mgnt = 0, mrvalid = 0;
  logic [511:0] mrdata;
  int checks = 0, failures = 0, fills = 0;

  icache_bank dut (.clk(clk), .rst(rst), .req(req), .addr(addr), .hit(hit), .instr(instr),
    .fill_done(fill_done), .mreq(mreq), .mreq_addr(mreq_addr), .mgnt(mgnt),
    .mrvalid(mrvalid), .mrdata(mrdata));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] memw(logic [31:0] a); return a ^ 32'hA5A5_0000; endfunction
  // memory: grant after 1 cycle, data after 3 more
  always begin
    @(posedge clk);
    if (mreq && !rst) begin
      logic [31:0] la;
      la = mreq_addr;
      #1 mgnt = 1; @(posedge clk); #1 mgnt = 0;
      repeat (3) @(posedge clk);
      for (int w = 0; w < 16; w++) mrdata[w*32 +: 32] = memw(la + 32'(w * 4));
      #1 mrvalid = 1; @(posedge clk); #1 mrvalid = 0;
    end
  end
  always @(posedge clk) if (fill_done) fills++;

  // wait for the refill to complete, giving up (a failure) after 50 cycles
  task automatic wait_fill();
    int c;
    for (c = 0; c < 50 && !fill_done; c++) @(posedge clk);
    checks++;
    if (!fill_done) begin failures++; $display("no refill"); end
    @(posedge clk);
  endtask

  task automatic fetch(input logic [31:0] a, input bit expect_hit);
    @(negedge clk); addr = a; req = 1; #1;
    checks++;
    if (hit != expect_hit) begin failures++; $display("addr %h hit=%0d exp %0d", a, hit, expect_hit); end
    if (hit) begin
      checks++;
      if (instr != memw(a)) begin failures++; $display("addr %h instr %h", a, instr); end
    end
    @(posedge clk); #1 req = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    fetch(32'h0000_1040, 0);
    wait_fill();
    for (int w = 0; w < 16; w++) fetch(32'h0000_1040 + 32'(w * 4), 1);
    fetch(32'h0000_1080, 0);               // next line misses
    wait_fill();
    fetch(32'h0000_1084, 1);
    fetch(32'h0000_5040, 0);               // same index, other tag
    wait_fill();
    fetch(32'h0000_5040, 1);
    fetch(32'h0000_1040, 0);               // evicted
    checks++;
    if (fills != 3) begin failures++; $display("fills %0d", fills); end
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic random_phase();
    logic [31:0] res [256];            // resident line address per index (0: none)
    bit          pend, pend_old;
    logic [31:0] pend_line;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    foreach (res[i]) res[i] = '0;
    pend = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] a, la;
      bit exp_h;
      @(negedge clk);
      a = 32'h0002_0000 + 32'($urandom_range(3)) * 32'h4000 + 32'($urandom_range(4, 7)) * 32'h40 +
          32'($urandom_range(15)) * 4;
      la = {a[31:6], 6'd0};
      addr = a;
      req = ($urandom_range(9) < 6);
      #1;
      exp_h = (res[a[13:6]] == la);
      if (req) begin
        checks++;
        if (hit != exp_h) begin failures++; $display("rand %0d addr %h hit=%0d exp %0d", n, a, hit, exp_h); end
        if (exp_h) begin
          checks++;
          if (instr != memw(a)) begin failures++; $display("rand %0d addr %h instr %h", n, a, instr); end
        end
      end
      // model of the clock edge: a completing refill starts no new one
      pend_old = pend;
      if (req && !exp_h && !pend_old) begin pend = 1; pend_line = la; end
      if (fill_done && pend_old) begin res[pend_line[13:6]] = pend_line; pend = 0; end
    end
    @(negedge clk); req = 0;
  endtask
endmodule
