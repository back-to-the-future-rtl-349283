// Testbench for mem_arbiter: four requesters (three line reads, one write)
// all request at once; every request is granted exactly once, lines return to
// the requester that asked, one transaction is in flight at a time, and the
// grants rotate round-robin. A random phase follows: every requester issues
// NR more requests at random times and addresses, the memory answers after
// random delays, and each line must come back to its requester, each write
// must carry its requester's data, and no requester may wait for more than
// N-1 other grants.
module tb_mem_arbiter;
  localparam int N = 4, NR = 40;
  logic clk = 0, rst = 1;
  logic [N-1:0] req = 0, is_wr = 4'b1000, gnt, rvalid;
  logic [31:0] addr [N], wdata [N];
  logic [511:0] rdata, m_rdata;
  logic m_req, m_we, m_ack = 0, m_rvalid = 0;
  logic [31:0] m_addr, m_wdata;
  int checks = 0, failures = 0, order [$], lines = 0, done_n [N];
  bit phase2 = 0;
  mem_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // memory: ack next cycle, read data 2 cycles later = address in every word
  always begin
    @(posedge clk);
    if (m_req && !rst) begin
      logic we; logic [31:0] a;
      we = m_we; a = m_addr;
      #1 m_ack = 1; @(posedge clk); #1 m_ack = 0;
      if (!we) begin
        repeat (phase2 ? $urandom_range(0, 5) + 1 : 2) @(posedge clk);
        m_rdata = {16{a}}; #1 m_rvalid = 1; @(posedge clk); #1 m_rvalid = 0;
      end else begin
        checks++;
        if (m_wdata != (a ^ 32'hBEEF_0000) || (!phase2 && a != 32'h3000)) begin
          failures++; $display("bad write %h %h", a, m_wdata);
        end
      end
    end
  end
  for (genvar i = 0; i < N; i++) begin : g_r
    initial begin
      addr[i] = 32'h1000 * i; wdata[i] = addr[i] ^ 32'hBEEF_0000;
      @(negedge rst); @(negedge clk); req[i] = 1;
      @(posedge clk); while (!gnt[i]) @(posedge clk);
      #1 req[i] = 0; order.push_back(i);
      if (!is_wr[i]) begin
        @(posedge clk); while (!rvalid[i]) @(posedge clk);
        checks++; lines++;
        if (rdata[31:0] != addr[i]) begin failures++; $display("requester %0d got %h", i, rdata[31:0]); end
      end
      // random phase
      wait (phase2);
      for (int n = 0; n < NR; n++) begin
        int others;
        repeat ($urandom_range(0, 6)) @(negedge clk);
        @(negedge clk);
        addr[i] = {8'(i), 18'($urandom), 6'd0}; wdata[i] = addr[i] ^ 32'hBEEF_0000;
        req[i] = 1; others = 0;
        @(posedge clk);
        while (!gnt[i]) begin
          for (int j = 0; j < N; j++) if (j != i && gnt[j]) others++;
          @(posedge clk);
        end
        #1 req[i] = 0;
        checks++;
        if (others > N - 1) begin failures++; $display("requester %0d waited for %0d grants", i, others); end
        if (!is_wr[i]) begin
          @(posedge clk); while (!rvalid[i]) @(posedge clk);
          checks++;
          if (rdata[31:0] != addr[i]) begin failures++; $display("requester %0d got %h", i, rdata[31:0]); end
        end
        done_n[i]++;
      end
    end
  end
  // no second request while one is outstanding
  int inflight = 0;
  always @(posedge clk) if (rst) inflight = 0; else begin
    if (m_req && inflight != 0) begin failures++; $display("overlap t=%0t st=%0d ack=%0d rv=%0d infl=%0d", $time, dut.st, m_ack, m_rvalid, inflight); end
    if (m_req && m_ack && !m_we) inflight++;
    if (m_rvalid) inflight--;
  end
  initial begin
    repeat (2) @(posedge clk); rst = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (lines != 3) begin failures++; $display("%0d of 3 lines returned", lines); end
    checks++;
    if (order.size() != N) begin failures++; $display("granted %0d", order.size()); end
    else begin
      checks++;
      if (order[0] != 0 || order[1] != 1 || order[2] != 2 || order[3] != 3) begin
        failures++; $display("order %p", order);
      end
    end
    phase2 = 1;
    for (int w = 0; w < 20000; w++) begin
      bit all;
      all = 1;
      for (int i = 0; i < N; i++) if (done_n[i] != NR) all = 0;
      if (all) break;
      @(posedge clk);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (done_n[i] != NR) begin failures++; $display("requester %0d finished %0d of %0d", i, done_n[i], NR); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
