// Testbench for thread_select: reproduces the example of threads 0, 1 and 9
// ready with C=8 and T=16 (thread 0 every round in slot 0, threads 1 and 9
// taking turns in slot 1, other slots idle), then checks random ready masks
// against a reference round-robin model.
module tb_thread_select;
  localparam int C = 8, T = 16, M = T / C;
  logic clk = 0, rst = 1;
  logic [2:0] slot = 0;
  logic [T-1:0] ready = '0;
  logic advance = 0;
  logic sel_valid;
  logic [7:0] sel_tid;
  int checks = 0, failures = 0;
  int ptr [C];

  thread_select #(.C(C), .T(T)) dut (.clk(clk), .rst(rst), .slot(slot), .ready(ready),
    .advance(advance), .sel_valid(sel_valid), .sel_tid(sel_tid));
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_one(input int s);
    bit ev;
    int et;
    ev = 0; et = 0;
    for (int k = 0; k < M; k++) begin
      int m;
      m = (ptr[s] + k) % M;
      if (!ev && ready[m * C + s]) begin ev = 1; et = m * C + s; end
    end
    checks++;
    if (sel_valid != ev || (ev && sel_tid != 8'(et))) begin
      failures++; $display("slot %0d: got %0d/%0d exp %0d/%0d", s, sel_valid, sel_tid, ev, et);
    end
    if (ev) ptr[s] = ((et / C) + 1) % M;
  endtask

  initial begin
    int seq [24];
    int got [24];
    foreach (ptr[i]) ptr[i] = 0;
    repeat (2) @(posedge clk); rst <= 0; advance <= 1;
    // the three-thread example: expected thread per cycle, -1 = empty slot
    seq = '{0, 1, -1, -1, -1, -1, -1, -1, 0, 9, -1, -1, -1, -1, -1, -1, 0, 1, -1, -1, -1, -1, -1, -1};
    ready = '0; ready[0] = 1; ready[1] = 1; ready[9] = 1;
    for (int i = 0; i < 24; i++) begin
      slot = 3'(i % C);
      #1;
      got[i] = sel_valid ? int'(sel_tid) : -1;
      checks++;
      if (got[i] != seq[i]) begin failures++; $display("cycle %0d got %0d exp %0d", i, got[i], seq[i]); end
      check_one(i % C);
      @(posedge clk); #1;
    end
    for (int i = 0; i < 400; i++) begin
      slot  = 3'(i % C);
      ready = T'($urandom);
      #1;
      check_one(i % C);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
