// Testbench for store_buffer: per-thread entries fill and report full,
// loads forward the buffered data (own thread's entry first), entries drain
// one by one in round-robin order with a stable address until acknowledged.
// A random phase then checks all of this against a model of the entries.
module tb_store_buffer;
  localparam int T = 16;
  logic clk = 0, rst = 1;
  logic ins_en = 0;
  logic [7:0] ins_tid = 0, lk_tid = 0;
  logic [31:0] ins_addr = 0, ins_data = 0, lk_addr = 0, lk_data, dr_addr, dr_data;
  logic ins_full, lk_hit, dr_valid, dr_ack = 0, empty;
  int checks = 0, failures = 0;
  store_buffer #(.T(T)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic ins(int t, logic [31:0] a, logic [31:0] d);
    @(negedge clk); ins_en = 1; ins_tid = 8'(t); ins_addr = a; ins_data = d;
    @(negedge clk); ins_en = 0;
  endtask
  // Random traffic against a model of the T entries: inserts, lookups and
  // acknowledgements at random, addresses from a pool of 8 so that several
  // entries often match the same load.
  task automatic random_phase();
    bit          mv [T];
    logic [31:0] ma [T], md [T];
    logic [31:0] hold_a;
    bit          hold;
    int          since_ack;
    foreach (mv[i]) mv[i] = 0;
    hold = 0; since_ack = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ins_en = 0; dr_ack = 0;
      // lookup
      lk_tid = 8'($urandom_range(T - 1)); lk_addr = 32'h1000 + 32'($urandom_range(7)) * 4;
      ins_tid = 8'($urandom_range(T - 1));
      #1;
      begin
        bit eh; logic [31:0] ed;
        eh = 0; ed = 0;
        for (int i = 0; i < T; i++) if (!eh && mv[i] && ma[i] == lk_addr) begin eh = 1; ed = md[i]; end
        if (mv[int'(lk_tid)] && ma[int'(lk_tid)] == lk_addr) begin eh = 1; ed = md[int'(lk_tid)]; end
        chk($sformatf("rand lookup %0d", n), lk_hit == eh && (!eh || lk_data == ed));
      end
      chk($sformatf("rand full %0d", n), ins_full == mv[int'(ins_tid)]);
      chk($sformatf("rand drain valid %0d", n), dr_valid == (mv.or() != 0));
      if (hold) chk($sformatf("rand drain stable %0d", n), dr_addr == hold_a);
      if (dr_valid) begin hold = 1; hold_a = dr_addr; end
      // every entry drains within a bounded number of acknowledgements
      chk($sformatf("rand drain progress %0d", n), since_ack < 200);
      if ($urandom_range(1) == 1) begin
        ins_en = 1; ins_addr = 32'h1000 + 32'($urandom_range(7)) * 4; ins_data = $urandom;
        if (!mv[int'(ins_tid)]) begin mv[int'(ins_tid)] = 1; ma[int'(ins_tid)] = ins_addr; md[int'(ins_tid)] = ins_data; end
      end
      if (dr_valid && $urandom_range(3) == 0) begin
        int hit;
        dr_ack = 1; hit = -1;
        for (int i = 0; i < T; i++) if (mv[i] && ma[i] == dr_addr && md[i] == dr_data) hit = i;
        chk($sformatf("rand drained entry exists %0d", n), hit >= 0);
        if (hit >= 0) mv[hit] = 0;
        hold = 0; since_ack = 0;
      end else if (dr_valid) since_ack++;
    end
    @(negedge clk); ins_en = 0; dr_ack = 0;
  endtask

  initial begin
    bit seen [T];
    repeat (2) @(posedge clk); rst <= 0;
    @(negedge clk); chk("empty after reset", empty && !dr_valid);
    ins(3, 32'h100, 32'h11); ins(5, 32'h200, 32'h22); ins(9, 32'h100, 32'h33);
    ins_tid = 3; #1 chk("thread 3 full", ins_full);
    ins_tid = 4; #1 chk("thread 4 free", !ins_full);
    lk_tid = 5; lk_addr = 32'h200; #1 chk("forward 0x200", lk_hit && lk_data == 32'h22);
    lk_tid = 9; lk_addr = 32'h100; #1 chk("own entry wins", lk_hit && lk_data == 32'h33);
    lk_tid = 1; lk_addr = 32'h100; #1 chk("lowest entry otherwise", lk_hit && lk_data == 32'h11);
    lk_addr = 32'h300; #1 chk("no match", !lk_hit);
    // drain: address must stay while unacknowledged, even if new stores arrive
    @(negedge clk); chk("drain valid", dr_valid);
    begin
      logic [31:0] a0;
      a0 = dr_addr;
      ins(0, 32'h400, 32'h44);
      chk("drain address stable", dr_addr == a0);
    end
    for (int n = 0; n < 4; n++) begin
      @(negedge clk);
      chk("drain pending", dr_valid);
      case (dr_addr)
        32'h100: chk("drain data", dr_data == 32'h11 || dr_data == 32'h33);
        32'h200: chk("drain data", dr_data == 32'h22);
        32'h400: chk("drain data", dr_data == 32'h44);
        default: chk("drain addr", 0);
      endcase
      dr_ack = 1; @(negedge clk); dr_ack = 0;
    end
    @(negedge clk); chk("empty after drain", empty && !dr_valid);
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
