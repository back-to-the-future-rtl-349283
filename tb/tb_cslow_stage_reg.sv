// Testbench for cslow_stage_reg: a value written at the head appears at the
// tail exactly C enabled cycles later; disabled cycles hold the chain.
module tb_cslow_stage_reg;
  localparam int C = 8, W = 16;
  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] d = 0, q;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];
  cslow_stage_reg #(.C(C), .W(W)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));
  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < C; i++) hist.push_back('0);
    @(negedge clk);
    checks++; if (q != 0) failures++;        // reset clears the chain
    for (int i = 0; i < 300; i++) begin
      en = ($urandom % 5 != 0);
      d  = W'($urandom);
      @(posedge clk);
      if (en) begin hist.push_back(d); void'(hist.pop_front()); end
      @(negedge clk);
      checks++;
      if (q != hist[0]) begin failures++; $display("i=%0d q=%h exp %h", i, q, hist[0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
