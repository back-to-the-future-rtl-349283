// Testbench for slot_counter: the ID must count 0..C-1 and wrap, and hold
// while frozen.
module tb_slot_counter;
  localparam int C = 8;
  logic clk = 0, rst = 1, freeze = 0;
  logic [2:0] slot;
  int checks = 0, failures = 0;
  slot_counter #(.C(C)) dut (.clk(clk), .rst(rst), .freeze(freeze), .slot(slot));
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int exp;
    @(posedge clk); @(posedge clk); rst <= 0;
    exp = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      checks++;
      if (slot != 3'(exp)) begin failures++; $display("slot %0d exp %0d", slot, exp); end
      freeze = ($urandom % 4 == 0);
      if (!freeze) exp = (exp + 1) % C;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
