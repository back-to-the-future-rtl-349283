// Testbench for mcml_dlatch: transparent while clk is high, holds while low.
module tb_mcml_dlatch;
  logic clk = 0, d = 0, q, q_b;
  int checks = 0, failures = 0;
  mcml_dlatch dut (.clk(clk), .clk_b(!clk), .d(d), .d_b(!d), .q(q), .q_b(q_b));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic held;
    clk = 1; d = 0; #1;
    for (int n = 0; n < 200; n++) begin
      clk = 1; d = 1'($urandom); #1;
      checks++; if (q != d || q_b != !d) begin failures++; $display("transparent fail"); end
      held = d;
      clk = 0; #1;
      d = !held; #1;
      checks++; if (q != held || q_b != !held) begin failures++; $display("hold fail"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
