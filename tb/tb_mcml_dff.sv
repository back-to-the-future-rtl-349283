// Testbench for mcml_dff: Q takes D at the rising clock edge and ignores D
// changes between edges.
module tb_mcml_dff;
  logic clk = 0, d = 0, q, q_b;
  int checks = 0, failures = 0;
  mcml_dff dut (.clk(clk), .clk_b(!clk), .d(d), .d_b(!d), .q(q), .q_b(q_b));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic exp;
    for (int n = 0; n < 200; n++) begin
      d = 1'($urandom); #2;
      exp = d;
      clk = 1; #2;
      d = !d; #2;                       // change while high: no effect
      checks++; if (q != exp || q_b != !exp) begin failures++; $display("edge fail"); end
      clk = 0; #2;
      checks++; if (q != exp) begin failures++; $display("low fail"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
