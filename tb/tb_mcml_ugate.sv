// Testbench for mcml_ugate: the four input assignments of the universal gate
// (AND, OR, XOR, MUX) for all input values, on both outputs.
module tb_mcml_ugate;
  logic [5:0] i;
  logic out, out_b;
  int checks = 0, failures = 0;
  mcml_ugate dut (.in1(i[0]), .in2(i[1]), .in3(i[2]), .in4(i[3]), .in5(i[4]), .in6(i[5]),
    .out(out), .out_b(out_b));
  initial begin
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(string f, logic e);
    #1 checks++;
    if (out != e || out_b != !e) begin failures++; $display("%s in=%b out=%b/%b exp %b", f, i, out, out_b, e); end
  endtask
  initial begin
    for (int v = 0; v < 8; v++) begin
      logic a, b, s;
      a = v[0]; b = v[1]; s = v[2];
      // in1..in6 packed as i[0]..i[5]
      i = {!a, a, !b, b, !a, a};      chk("AND", a & b);
      i = {!a, a, !b, b, !b, b};      chk("OR",  a | b);
      i = {b, !b, !b, b, a, !a};      chk("XOR", a ^ b);
      i = {!a, a, !b, b, !s, s};      chk("MUX", s ? b : a);  // D1=b, D0=a
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
