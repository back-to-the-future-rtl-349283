// Logic model of the MCML master-slave D flip-flop.
//
// Two MCML D-latches in series: the master is transparent while the clock is
// low (its clock pins take the swapped differential clock) and the slave while
// it is high, so the flip-flop takes D on the rising edge of clk.
// Interface: differential data and clock in, differential Q out; no reset.
module mcml_dff (
  input  logic clk,
  input  logic clk_b,
  input  logic d,
  input  logic d_b,
  output logic q,
  output logic q_b
);
  logic m, m_b;
  mcml_dlatch u_master (.clk(clk_b), .clk_b(clk), .d(d), .d_b(d_b), .q(m), .q_b(m_b));
  mcml_dlatch u_slave  (.clk(clk), .clk_b(clk_b), .d(m), .d_b(m_b), .q(q), .q_b(q_b));
endmodule
