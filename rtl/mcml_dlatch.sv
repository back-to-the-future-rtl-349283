// Logic model of the MCML D-latch.
//
// Two upper differential pairs share a clocked lower pair. With CLK high the
// sample pair conducts and the outputs follow the differential input D/D_b;
// with CLK low the cross-coupled hold pair conducts and its positive feedback
// keeps the stored state. The model stores one bit: it is transparent while
// clk is high and clk_b low, and it only takes a new value from a valid
// differential input (d != d_b). q_b is the complement of q.
// Interface: level-sensitive; no reset (the cell has none).
module mcml_dlatch (
  input  logic clk,
  input  logic clk_b,
  input  logic d,
  input  logic d_b,
  output logic q,
  output logic q_b
);
  logic state;
  always_latch begin
    if (clk && !clk_b && (d != d_b))
      state = d;
  end
  assign q   = state;
  assign q_b = ~state;
endmodule
