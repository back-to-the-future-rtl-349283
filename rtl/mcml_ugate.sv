// Logic model of the MCML two-input universal gate.
//
// The cell is a two-level differential current-steering tree. The lower
// pair, driven by in1/in2, sends the tail current either into the left upper
// pair (in3/in4) or the right upper pair (in5/in6); the conducting upper
// transistor pulls one of the two load nodes low. Logically the cell is a
// differential 2:1 selector: out = in1 ? in3 : in5, with out_b from the
// complementary inputs (in1 ? in4 : in6). Wiring the six inputs to true and
// complementary literals gives AND/NAND, OR/NOR, XOR/XNOR and MUX/NMUX:
//   AND: in1=A, in3=B, in5=A     OR:  in1=B, in3=B, in5=A
//   XOR: in1=~A, in3=B, in5=~B   MUX: in1=S, in3=D1, in5=D0
// (each even input is the complement of the odd input before it). The
// complementary function is taken from out_b. Analog behaviour (swing,
// bias current, delay) is not modelled; in2 only carries the complement of
// in1 and, in a valid differential drive, adds no information.
// Interface: combinational, all pins single bits.
module mcml_ugate (
  input  logic in1, in2, in3, in4, in5, in6,
  output logic out,
  output logic out_b
);
  // current flows through the left upper pair when in1 is high (in2 low)
  logic left;
  assign left  = in1;
  assign out   = left ? in3 : in5;
  assign out_b = left ? in4 : in6;
endmodule
