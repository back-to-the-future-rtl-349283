// One major pipeline register after C-slow retiming: a chain of C minor
// registers.
//
// C-slow retiming replaces each register of the baseline five-stage pipeline
// by C registers in series; the combinational logic of the major stage is
// then spread over the chain by the retiming step of synthesis. In RTL the
// stage logic is written once, in front of the chain, and the chain delays its
// result by C cycles. Because every chain in the core is exactly C deep, the
// tails of all chains always hold instructions of the same time slot, so the
// baseline forwarding paths connect instructions of the same thread.
// Interface: `d` enters the head when `en` is high; `q` is the tail. The
// whole chain holds when `en` is low (pipeline freeze). Reset clears the
// chain to all zeros, which makes every record invalid.
module cslow_stage_reg #(
  parameter int unsigned C = 8,
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] chain [C];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < C; i++) chain[i] <= '0;
    end else if (en) begin
      chain[0] <= d;
      for (int i = 1; i < C; i++) chain[i] <= chain[i-1];
    end
  end

  assign q = chain[C-1];
endmodule
