// Pipelined 32-step multiplier/divider, C-slow retimed.
//
// The unit performs one radix-2 step per major stage: a Booth step for
// MULT/MULTU (add, subtract or skip the multiplicand by the bit pair Q[0],
// Q[-1], then an arithmetic right shift of {A,Q}) and a restoring step for
// DIV/DIVU (shift the remainder left, subtract the divisor when it fits).
// STAGES major stages, each followed by a C-deep register chain, give a
// latency of STAGES*C cycles and accept a new operation every cycle, so
// operations from different threads, and independent ones from the same
// thread, overlap.
// Booth over a 32-bit multiplier treats it as signed; for MULTU a set top
// bit is corrected at the output by adding the multiplicand to HI. Division
// works on magnitudes and fixes the signs at the output (quotient negative
// when the operand signs differ, remainder takes the dividend's sign).
// Division by zero returns quotient all ones and remainder equal to the
// dividend magnitude (MIPS leaves it undefined).
// Interface: `in_valid`, `in_op`, `in_a` (rs), `in_b` (rt), `in_tid` enter
// when `en` is high; `out_valid`, `out_tid`, `out_hi`, `out_lo` appear
// STAGES*C enabled cycles later. `en` low freezes the whole unit.
module muldiv_pipe
  import cslow_pkg::*;
#(
  parameter int unsigned C      = 8,
  parameter int unsigned STAGES = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        in_valid,
  input  md_op_e      in_op,
  input  tid_t        in_tid,
  input  logic [31:0] in_a,
  input  logic [31:0] in_b,
  output logic        out_valid,
  output tid_t        out_tid,
  output logic [31:0] out_hi,
  output logic [31:0] out_lo
);
  typedef struct packed {
    logic        valid;
    md_op_e      op;
    tid_t        tid;
    logic        neg_q;   // negate quotient at the end
    logic        neg_r;   // negate remainder at the end
    logic        umsb;    // MULTU multiplier had its top bit set
    logic [33:0] a;       // Booth accumulator / division remainder
    logic [31:0] q;       // multiplier / dividend, shifted out as result bits
    logic [33:0] m;       // multiplicand / divisor
    logic        q_1;     // Booth extra bit Q[-1]
  } st_t;

  localparam int unsigned SW = $bits(st_t);

  function automatic st_t step(st_t s);
    st_t        r;
    logic [33:0] sum;
    logic [33:0] rem;
    r = s;
    if (s.op == MD_MULT || s.op == MD_MULTU) begin
      unique case ({s.q[0], s.q_1})
        2'b01:   sum = s.a + s.m;
        2'b10:   sum = s.a - s.m;
        default: sum = s.a;
      endcase
      r.q_1 = s.q[0];
      r.q   = {sum[0], s.q[31:1]};
      r.a   = {sum[33], sum[33:1]};
    end else begin
      rem = {s.a[32:0], s.q[31]};
      r.q = {s.q[30:0], 1'b0};
      if (rem >= s.m) begin
        rem    = rem - s.m;
        r.q[0] = 1'b1;
      end
      r.a = rem;
    end
    return r;
  endfunction

  // operand preparation for stage 0
  st_t prep;
  always_comb begin
    logic [31:0] ma, mb;
    prep       = '0;
    prep.valid = in_valid;
    prep.op    = in_op;
    prep.tid   = in_tid;
    unique case (in_op)
      MD_MULT: begin
        prep.m = {{2{in_a[31]}}, in_a};
        prep.q = in_b;
      end
      MD_MULTU: begin
        prep.m    = {2'b00, in_a};
        prep.q    = in_b;
        prep.umsb = in_b[31];
      end
      MD_DIV: begin
        ma = in_a[31] ? -in_a : in_a;
        mb = in_b[31] ? -in_b : in_b;
        prep.q     = ma;
        prep.m     = {2'b00, mb};
        prep.neg_q = in_a[31] ^ in_b[31];
        prep.neg_r = in_a[31];
      end
      default: begin // MD_DIVU
        prep.q = in_a;
        prep.m = {2'b00, in_b};
      end
    endcase
  end

  logic [SW-1:0] stage_q [STAGES];

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    st_t in_s, out_s;
    if (k == 0) begin : g_first
      assign in_s = prep;
    end else begin : g_next
      assign in_s = st_t'(stage_q[k-1]);
    end
    assign out_s = step(in_s);
    cslow_stage_reg #(.C(C), .W(SW)) u_reg (
      .clk(clk), .rst(rst), .en(en), .d(SW'(out_s)), .q(stage_q[k])
    );
  end

  st_t fin;
  assign fin = st_t'(stage_q[STAGES-1]);

  always_comb begin
    out_valid = fin.valid;
    out_tid   = fin.tid;
    if (fin.op == MD_MULT || fin.op == MD_MULTU) begin
      out_lo = fin.q;
      out_hi = fin.a[31:0] + (fin.umsb ? fin.m[31:0] : 32'd0);
    end else begin
      out_lo = fin.neg_q ? -fin.q : fin.q;
      out_hi = fin.neg_r ? -fin.a[31:0] : fin.a[31:0];
    end
  end
endmodule
