// Testbench for muldiv_pipe at the default C=8, 32 stages: a stream of random
// MULT/MULTU/DIV/DIVU operations, one per cycle with gaps and a freeze, each
// result checked against 64-bit arithmetic and its latency checked to be
// exactly 32*C enabled cycles.
module tb_muldiv_pipe;
  import cslow_pkg::*;
  localparam int C = 8, S = 32;
  logic clk = 0, rst = 1, en = 1;
  logic in_valid = 0;
  md_op_e in_op;
  tid_t in_tid;
  logic [31:0] in_a, in_b;
  logic out_valid;
  tid_t out_tid;
  logic [31:0] out_hi, out_lo;
  int checks = 0, failures = 0;
  int cyc = 0;
  typedef struct { md_op_e op; logic [31:0] a, b; tid_t tid; int t_in; } rec_t;
  rec_t q [$];

  muldiv_pipe #(.C(C), .STAGES(S)) dut (.clk(clk), .rst(rst), .en(en), .in_valid(in_valid),
    .in_op(in_op), .in_tid(in_tid), .in_a(in_a), .in_b(in_b), .out_valid(out_valid),
    .out_tid(out_tid), .out_hi(out_hi), .out_lo(out_lo));
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (en) cyc++;

  function automatic void expect_res(rec_t r, output logic [31:0] ehi, output logic [31:0] elo);
    longint p;
    logic [63:0] up;
    case (r.op)
      MD_MULT:  begin p = longint'($signed(r.a)) * longint'($signed(r.b)); {ehi, elo} = p; end
      MD_MULTU: begin up = {32'd0, r.a} * {32'd0, r.b}; {ehi, elo} = up; end
      MD_DIV: begin
        longint sa, sb;
        sa = longint'($signed(r.a)); sb = longint'($signed(r.b));
        elo = 32'(sa / sb); ehi = 32'(sa % sb);
      end
      default: begin elo = r.a / r.b; ehi = r.a % r.b; end
    endcase
  endfunction

  always @(negedge clk) begin
    if (!rst && en && out_valid) begin
      rec_t r;
      logic [31:0] ehi, elo;
      r = q.pop_front();
      expect_res(r, ehi, elo);
      checks += 2;
      if (out_hi != ehi || out_lo != elo || out_tid != r.tid) begin
        failures++; $display("%s %h %h: got %h:%h exp %h:%h", r.op.name(), r.a, r.b, out_hi, out_lo, ehi, elo);
      end
      if (cyc - r.t_in != S * C) begin
        failures++; $display("latency %0d, expected %0d", cyc - r.t_in, S * C);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      en = !(i >= 300 && i < 305);
      in_valid = (i < 500) && ($urandom % 4 != 0);
      in_op = md_op_e'($urandom % 4);
      in_a = $urandom; in_b = $urandom;
      if (i % 5 == 0) in_b = 32'($urandom % 100) + 1;
      if (i % 9 == 0) in_a = -in_a;
      if ((in_op == MD_DIV || in_op == MD_DIVU) && in_b == 0) in_b = 7;
      in_tid = tid_t'($urandom % 16);
      if (in_valid && en) q.push_back('{in_op, in_a, in_b, in_tid, cyc});
    end
    in_valid = 0;
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
