// Testbench for regfile_cslow: random writes and reads over all slots,
// banks and registers against a reference array; r0 reads zero; a read of
// the register written in the same cycle returns the new value.
module tb_regfile_cslow;
  localparam int C = 8, T = 16, M = T / C;
  logic clk = 0;
  logic [2:0] rd_slot, wr_slot;
  logic [0:0] rd_bank, wr_bank;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  int checks = 0, failures = 0;
  logic [31:0] model [C][M][32];

  regfile_cslow #(.C(C), .T(T)) dut (.clk(clk), .rd_slot(rd_slot), .rd_bank(rd_bank),
    .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2), .we(we), .wr_slot(wr_slot),
    .wr_bank(wr_bank), .wa(wa), .wd(wd));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] expv(int s, int b, logic [4:0] r);
    if (r == 0) return 0;
    if (we && wr_slot == 3'(s) && wr_bank == 1'(b) && wa == r) return wd;
    return model[s][b][r];
  endfunction
  initial begin
    we = 1;
    // initialise every register
    for (int s = 0; s < C; s++) for (int b = 0; b < M; b++) for (int r = 0; r < 32; r++) begin
      wr_slot = 3'(s); wr_bank = 1'(b); wa = 5'(r); wd = $urandom;
      model[s][b][r] = (r == 0) ? 0 : wd;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      rd_slot = 3'($urandom); rd_bank = 1'($urandom); ra1 = 5'($urandom); ra2 = 5'($urandom);
      we = 1'($urandom); wr_slot = ($urandom % 2 == 1) ? rd_slot : 3'($urandom);
      wr_bank = 1'($urandom); wa = ($urandom % 2 == 1) ? ra1 : 5'($urandom); wd = $urandom;
      #1;
      checks += 2;
      if (rd1 != expv(int'(rd_slot), int'(rd_bank), ra1)) begin failures++; $display("rd1 mismatch"); end
      if (rd2 != expv(int'(rd_slot), int'(rd_bank), ra2)) begin failures++; $display("rd2 mismatch"); end
      @(posedge clk);
      if (we && wa != 0) model[wr_slot][wr_bank][wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
