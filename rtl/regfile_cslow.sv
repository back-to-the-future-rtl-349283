// Slot-partitioned register files of the C-slow core.
//
// There are C register files, one per time slot. Each holds T/C banks of 32
// general-purpose 32-bit registers, one bank per thread bound to that slot;
// the banks of a file share two read ports and one write port. Only the file
// of the current time slot is enabled in a cycle, and two banks of one file are
// never used in the same C-cycle period, so no extra ports are needed. The
// file index is the time slot and the bank index is tid / C.
// Interface: reads are combinational (`rd_slot`, `rd_bank`, `ra1`, `ra2`);
// the write (`we`, `wr_slot`, `wr_bank`, `wa`, `wd`) takes effect at the
// clock edge. A read of the register being written in the same cycle returns
// the new value (write-before-read, as the baseline five-stage pipeline does
// with a split-cycle register file). Register 0 reads as zero. The registers
// are not reset (they model SRAM, as in the document); software initialises
// what it reads.
module regfile_cslow #(
  parameter int unsigned C = 8,
  parameter int unsigned T = 16
) (
  input  logic                               clk,
  input  logic [$clog2(C > 1 ? C : 2)-1:0]   rd_slot,
  input  logic [$clog2(T/C > 1 ? T/C : 2)-1:0] rd_bank,
  input  logic [4:0]                         ra1,
  input  logic [4:0]                         ra2,
  output logic [31:0]                        rd1,
  output logic [31:0]                        rd2,
  input  logic                               we,
  input  logic [$clog2(C > 1 ? C : 2)-1:0]   wr_slot,
  input  logic [$clog2(T/C > 1 ? T/C : 2)-1:0] wr_bank,
  input  logic [4:0]                         wa,
  input  logic [31:0]                        wd
);
  localparam int unsigned M = T / C;

  // one flat array: index = (slot * M + bank) * 32 + reg
  logic [31:0] regs [C * M * 32];

  function automatic int unsigned idx(int unsigned s, int unsigned b, logic [4:0] r);
    return (s * M + b) * 32 + int'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (we && wa != 5'd0)
      regs[idx(int'(wr_slot), int'(wr_bank), wa)] <= wd;
  end

  logic same_file;
  assign same_file = we && (wr_slot == rd_slot) && (wr_bank == rd_bank);

  always_comb begin
    if (ra1 == 5'd0)                    rd1 = '0;
    else if (same_file && wa == ra1)    rd1 = wd;
    else                                rd1 = regs[idx(int'(rd_slot), int'(rd_bank), ra1)];
    if (ra2 == 5'd0)                    rd2 = '0;
    else if (same_file && wa == ra2)    rd2 = wd;
    else                                rd2 = regs[idx(int'(rd_slot), int'(rd_bank), ra2)];
  end
endmodule
