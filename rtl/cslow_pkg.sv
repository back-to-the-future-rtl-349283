// Shared types and constants of the C-slow multithreaded MIPS core.
//
// The core is a classic five-stage, single-issue, in-order MIPS pipeline
// (fetch, decode, execute, memory, writeback) whose four major pipeline
// registers are each replaced by a chain of C minor registers. Records that
// travel down those chains are defined here, together with the decoded
// instruction format and the ALU and multiply/divide operation codes.
// The instruction subset and the record layouts are this design's choice;
// thread identifiers are carried as 8-bit values so that up to 256 hardware
// threads can be configured.
package cslow_pkg;

  localparam int XLEN = 32;

  typedef logic [7:0]  tid_t;
  typedef logic [31:0] word_t;

  // MIPS primary opcodes used by the decoder
  localparam logic [5:0] OP_SPECIAL = 6'h00;
  localparam logic [5:0] OP_REGIMM  = 6'h01;
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_BEQ     = 6'h04;
  localparam logic [5:0] OP_BNE     = 6'h05;
  localparam logic [5:0] OP_BLEZ    = 6'h06;
  localparam logic [5:0] OP_BGTZ    = 6'h07;
  localparam logic [5:0] OP_ADDI    = 6'h08;
  localparam logic [5:0] OP_ADDIU   = 6'h09;
  localparam logic [5:0] OP_SLTI    = 6'h0a;
  localparam logic [5:0] OP_SLTIU   = 6'h0b;
  localparam logic [5:0] OP_ANDI    = 6'h0c;
  localparam logic [5:0] OP_ORI     = 6'h0d;
  localparam logic [5:0] OP_XORI    = 6'h0e;
  localparam logic [5:0] OP_LUI     = 6'h0f;
  localparam logic [5:0] OP_LW      = 6'h23;
  localparam logic [5:0] OP_SW      = 6'h2b;

  // SPECIAL function codes
  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_SLLV  = 6'h04;
  localparam logic [5:0] FN_SRLV  = 6'h06;
  localparam logic [5:0] FN_SRAV  = 6'h07;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_JALR  = 6'h09;
  localparam logic [5:0] FN_MFHI  = 6'h10;
  localparam logic [5:0] FN_MFLO  = 6'h12;
  localparam logic [5:0] FN_MULT  = 6'h18;
  localparam logic [5:0] FN_MULTU = 6'h19;
  localparam logic [5:0] FN_DIV   = 6'h1a;
  localparam logic [5:0] FN_DIVU  = 6'h1b;
  localparam logic [5:0] FN_ADD   = 6'h20;
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUB   = 6'h22;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_NOR   = 6'h27;
  localparam logic [5:0] FN_SLT   = 6'h2a;
  localparam logic [5:0] FN_SLTU  = 6'h2b;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [1:0] { MD_MULT, MD_MULTU, MD_DIV, MD_DIVU } md_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_JUMP
  } br_kind_e;

  // Decoded instruction
  typedef struct packed {
    alu_op_e    alu_op;
    logic       use_imm;     // operand B is the immediate
    logic       shamt_var;   // shift amount from rs instead of shamt field
    logic [4:0] shamt;
    word_t      imm;         // sign- or zero-extended immediate
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] dest;
    logic       reg_write;
    logic       is_load;
    logic       is_store;
    br_kind_e   br;
    logic       jump_reg;    // JR / JALR target from rs
    logic [25:0] jidx;       // J / JAL target index
    logic       link;        // JAL / JALR write PC+8
    logic       is_md;       // multiply or divide
    md_op_e     md_op;
    logic       mfhi;
    logic       mflo;
    logic       illegal;
  } dec_t;

  // Fetch -> decode record
  typedef struct packed {
    logic  valid;
    tid_t  tid;
    word_t pc;
    word_t npc;   // address of the instruction that follows this one
    word_t instr;
  } if_id_t;

  // Decode -> execute record
  typedef struct packed {
    logic  valid;
    tid_t  tid;
    word_t pc;
    word_t npc;
    dec_t  dec;
    word_t rs_val;
    word_t rt_val;
  } id_ex_t;

  // Execute -> memory record
  typedef struct packed {
    logic       valid;
    tid_t       tid;
    word_t      pc;
    word_t      npc;
    logic [4:0] dest;
    logic       reg_write;
    word_t      result;      // ALU result, or effective address for memory ops
    logic       is_load;
    logic       is_store;
    word_t      store_data;
  } ex_mem_t;

  // Memory -> writeback record
  typedef struct packed {
    logic       valid;
    tid_t       tid;
    logic [4:0] dest;
    logic       reg_write;
    word_t      result;
  } mem_wb_t;

  // One-cycle event pulses, for performance counting and test coverage
  typedef struct packed {
    logic fetch;          // an instruction was fetched
    logic retire;         // an instruction reached writeback
    logic imiss_switch;   // I-cache miss parked a thread
    logic dmiss_switch;   // D-cache miss replayed a load and parked a thread
    logic md_block;       // non-mul/div instruction waited for outstanding mul/div
    logic md_done;        // a mul/div result left the 32C-cycle pipeline
    logic branch_taken;   // taken branch or jump resolved in execute
    logic branch_nullify; // over-fetched instruction nullified
    logic bank_conflict;  // D-cache bank conflict froze the pipeline
    logic sb_full_stall;  // store found its thread's store buffer entry busy
    logic sb_forward;     // load served from the store buffer
    logic fwd_ex;         // operand forwarded from the memory stage
    logic fwd_wb;         // operand forwarded from the writeback stage
    logic slot_idle;      // time slot had no ready thread
    logic itlb_switch;    // instruction TLB miss parked a thread
    logic dtlb_switch;    // data TLB miss replayed a load/store and parked a thread
  } perf_ev_t;

endpackage
