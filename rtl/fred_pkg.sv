// fred_pkg: types and constants shared by the Fred decoupled processor.
//
// Fred is a decoupled processor whose units talk over self-timed FIFO
// channels. This RTL models each channel with a clocked two-phase
// (transition) handshake: the sender toggles `req` to offer a bundled data
// word, the receiver toggles `ack` to accept it. A channel holds data while
// req != ack and is free while req == ack.
//
// The instruction list (Figure 3 of the architecture: Logic & Bitfield,
// Arithmetic, Memory, Branch, Control) follows the architecture. The 32-bit
// binary encoding, the control-register map and the exception cause codes are
// this implementation's own choices:
//
//   [31:26] opcode   [25] d (implicit doit)   [24:20] rd   [19:15] rs1
//   [14] i (1: second operand is imm)   [13:0] imm (sign-extended)
//   when i == 0 the second source register rs2 is [4:0]
package fred_pkg;

  localparam int XLEN   = 32;
  localparam int NREGS  = 32;
  localparam int NFU    = 5;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_t;

  typedef enum logic [5:0] {
    OP_AND   = 6'd0,  OP_MASK = 6'd1,  OP_OR    = 6'd2,  OP_XOR  = 6'd3,
    OP_CLR   = 6'd4,  OP_EXT  = 6'd5,  OP_EXTU  = 6'd6,  OP_FF0  = 6'd7,
    OP_FF1   = 6'd8,  OP_MAK  = 6'd9,  OP_ROT   = 6'd10, OP_SET  = 6'd11,
    OP_ADD   = 6'd12, OP_ADDU = 6'd13, OP_CMP   = 6'd14, OP_DIV  = 6'd15,
    OP_DIVU  = 6'd16, OP_MUL  = 6'd17, OP_SUB   = 6'd18, OP_SUBU = 6'd19,
    OP_LD    = 6'd20, OP_ST   = 6'd21, OP_XMEM  = 6'd22,
    OP_BLT   = 6'd23, OP_BLE  = 6'd24, OP_BNE   = 6'd25, OP_BEQ  = 6'd26,
    OP_BGE   = 6'd27, OP_BGT  = 6'd28, OP_BB0   = 6'd29, OP_BB1  = 6'd30,
    OP_BR    = 6'd31, OP_DOIT = 6'd32, OP_MVPC  = 6'd33,
    OP_GETCR = 6'd34, OP_PUTCR = 6'd35, OP_RTE  = 6'd36, OP_SYNC = 6'd37,
    OP_TRAP  = 6'd38
  } op_e;

  // Functional units, also the index of each unit's channels.
  typedef enum logic [2:0] {
    FU_LOGIC = 3'd0, FU_ARITH = 3'd1, FU_MEM = 3'd2, FU_BRANCH = 3'd3,
    FU_CTRL  = 3'd4, FU_NONE  = 3'd7
  } fu_e;

  typedef enum logic [3:0] {
    EXC_NONE     = 4'd0,
    EXC_OVERFLOW = 4'd1,  // signed add/sub overflow
    EXC_DIVZERO  = 4'd2,  // div/divu by zero
    EXC_ALIGN    = 4'd3,  // misaligned data address
    EXC_TRAP     = 4'd4,  // trap instruction
    EXC_R1_DEAD  = 4'd5,  // R1 Queue would be read with no producer
    EXC_BQ_DEAD  = 4'd6,  // doit with no branch left to feed it
    EXC_ILLEGAL  = 4'd7   // undefined opcode
  } exc_e;

  // Control registers seen by getcr/putcr.
  localparam int CR_ECAUSE  = 0;   // cause of the last exception
  localparam int CR_EPC     = 1;   // address of the oldest instruction that faulted
  localparam int CR_ERESUME = 2;   // address rte resumes at (writable)
  localparam int CR_ECOUNT  = 3;   // number of instructions in the exception set
  localparam int CR_ESET    = 16;  // 16.. : the exception set, oldest first
                                   // each {pc[31:2], faulted, valid}

  typedef struct packed {
    op_e          op;
    logic         d;
    reg_t         rd;
    reg_t         rs1;
    logic         i;
    logic [13:0]  imm;
  } instr_t;

  // What the dispatch logic needs to know about an instruction.
  typedef struct packed {
    logic legal;
    fu_e  fu;
    logic use1;      // reads rs1
    logic use2;      // reads rs2 (only when i == 0)
    logic use3;      // reads rd as a source (store data)
    logic writes;    // writes rd
    logic can_fault; // may report an exception
    logic is_branch; // pushes one entry into the Branch Queue
    logic is_sync;
  } dec_t;

  // Dispatch -> Register File: which operands to fetch.
  typedef struct packed {
    reg_t  rs1, rs2, rs3;
    logic  use1, use2, use3;
    logic  i;
    word_t imm;
  } opreq_t;

  typedef struct packed {
    word_t a, b, c;
  } operands_t;

  // Dispatch -> Distributor: the issued instruction.
  typedef struct packed {
    logic [3:0] tag;
    op_e        op;
    fu_e        fu;
    reg_t       rd;
    logic       i;
    logic       report;  // send a status back to the Instruction Window
    word_t      pc;
  } issue_t;

  // Distributor -> functional unit.
  typedef struct packed {
    logic [3:0] tag;
    op_e        op;
    reg_t       rd;
    logic       i;
    logic       report;
    word_t      pc;
    word_t      a, b, c;
  } fu_req_t;

  // Functional unit -> Register File (rd == 1 goes to the R1 Queue).
  typedef struct packed {
    reg_t  rd;
    word_t data;
  } result_t;

  // Functional unit -> Instruction Window.
  typedef struct packed {
    logic [3:0] tag;
    logic       exc;
    exc_e       cause;
  } status_t;

  // Branch unit -> Branch Queue -> Dispatch.
  typedef struct packed {
    logic  taken;
    word_t target;
  } bq_entry_t;

  // Data memory request; the memory answers every request with one word.
  typedef enum logic [1:0] { DM_READ = 2'd0, DM_WRITE = 2'd1, DM_SWAP = 2'd2 } dm_op_e;
  typedef struct packed {
    dm_op_e op;
    word_t  addr;
    word_t  wdata;
  } dmem_req_t;

  function automatic instr_t to_instr(input word_t w);
    instr_t r;
    r.op  = op_e'(w[31:26]);
    r.d   = w[25];
    r.rd  = w[24:20];
    r.rs1 = w[19:15];
    r.i   = w[14];
    r.imm = w[13:0];
    return r;
  endfunction

  function automatic reg_t rs2_of(input instr_t x);
    return x.imm[4:0];
  endfunction

  function automatic word_t imm_of(input instr_t x);
    return {{(XLEN-14){x.imm[13]}}, x.imm};
  endfunction

  function automatic dec_t decode(input instr_t x);
    dec_t d;
    d = '0;
    d.legal = 1'b1;
    d.fu    = FU_NONE;
    unique case (x.op)
      OP_AND, OP_MASK, OP_OR, OP_XOR, OP_CLR, OP_EXT, OP_EXTU, OP_MAK,
      OP_ROT, OP_SET: begin
        d.fu = FU_LOGIC; d.use1 = 1'b1; d.use2 = !x.i; d.writes = 1'b1;
      end
      OP_FF0, OP_FF1: begin
        d.fu = FU_LOGIC; d.use1 = 1'b1; d.writes = 1'b1;
      end
      OP_ADD, OP_SUB, OP_DIV, OP_DIVU: begin
        d.fu = FU_ARITH; d.use1 = 1'b1; d.use2 = !x.i; d.writes = 1'b1;
        d.can_fault = 1'b1;
      end
      OP_ADDU, OP_SUBU, OP_CMP, OP_MUL: begin
        d.fu = FU_ARITH; d.use1 = 1'b1; d.use2 = !x.i; d.writes = 1'b1;
      end
      OP_LD: begin
        d.fu = FU_MEM; d.use1 = 1'b1; d.use2 = !x.i; d.writes = 1'b1;
        d.can_fault = 1'b1;
      end
      OP_ST: begin
        d.fu = FU_MEM; d.use1 = 1'b1; d.use2 = !x.i; d.use3 = 1'b1;
        d.can_fault = 1'b1;
      end
      OP_XMEM: begin
        d.fu = FU_MEM; d.use1 = 1'b1; d.use2 = !x.i; d.use3 = 1'b1;
        d.writes = 1'b1; d.can_fault = 1'b1;
      end
      OP_BLT, OP_BLE, OP_BNE, OP_BEQ, OP_BGE, OP_BGT, OP_BB0, OP_BB1: begin
        d.fu = FU_BRANCH; d.use1 = 1'b1; d.use2 = !x.i; d.is_branch = 1'b1;
      end
      OP_BR: begin
        d.fu = FU_BRANCH; d.use2 = !x.i; d.is_branch = 1'b1;
      end
      OP_MVPC: begin
        d.fu = FU_BRANCH; d.writes = 1'b1;
      end
      OP_GETCR: begin
        d.fu = FU_CTRL; d.writes = 1'b1;
      end
      OP_PUTCR: begin
        d.fu = FU_CTRL; d.use1 = 1'b1;
      end
      OP_TRAP: begin
        d.fu = FU_CTRL; d.can_fault = 1'b1;
      end
      OP_SYNC: begin
        d.fu = FU_CTRL; d.is_sync = 1'b1;
      end
      OP_DOIT, OP_RTE: d.fu = FU_NONE;  // consumed inside Dispatch
      default: d.legal = 1'b0;
    endcase
    return d;
  endfunction

  // Number of R1 Queue words an instruction consumes (one per r1 source).
  function automatic logic [1:0] r1_reads(input instr_t x, input dec_t d);
    return 2'((d.use1 && x.rs1 == 5'd1) ? 1 : 0) +
           2'((d.use2 && rs2_of(x) == 5'd1) ? 1 : 0) +
           2'((d.use3 && x.rd == 5'd1) ? 1 : 0);
  endfunction

  // Encoder used by testbenches and by anyone writing programs by hand.
  function automatic word_t enc(input op_e op, input reg_t rd, input reg_t rs1,
                                input logic i, input logic [13:0] imm_or_rs2,
                                input logic d = 1'b0);
    return {op, d, rd, rs1, i, imm_or_rs2};
  endfunction

endpackage
