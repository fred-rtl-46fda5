// dispatch: Fred's Dispatch unit - program counter, instruction fetch, the
// Instruction Window (IW), the register scoreboard, decoupled branches and
// exceptions.
//
// Fetch. One instruction is fetched at a time over a two-phase request/
// response pair to instruction memory. A fetched instruction goes into the
// next free IW slot; fetching continues while there is room, so the IW also
// acts as a prefetch buffer. "doit" never enters the IW: Dispatch stops
// fetching until the Branch Queue holds an entry, pops it and either loads
// the target into the PC or falls through. Setting the d bit of any other
// instruction inserts the same doit right after it. rte is also consumed
// here (see Exceptions).
//
// Issue. Instructions issue strictly in program order from the IW when the
// scoreboard shows none of their sources busy and their destination not
// busy (RAW and WAW). Issuing sends an operand request to the Register File
// and the instruction, tagged with its IW slot number, to the Distributor.
// Issue does not free the slot; the slot is freed, oldest first, once its
// instruction has completed. Instructions that can never fault are marked
// complete as they issue; the rest report a status on their unit's status
// channel, and may complete out of order. An instruction that writes r1 (the
// R1 Queue) always reports, and Dispatch clears r1's scoreboard bit when it
// does; at most one R1 Queue writer is in flight, so R1 Queue writes stay in
// program order. sync issues only when it is the oldest instruction and
// holds back all later issue until it reports.
//
// Deadlock detection. Dispatch counts, at fetch time, the Branch Queue
// entries that fetched branches will provide and the R1 Queue words that
// fetched producers will provide. A doit with no entry to come, an
// instruction reading more R1 Queue words than will come, or an r1 writer
// that would leave more than R1_CAP words waiting for readers (the R1 Queue
// would fill and its readers could never issue) raises an exception before
// it enters the IW.
//
// Exceptions. A fault status (or a deadlock found at fetch) stops issue and
// fetch. Once no issued instruction is still in flight, the exception is
// taken: the exception set - the faulted and the not yet issued slots, in
// program order - is written to the Control unit's registers with the cause,
// the address of the oldest faulted instruction (EPC) and the resume address
// (the next fetch address). The IW is cleared, the faulted destinations are
// released in the scoreboard, and fetch restarts at HANDLER_PC. rte waits
// until the IW is empty, then re-fetches the unissued members of the set,
// in order, and continues at the resume address (which the handler may
// change with putcr); faulted instructions are left to the handler. The
// architecture leaves the exception mechanism open; this scheme, the
// handler-address and the rule that a handler must not use branches or the
// R1 Queue are this implementation's own choices.
//
// Timing (clocked model): at most one fetch, one issue, one retirement and
// one status per unit each clock.
module dispatch
  import fred_pkg::*;
#(
  parameter int    IW_DEPTH   = 8,
  parameter int    R1_CAP     = 10,   // R1 Queue words the machine can hold
  parameter word_t RESET_PC   = 32'h0000_0000,
  parameter word_t HANDLER_PC = 32'h0000_0100
) (
  input  logic      clk,
  input  logic      rst_n,
  // instruction memory: address out, instruction back
  output logic      if_req,
  input  logic      if_ack,
  output word_t     if_addr,
  input  logic      ir_req,
  output logic      ir_ack,
  input  word_t     ir_data,
  // issue to the Distributor and operand requests to the Register File
  output logic      is_req,
  input  logic      is_ack,
  output issue_t    is_data,
  output logic      rq_req,
  input  logic      rq_ack,
  output opreq_t    rq_data,
  // completion status from the functional units
  input  logic      st_req  [NFU],
  output logic      st_ack  [NFU],
  input  status_t   st_data [NFU],
  // Branch Queue head
  input  logic      bq_req,
  output logic      bq_ack,
  input  bq_entry_t bq_data,
  // scoreboard clears from the Register File
  input  logic [NREGS-1:0] sb_clr,
  // exception record to the Control unit, resume address back
  output logic      exc_we,
  output exc_e      exc_cause,
  output word_t     exc_epc,
  output word_t     exc_resume,
  output word_t     exc_count,
  output word_t     exc_set [IW_DEPTH],
  input  logic      resume_we,
  input  word_t     resume_pc_in
);
  localparam int PW = (IW_DEPTH > 1) ? $clog2(IW_DEPTH) : 1;
  typedef logic [PW-1:0] ptr_t;
  typedef enum logic [2:0] { SL_EMPTY, SL_WAIT, SL_ISSUED, SL_DONE, SL_FAULT } slot_e;

  function automatic ptr_t nxt(input ptr_t p);
    return (int'(p) == IW_DEPTH - 1) ? '0 : p + ptr_t'(1);
  endfunction

  // ---------------- state ----------------
  slot_e  slot_st [IW_DEPTH];
  word_t  slot_pc [IW_DEPTH];
  instr_t slot_in [IW_DEPTH];
  dec_t   slot_dc [IW_DEPTH];
  exc_e   slot_ca [IW_DEPTH];
  ptr_t   head, tail, iss;
  logic [PW:0] count;

  word_t pc, fetch_pc;
  logic  fetch_out;
  logic  doit_wait, rte_wait, sync_out;
  logic  exc_pending;
  exc_e  fetch_cause;     // cause of a deadlock / illegal found at fetch
  word_t fetch_epc;
  logic signed [15:0] bq_credit, r1_credit;

  // saved by the exception, used by rte
  word_t resume_pc;
  logic  resume_doit;
  word_t rset_pc [IW_DEPTH];
  logic [PW:0] rcount, ridx;
  logic  replay;

  logic [NREGS-1:0] sb_busy, sb_set, sb_clr_all;
  scoreboard #(.NREGS(NREGS)) u_sb (
    .clk(clk), .rst_n(rst_n), .set_vec(sb_set), .clr_vec(sb_clr_all), .busy(sb_busy)
  );

  // ---------------- issue decision ----------------
  instr_t c_in;
  dec_t   c_dc;
  logic   can_issue, c_report;
  always_comb begin
    logic src_busy, dst_busy;
    c_in = slot_in[iss];
    c_dc = slot_dc[iss];
    src_busy = (c_dc.use1 && c_in.rs1 != 5'd0 && sb_busy[c_in.rs1]) ||
               (c_dc.use2 && rs2_of(c_in) != 5'd0 && sb_busy[rs2_of(c_in)]) ||
               (c_dc.use3 && c_in.rd != 5'd0 && sb_busy[c_in.rd]);
    dst_busy = c_dc.writes && c_in.rd != 5'd0 && sb_busy[c_in.rd];
    c_report = c_dc.can_fault || c_dc.is_sync || (c_dc.writes && c_in.rd == 5'd1) ||
               c_in.op == OP_PUTCR;  // so that a following rte sees its write
    can_issue = slot_st[iss] == SL_WAIT && !exc_pending && !sync_out &&
                is_req == is_ack && rq_req == rq_ack && !src_busy && !dst_busy &&
                (!c_dc.is_sync || iss == head);
  end

  // ---------------- exception bookkeeping ----------------
  logic  any_issued, has_fault;
  ptr_t  first_fault;
  word_t set_words [IW_DEPTH];
  word_t set_n;
  logic signed [15:0] r1_undo, bq_undo;
  always_comb begin
    ptr_t p;
    any_issued = 1'b0; has_fault = 1'b0;
    first_fault = '0; set_n = '0;
    r1_undo = '0; bq_undo = '0;
    for (int k = 0; k < IW_DEPTH; k++) set_words[k] = '0;
    p = head;
    for (int k = 0; k < IW_DEPTH; k++) begin
      if (k < int'(count)) begin
        if (slot_st[p] == SL_ISSUED) any_issued = 1'b1;
        if (slot_st[p] == SL_FAULT && !has_fault) begin
          has_fault = 1'b1; first_fault = p;
        end
        if (slot_st[p] == SL_WAIT || slot_st[p] == SL_FAULT) begin
          set_words[set_n[PW-1:0]] = {slot_pc[p][31:2], slot_st[p] == SL_FAULT, 1'b1};
          set_n = set_n + 1;
          r1_undo = r1_undo +
                    16'((slot_dc[p].writes && slot_in[p].rd == 5'd1) ? 1 : 0) -
                    16'(r1_reads(slot_in[p], slot_dc[p]));
          bq_undo = bq_undo + 16'(slot_dc[p].is_branch ? 1 : 0);
        end
      end
      p = nxt(p);
    end
  end

  wire take_exc = exc_pending && !any_issued && !fetch_out;

  // ---------------- fetch response decode ----------------
  wire    resp  = fetch_out && (ir_req != ir_ack);
  instr_t f_in;
  dec_t   f_dc;
  assign  f_in = to_instr(ir_data);
  assign  f_dc = decode(f_in);
  wire [1:0] f_r1r = r1_reads(f_in, f_dc);
  wire       f_r1w = f_dc.writes && f_in.rd == 5'd1;
  wire       f_d   = f_in.d && !replay;   // a replayed doit was already consumed

  // scoreboard control
  always_comb begin
    sb_set = '0;
    if (can_issue && c_dc.writes) sb_set[c_in.rd] = 1'b1;
    sb_clr_all = sb_clr;
    for (int k = 0; k < NFU; k++)
      if (st_req[k] != st_ack[k] && !st_data[k].exc &&
          slot_dc[st_data[k].tag[PW-1:0]].writes && slot_in[st_data[k].tag[PW-1:0]].rd == 5'd1)
        sb_clr_all[1] = 1'b1;
    if (take_exc)
      for (int k = 0; k < IW_DEPTH; k++)
        if (slot_st[k] == SL_FAULT && slot_dc[k].writes) sb_clr_all[slot_in[k].rd] = 1'b1;
  end

  wire fetch_go = !fetch_out && !doit_wait && !rte_wait && !exc_pending &&
                  int'(count) < IW_DEPTH && if_req == if_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < IW_DEPTH; k++) begin
        slot_st[k] <= SL_EMPTY; slot_pc[k] <= '0; slot_in[k] <= '0;
        slot_dc[k] <= '0; slot_ca[k] <= EXC_NONE; rset_pc[k] <= '0;
      end
      for (int k = 0; k < NFU; k++) st_ack[k] <= 1'b0;
      head <= '0; tail <= '0; iss <= '0; count <= '0;
      pc <= RESET_PC; fetch_pc <= '0; fetch_out <= 1'b0;
      doit_wait <= 1'b0; rte_wait <= 1'b0; sync_out <= 1'b0; exc_pending <= 1'b0;
      fetch_cause <= EXC_NONE; fetch_epc <= '0; bq_credit <= '0; r1_credit <= '0;
      resume_pc <= '0; resume_doit <= 1'b0; rcount <= '0; ridx <= '0; replay <= 1'b0;
      if_req <= 1'b0; if_addr <= '0; ir_ack <= 1'b0; is_req <= 1'b0; is_data <= '0;
      rq_req <= 1'b0; rq_data <= '0; bq_ack <= 1'b0;
      exc_we <= 1'b0; exc_cause <= EXC_NONE; exc_epc <= '0; exc_resume <= '0;
      exc_count <= '0;
      for (int k = 0; k < IW_DEPTH; k++) exc_set[k] <= '0;
    end else begin
      logic [PW:0] cnt;
      logic signed [15:0] bqc, r1c;
      cnt = count; bqc = bq_credit; r1c = r1_credit;
      exc_we <= 1'b0;
      if (resume_we) resume_pc <= resume_pc_in;

      // ---- completion status from the units ----
      for (int k = 0; k < NFU; k++) begin
        if (st_req[k] != st_ack[k]) begin
          st_ack[k] <= ~st_ack[k];
          if (st_data[k].exc) begin
            slot_st[st_data[k].tag[PW-1:0]] <= SL_FAULT;
            slot_ca[st_data[k].tag[PW-1:0]] <= st_data[k].cause;
            exc_pending <= 1'b1;
          end else begin
            slot_st[st_data[k].tag[PW-1:0]] <= SL_DONE;
            if (slot_dc[st_data[k].tag[PW-1:0]].is_sync) sync_out <= 1'b0;
          end
        end
      end

      // ---- retire the oldest slot once complete ----
      if (cnt != '0 && slot_st[head] == SL_DONE) begin
        slot_st[head] <= SL_EMPTY;
        head <= nxt(head);
        cnt = cnt - 1'b1;
      end

      // ---- issue ----
      if (can_issue) begin
        is_data <= '{tag: 4'(iss), op: c_in.op, fu: c_dc.fu, rd: c_in.rd, i: c_in.i,
                     report: c_report, pc: slot_pc[iss]};
        is_req  <= ~is_req;
        rq_data <= '{rs1: c_in.rs1, rs2: rs2_of(c_in), rs3: c_in.rd, use1: c_dc.use1,
                     use2: c_dc.use2, use3: c_dc.use3, i: c_in.i, imm: imm_of(c_in)};
        rq_req  <= ~rq_req;
        slot_st[iss] <= c_report ? SL_ISSUED : SL_DONE;
        if (c_dc.is_sync) sync_out <= 1'b1;
        iss <= nxt(iss);
      end

      // ---- doit: consume a Branch Queue entry ----
      if (doit_wait && bq_req != bq_ack && !take_exc) begin
        bq_ack    <= ~bq_ack;
        doit_wait <= 1'b0;
        if (bq_data.taken) pc <= bq_data.target;
      end

      // ---- rte: return from the handler once the window is empty ----
      if (rte_wait && cnt == '0 && !exc_pending) begin
        rte_wait <= 1'b0;
        pc       <= resume_pc;
        if (rcount != '0) begin
          replay <= 1'b1;
          ridx   <= '0;
        end else begin
          doit_wait <= resume_doit;
        end
      end

      // ---- fetch request ----
      if (fetch_go) begin
        if_addr   <= replay ? rset_pc[ridx[PW-1:0]] : pc;
        fetch_pc  <= replay ? rset_pc[ridx[PW-1:0]] : pc;
        if_req    <= ~if_req;
        fetch_out <= 1'b1;
        if (!replay) pc <= pc + 32'd4;
      end

      // ---- fetch response ----
      if (resp) begin
        logic bad;
        ir_ack    <= ~ir_ack;
        fetch_out <= 1'b0;
        bad = 1'b0;
        if (exc_pending) begin
          bad = 1'b1;                               // dropped, fetched again later
        end else if (!f_dc.legal) begin
          bad = 1'b1; fetch_cause <= EXC_ILLEGAL;
        end else if (f_in.op == OP_DOIT) begin
          if (bqc <= 0) begin bad = 1'b1; fetch_cause <= EXC_BQ_DEAD; end
          else begin bqc = bqc - 1; doit_wait <= 1'b1; end
        end else if (f_in.op == OP_RTE) begin
          rte_wait <= 1'b1;
        end else if (16'(f_r1r) > r1c) begin
          bad = 1'b1; fetch_cause <= EXC_R1_DEAD;
        end else if (f_r1w && r1c + 16'sd1 - $signed(16'(f_r1r)) > $signed(16'(R1_CAP))) begin
          bad = 1'b1; fetch_cause <= EXC_R1_DEAD;  // would overfill the R1 Queue
        end else if (f_d && bqc + 16'(f_dc.is_branch ? 1 : 0) <= 0) begin
          bad = 1'b1; fetch_cause <= EXC_BQ_DEAD;
        end else begin
          slot_st[tail] <= SL_WAIT;
          slot_pc[tail] <= fetch_pc;
          slot_in[tail] <= f_in;
          slot_dc[tail] <= f_dc;
          slot_ca[tail] <= EXC_NONE;
          tail <= nxt(tail);
          cnt = cnt + 1'b1;
          r1c = r1c + 16'(f_r1w ? 1 : 0) - 16'(f_r1r);
          bqc = bqc + 16'(f_dc.is_branch ? 1 : 0);
          if (f_d) begin bqc = bqc - 1; doit_wait <= 1'b1; end
        end
        if (bad) begin
          if (!exc_pending) begin
            exc_pending <= 1'b1;
            fetch_epc   <= fetch_pc;
          end
          if (!replay) pc <= fetch_pc;             // fetch this one again later
        end else if (replay) begin
          if (ridx + 1'b1 == rcount) begin
            replay    <= 1'b0;
            doit_wait <= resume_doit;
          end
          ridx <= ridx + 1'b1;
        end
      end

      // ---- take an exception ----
      if (take_exc) begin
        exc_we     <= 1'b1;
        exc_cause  <= has_fault ? slot_ca[first_fault] : fetch_cause;
        exc_epc    <= has_fault ? slot_pc[first_fault] : fetch_epc;
        exc_resume <= pc;
        exc_count  <= set_n;
        exc_set    <= set_words;
        resume_pc  <= pc;
        resume_doit <= doit_wait;
        // only the unissued members are fetched again by rte
        begin
          ptr_t p;
          logic [PW:0] n;
          p = head; n = '0;
          for (int k = 0; k < IW_DEPTH; k++) begin
            if (k < int'(count) && slot_st[p] == SL_WAIT) begin
              rset_pc[n[PW-1:0]] <= slot_pc[p];
              n = n + 1'b1;
            end
            p = nxt(p);
          end
          rcount <= n;
        end
        for (int k = 0; k < IW_DEPTH; k++) slot_st[k] <= SL_EMPTY;
        head <= '0; tail <= '0; iss <= '0; cnt = '0;
        r1c = r1c - r1_undo;
        bqc = bqc - bq_undo;
        pc <= HANDLER_PC;
        doit_wait   <= 1'b0;
        rte_wait    <= 1'b0;
        replay      <= 1'b0;
        sync_out    <= 1'b0;
        exc_pending <= 1'b0;
        fetch_cause <= EXC_NONE;
      end

      count     <= cnt;
      bq_credit <= bqc;
      r1_credit <= r1c;
    end
  end
endmodule
