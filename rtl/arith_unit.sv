// arith_unit: the Arithmetic functional unit of Fred.
//
// Executes add, addu, sub, subu, cmp, mul, div and divu. add and sub trap on
// signed overflow and div/divu trap on a zero divisor; those report an
// exception status to the Instruction Window and write no result. cmp
// returns the 88100 condition bit string: bit 2 eq, 3 ne, 4 gt, 5 le, 6 lt,
// 7 ge (signed) and 8 hi, 9 ls, 10 lo, 11 hs (unsigned).
// The unit takes a data-dependent time per instruction, which is what lets
// instructions complete out of order in a self-timed machine: add/sub/cmp
// take one clock, mul takes MUL_CYCLES clocks and div/divu run a restoring
// divider for 32 clocks (a zero divisor is caught at once). These latencies
// are this implementation's choice. div truncates towards zero.
// Interface: two-phase input channel, result channel to the Register File,
// status channel to the Instruction Window. A status is sent for every
// instruction that can fault and whenever Dispatch sets `report`.
module arith_unit
  import fred_pkg::*;
#(
  parameter int MUL_CYCLES = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_req,
  output logic    in_ack,
  input  fu_req_t in_data,
  output logic    res_req,
  input  logic    res_ack,
  output result_t res_data,
  output logic    st_req,
  input  logic    st_ack,
  output status_t st_data
);
  typedef enum logic [1:0] { S_IDLE, S_WORK, S_SEND, S_DONE } state_e;
  state_e state;

  wire pend   = in_req != in_ack;
  wire res_ok = res_req == res_ack;
  wire st_ok  = st_req == st_ack;

  word_t      result;
  exc_e       cause;
  logic [5:0] count;
  // divider state
  logic [31:0] quo, rem, dvs;
  logic        neg_q;

  // Single-cycle operations.
  word_t      y1;
  exc_e       c1;
  always_comb begin
    logic [32:0] s;
    logic        lt, ltu, eq;
    y1 = '0; c1 = EXC_NONE;
    eq  = in_data.a == in_data.b;
    lt  = $signed(in_data.a) < $signed(in_data.b);
    ltu = in_data.a < in_data.b;
    s   = '0;
    unique case (in_data.op)
      OP_ADD, OP_ADDU: begin
        s  = {1'b0, in_data.a} + {1'b0, in_data.b};
        y1 = s[31:0];
        if (in_data.op == OP_ADD && in_data.a[31] == in_data.b[31] && y1[31] != in_data.a[31])
          c1 = EXC_OVERFLOW;
      end
      OP_SUB, OP_SUBU: begin
        y1 = in_data.a - in_data.b;
        if (in_data.op == OP_SUB && in_data.a[31] != in_data.b[31] && y1[31] != in_data.a[31])
          c1 = EXC_OVERFLOW;
      end
      OP_CMP: begin
        y1[2]  = eq;         y1[3]  = !eq;
        y1[4]  = !lt && !eq; y1[5]  = lt || eq;
        y1[6]  = lt;         y1[7]  = !lt;
        y1[8]  = !ltu && !eq; y1[9] = ltu || eq;
        y1[10] = ltu;        y1[11] = !ltu;
      end
      default: ;
    endcase
  end

  wire is_div = in_data.op == OP_DIV || in_data.op == OP_DIVU;
  wire is_mul = in_data.op == OP_MUL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; in_ack <= 1'b0; res_req <= 1'b0; st_req <= 1'b0;
      res_data <= '0; st_data <= '0; result <= '0; cause <= EXC_NONE; count <= '0;
      quo <= '0; rem <= '0; dvs <= '0; neg_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (pend) begin
          if (is_mul) begin
            result <= in_data.a * in_data.b;
            cause  <= EXC_NONE;
            count  <= 6'(MUL_CYCLES - 1);
            state  <= (MUL_CYCLES > 1) ? S_WORK : S_SEND;
          end else if (is_div) begin
            if (in_data.b == '0) begin
              cause <= EXC_DIVZERO;
              state <= S_SEND;
            end else begin
              logic sgn;
              sgn   = in_data.op == OP_DIV;
              quo   <= (sgn && in_data.a[31]) ? -in_data.a : in_data.a;
              dvs   <= (sgn && in_data.b[31]) ? -in_data.b : in_data.b;
              rem   <= '0;
              neg_q <= sgn && (in_data.a[31] ^ in_data.b[31]);
              cause <= EXC_NONE;
              count <= 6'd32;
              state <= S_WORK;
            end
          end else begin
            result <= y1;
            cause  <= c1;
            state  <= S_SEND;
          end
        end
        S_WORK: begin
          if (is_div) begin
            // one restoring-division step per clock
            logic [32:0] r2;
            r2 = {rem, quo[31]} - {1'b0, dvs};
            if (!r2[32]) begin
              rem <= r2[31:0];
              quo <= {quo[30:0], 1'b1};
            end else begin
              rem <= {rem[30:0], quo[31]};
              quo <= {quo[30:0], 1'b0};
            end
            if (count == 6'd1) state <= S_DONE;
          end else if (count == 6'd1) state <= S_SEND;
          count <= count - 6'd1;
        end
        S_DONE: begin
          result <= neg_q ? -quo : quo;
          state  <= S_SEND;
        end
        S_SEND: if (res_ok && st_ok) begin
          if (cause == EXC_NONE) begin
            res_data <= '{rd: in_data.rd, data: result};
            res_req  <= ~res_req;
          end
          if (in_data.report || cause != EXC_NONE) begin
            st_data <= '{tag: in_data.tag, exc: cause != EXC_NONE, cause: cause};
            st_req  <= ~st_req;
          end
          in_ack <= ~in_ack;
          state  <= S_IDLE;
        end
      endcase
    end
  end
endmodule
