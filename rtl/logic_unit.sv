// logic_unit: the Logic & Bitfield functional unit of Fred.
//
// Executes and, mask, or, xor and the bit-field instructions clr, set, ext,
// extu, mak, rot, ff0 and ff1 (the 88100 set). Operand a is rs1; operand b is
// rs2 or the immediate. For the bit-field group b[9:5] is the field width
// (0 means 32) and b[4:0] the field offset; rot rotates right by b[4:0]; ff0
// and ff1 return the bit number of the most significant 0 or 1 of a, or 32 if
// there is none. mask is an and with the zero-extended low 16 bits of b.
// These instructions never fault, so the unit sends a status only when the
// Dispatch unit asks for one (an instruction that writes the R1 Queue).
// Interface: one two-phase input channel (fu_req_t), one two-phase result
// channel to the Register File and one status channel to the Instruction
// Window. Timing: the result is computed in the clock after the request is
// seen; the input is acknowledged once result and status have been sent.
module logic_unit
  import fred_pkg::*;
(
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
  function automatic word_t field_mask(input logic [4:0] w, input logic [4:0] o);
    logic [63:0] m;
    m = (w == 5'd0) ? 64'hFFFF_FFFF : ((64'd1 << w) - 64'd1);
    return word_t'(m << o);
  endfunction

  function automatic word_t find_first(input word_t v);
    word_t r;
    r = 32'd32;
    for (int k = 0; k < 32; k++) if (v[k]) r = word_t'(k);
    return r;
  endfunction

  word_t y;
  always_comb begin
    logic [4:0] w, o;
    word_t m, sh;
    w  = in_data.b[9:5];
    o  = in_data.b[4:0];
    m  = field_mask(w, o);
    sh = in_data.a >> o;
    unique case (in_data.op)
      OP_AND:  y = in_data.a & in_data.b;
      OP_MASK: y = in_data.a & {16'h0, in_data.b[15:0]};
      OP_OR:   y = in_data.a | in_data.b;
      OP_XOR:  y = in_data.a ^ in_data.b;
      OP_CLR:  y = in_data.a & ~m;
      OP_SET:  y = in_data.a | m;
      OP_EXTU: y = sh & field_mask(w, 5'd0);
      OP_EXT: begin
        if (w == 5'd0) y = word_t'($signed(in_data.a) >>> o);
        else           y = word_t'($signed(in_data.a << (6'd32 - {1'b0, w} - {1'b0, o}))
                                   >>> (6'd32 - {1'b0, w}));
      end
      OP_MAK:  y = (in_data.a << o) & m;
      OP_ROT:  y = (in_data.a >> o) | (in_data.a << (6'd32 - {1'b0, o}));
      OP_FF1:  y = find_first(in_data.a);
      OP_FF0:  y = find_first(~in_data.a);
      default: y = '0;
    endcase
  end

  // Sequencing: IDLE -> SEND (wait for both output channels) -> back.
  logic busy;
  wire  pend   = in_req != in_ack;
  wire  res_ok = res_req == res_ack;
  wire  st_ok  = st_req == st_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; in_ack <= 1'b0; res_req <= 1'b0; st_req <= 1'b0;
      res_data <= '0; st_data <= '0;
    end else if (!busy) begin
      if (pend && res_ok && st_ok) begin
        res_data <= '{rd: in_data.rd, data: y};
        res_req  <= ~res_req;
        if (in_data.report) begin
          st_data <= '{tag: in_data.tag, exc: 1'b0, cause: EXC_NONE};
          st_req  <= ~st_req;
        end
        busy <= 1'b1;
      end
    end else begin
      in_ack <= ~in_ack;
      busy   <= 1'b0;
    end
  end
endmodule
