// scoreboard: one busy bit per general register, kept in the Dispatch unit.
//
// Dispatch sets a register's bit when it issues an instruction that will
// write that register, and holds back any later instruction that reads or
// writes a busy register (RAW and WAW hazards). The Register File clears a
// bit when the result arrives at that register; for r1, which is the R1
// Queue rather than a register, Dispatch clears the bit when the producing
// instruction reports that it completed. r0 never becomes busy.
// Timing: `set_vec` and `clr_vec` take effect at the next clock edge; when
// both name the same register in one cycle, the set wins (a new writer has
// just been issued after the old one finished).
module scoreboard #(
  parameter int NREGS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NREGS-1:0] set_vec,
  input  logic [NREGS-1:0] clr_vec,
  output logic [NREGS-1:0] busy
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= '0;
    else        busy <= ((busy & ~clr_vec) | set_vec) & ~NREGS'(1);
  end
endmodule
