// call_stack: hardware return-address stack used by CALL and RETURN.
//
// A circular buffer of DEPTH program addresses with a wrapping pointer, as
// in the 16F84: a push beyond DEPTH overwrites the oldest entry and a pop
// of an empty stack returns whatever the slot holds; there are no overflow
// or underflow flags. The source design names CALL but does not describe
// the stack; depth 8 and width 13 are those of the 16F84 it builds on.
//
// Timing: push writes din on the clock edge and advances the pointer; pop
// moves the pointer back on the edge. top is the most recently pushed entry
// (combinational), so a RETURN reads it in the same cycle as it pops.
module call_stack #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] top
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    sp_q;     // next free slot
  logic [PW-1:0]    sp_top;

  assign sp_top = (sp_q == '0) ? PW'(DEPTH - 1) : sp_q - PW'(1);
  assign top    = mem[sp_top];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push) begin
      mem[sp_q] <= din;
      sp_q      <= (sp_q == PW'(DEPTH - 1)) ? '0 : sp_q + PW'(1);
    end else if (pop) begin
      sp_q <= sp_top;
    end
  end

endmodule
