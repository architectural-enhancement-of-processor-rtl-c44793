// alu8: 8-bit arithmetic and logic unit of the base 16F84-class processor.
//
// Purely combinational. Operand a is the file register value or the 8-bit
// literal, operand b is the working register W, exactly as the byte adder of
// the source design adds 'f' and 'w'. It covers the byte, bit and literal
// operations of the base instruction set: add, subtract, and/or/xor,
// complement, increment, decrement, rotate through carry, nibble swap,
// bit clear/set and bit test. Flags follow the 16F84 conventions: C is the
// carry out of an add and the inverted borrow of a subtract, DC the carry out
// of bit 3, Z is set when the result is zero. The caller decides which flags
// are written back (the control unit applies them in state T3/T4).
//
// Interface: op selects the operation, bsel the bit number of bit
// operations, c_in is STATUS.C for the rotates. y, c_out, dc_out, z_out are
// valid in the same cycle.
module alu8
  import risc_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [2:0] bsel,
  input  logic       c_in,
  output logic [7:0] y,
  output logic       c_out,
  output logic       dc_out,
  output logic       z_out
);

  logic [8:0] sum;
  logic [4:0] nib;
  logic [7:0] mask;

  always_comb begin
    mask   = 8'h01 << bsel;
    sum    = '0;
    nib    = '0;
    y      = a;
    c_out  = c_in;
    dc_out = 1'b0;
    unique case (op)
      ALU_PASS_A: y = a;
      ALU_PASS_B: y = b;
      ALU_CLR:    y = 8'h00;
      ALU_ADD: begin
        sum    = {1'b0, a} + {1'b0, b};
        nib    = {1'b0, a[3:0]} + {1'b0, b[3:0]};
        y      = sum[7:0];
        c_out  = sum[8];
        dc_out = nib[4];
      end
      ALU_SUB: begin
        // a - b as a + ~b + 1; carry out is "no borrow"
        sum    = {1'b0, a} + {1'b0, ~b} + 9'd1;
        nib    = {1'b0, a[3:0]} + {1'b0, ~b[3:0]} + 5'd1;
        y      = sum[7:0];
        c_out  = sum[8];
        dc_out = nib[4];
      end
      ALU_AND:  y = a & b;
      ALU_IOR:  y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_COM:  y = ~a;
      ALU_INC:  y = a + 8'd1;
      ALU_DEC:  y = a - 8'd1;
      ALU_RLF: begin
        y     = {a[6:0], c_in};
        c_out = a[7];
      end
      ALU_RRF: begin
        y     = {c_in, a[7:1]};
        c_out = a[0];
      end
      ALU_SWAP: y = {a[3:0], a[7:4]};
      ALU_BCF:  y = a & ~mask;
      ALU_BSF:  y = a | mask;
      ALU_BTST: y = a & mask;
      default:  y = a;
    endcase
    z_out = (y == 8'h00);
  end

endmodule
