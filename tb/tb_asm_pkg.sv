// tb_asm_pkg: a small assembler for testbenches of the enhanced processor.
//
// Each function returns one 15-bit instruction word. Base instructions use
// the standard 16F84 encodings (bit 14 = 0); the extended group sets bit 14
// and puts the CALU operation code, or the multiply code, in bits 13:8.
// The encodings are written out here from the instruction-set definition,
// independently of the decoder under test.
package tb_asm_pkg;

  typedef logic [14:0] word_t;

  localparam bit F = 1'b1;  // destination file register
  localparam bit W = 1'b0;  // destination W

  function automatic word_t byteop(input logic [5:0] opc, input logic [6:0] f, input bit d);
    return {1'b0, opc, d, f};
  endfunction

  function automatic word_t nop();               return 15'h0000; endfunction
  function automatic word_t ret();               return 15'h0008; endfunction
  function automatic word_t movwf(input logic [6:0] f); return byteop(6'b000000, f, 1'b1); endfunction
  function automatic word_t clrw();              return 15'h0100; endfunction
  function automatic word_t clrf(input logic [6:0] f);  return byteop(6'b000001, f, 1'b1); endfunction
  function automatic word_t subwf(input logic [6:0] f, input bit d); return byteop(6'b000010, f, d); endfunction
  function automatic word_t decf(input logic [6:0] f, input bit d);  return byteop(6'b000011, f, d); endfunction
  function automatic word_t iorwf(input logic [6:0] f, input bit d); return byteop(6'b000100, f, d); endfunction
  function automatic word_t andwf(input logic [6:0] f, input bit d); return byteop(6'b000101, f, d); endfunction
  function automatic word_t xorwf(input logic [6:0] f, input bit d); return byteop(6'b000110, f, d); endfunction
  function automatic word_t addwf(input logic [6:0] f, input bit d); return byteop(6'b000111, f, d); endfunction
  function automatic word_t movf(input logic [6:0] f, input bit d);  return byteop(6'b001000, f, d); endfunction
  function automatic word_t comf(input logic [6:0] f, input bit d);  return byteop(6'b001001, f, d); endfunction
  function automatic word_t incf(input logic [6:0] f, input bit d);  return byteop(6'b001010, f, d); endfunction
  function automatic word_t decfsz(input logic [6:0] f, input bit d); return byteop(6'b001011, f, d); endfunction
  function automatic word_t rrf(input logic [6:0] f, input bit d);   return byteop(6'b001100, f, d); endfunction
  function automatic word_t rlf(input logic [6:0] f, input bit d);   return byteop(6'b001101, f, d); endfunction
  function automatic word_t swapf(input logic [6:0] f, input bit d); return byteop(6'b001110, f, d); endfunction
  function automatic word_t incfsz(input logic [6:0] f, input bit d); return byteop(6'b001111, f, d); endfunction

  function automatic word_t bcf(input logic [6:0] f, input logic [2:0] b);   return {3'b001, 2'b00, b, f}; endfunction
  function automatic word_t bsf(input logic [6:0] f, input logic [2:0] b);   return {3'b001, 2'b01, b, f}; endfunction
  function automatic word_t btfsc(input logic [6:0] f, input logic [2:0] b); return {3'b001, 2'b10, b, f}; endfunction
  function automatic word_t btfss(input logic [6:0] f, input logic [2:0] b); return {3'b001, 2'b11, b, f}; endfunction

  function automatic word_t call(input logic [10:0] a); return {4'b0100, a}; endfunction
  function automatic word_t goto_(input logic [10:0] a); return {4'b0101, a}; endfunction

  function automatic word_t movlw(input logic [7:0] k); return {7'b0110000, k}; endfunction
  function automatic word_t iorlw(input logic [7:0] k); return {7'b0111000, k}; endfunction
  function automatic word_t andlw(input logic [7:0] k); return {7'b0111001, k}; endfunction
  function automatic word_t xorlw(input logic [7:0] k); return {7'b0111010, k}; endfunction
  function automatic word_t sublw(input logic [7:0] k); return {7'b0111100, k}; endfunction
  function automatic word_t addlw(input logic [7:0] k); return {7'b0111110, k}; endfunction

  // extended group
  function automatic word_t xop(input logic [5:0] opc); return {1'b1, opc, 8'h00}; endfunction
  function automatic word_t mulwf(input logic [6:0] f); return {1'b1, 6'b110000, 1'b0, f}; endfunction

  // CALU operation codes, in the order used by the testbenches
  localparam int NCALU = 11;
  localparam logic [5:0] CALU_CODES [NCALU] = '{
    6'b000111,  // add
    6'b000010,  // sub
    6'b001010,  // inc
    6'b000011,  // dec
    6'b001101,  // rotate left
    6'b001100,  // rotate right
    6'b001110,  // swap
    6'b000101,  // and
    6'b000100,  // or
    6'b000110,  // xor
    6'b001001   // complement
  };

  // Reference model of one CALU operation (index into CALU_CODES)
  function automatic logic [16:0] calu_ref(input int i, input logic [15:0] a,
                                           input logic [15:0] b, input logic c);
    // returns {carry, result}; carry = c when the operation leaves it alone
    logic [16:0] t;
    case (i)
      0:  t = {1'b0, a} + {1'b0, b};
      1:  t = {(a >= b), a - b};
      2:  t = {c, a + 16'd1};
      3:  t = {c, a - 16'd1};
      4:  t = {a[15], a[14:0], c};
      5:  t = {a[0], c, a[15:1]};
      6:  t = {c, a[7:0], a[15:8]};
      7:  t = {c, a & b};
      8:  t = {c, a | b};
      9:  t = {c, a ^ b};
      default: t = {c, ~a};
    endcase
    return t;
  endfunction

endpackage
