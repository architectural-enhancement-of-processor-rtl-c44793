// instr_decoder: decodes one 15-bit instruction word into a control word.
//
// Purely combinational. Bit 14 = 0 selects the base 16F84 instruction set in
// bits 13:0, with the standard 16F84 encodings: byte-oriented operations
// (opcode in bits 13:8, destination bit d in bit 7, file address in bits
// 6:0; d = 1 writes the file register, d = 0 writes W), bit-oriented
// operations (bit number b in bits 9:7), literal operations (8-bit k in bits
// 7:0) and CALL/GOTO (11-bit address). The instructions decoded are those the
// source design lists for its 8-bit ALU (bcf, bsf, clrw, clrf, movlw, movwf,
// movf, swapf, incf, decf, comf, andlw, andwf, iorlw, iorwf, xorlw, xorwf,
// addlw, addwf, sublw, subwf, rlf, rrf, btfsc, btfss, decfsz, incfsz) plus
// nop, goto, call and return. Any other word (retlw, retfie, sleep, clrwdt,
// option, tris) executes as a nop in this design.
//
// Bit 14 = 1 selects the extended group: bits 13:8 hold a CALU operation
// code (the 16F84 opcode of the matching byte operation) or XOP_MUL for
// MULWF f, which multiplies W by file register f into PRODH:PRODL. Unknown
// extended codes execute as a nop.
module instr_decoder
  import risc_pkg::*;
(
  input  logic [IW-1:0] instr,
  output ctrl_t         ctrl
);

  logic [5:0] opc;
  logic       d;

  assign opc = instr[13:8];
  assign d   = instr[7];

  always_comb begin
    ctrl         = '0;
    ctrl.alu_op  = ALU_PASS_A;
    ctrl.calu_op = CALU_ADD;

    if (instr[14]) begin
      // extended group: 16-bit CALU or multiplier
      unique case (opc)
        CALU_ADD, CALU_SUB, CALU_RL, CALU_RR: begin
          ctrl.valid_calu = 1'b1;
          ctrl.calu_op    = calu_op_e'(opc);
          ctrl.upd_z      = 1'b1;
          ctrl.upd_c      = 1'b1;
        end
        CALU_INC, CALU_DEC, CALU_SWAP, CALU_AND, CALU_IOR, CALU_XOR,
        CALU_COM: begin
          ctrl.valid_calu = 1'b1;
          ctrl.calu_op    = calu_op_e'(opc);
          ctrl.upd_z      = 1'b1;
        end
        XOP_MUL: begin
          ctrl.is_mul  = 1'b1;
          ctrl.reads_f = 1'b1;
        end
        default: ;
      endcase
    end else begin
      unique case (instr[13:12])
        2'b00: begin  // byte-oriented file register operations
          ctrl.reads_f = 1'b1;
          ctrl.wr_f    = d;
          ctrl.wr_w    = ~d;
          unique case (opc[3:0])
            4'b0000: begin
              if (d) begin            // movwf f
                ctrl.alu_op = ALU_PASS_B;
                ctrl.reads_f = 1'b0;
              end else if (instr[6:0] == 7'h08) begin  // return
                ctrl             = '0;
                ctrl.alu_op      = ALU_PASS_A;
                ctrl.calu_op     = CALU_ADD;
                ctrl.is_return   = 1'b1;
              end else begin          // nop and unsupported misc. words
                ctrl         = '0;
                ctrl.alu_op  = ALU_PASS_A;
                ctrl.calu_op = CALU_ADD;
              end
            end
            4'b0001: begin            // clrf f (d=1) / clrw (d=0)
              ctrl.alu_op  = ALU_CLR;
              ctrl.reads_f = 1'b0;
              ctrl.upd_z   = 1'b1;
            end
            4'b0010: begin ctrl.alu_op = ALU_SUB;  ctrl.upd_z = 1'b1; ctrl.upd_c = 1'b1; ctrl.upd_dc = 1'b1; end
            4'b0011: begin ctrl.alu_op = ALU_DEC;  ctrl.upd_z = 1'b1; end
            4'b0100: begin ctrl.alu_op = ALU_IOR;  ctrl.upd_z = 1'b1; end
            4'b0101: begin ctrl.alu_op = ALU_AND;  ctrl.upd_z = 1'b1; end
            4'b0110: begin ctrl.alu_op = ALU_XOR;  ctrl.upd_z = 1'b1; end
            4'b0111: begin ctrl.alu_op = ALU_ADD;  ctrl.upd_z = 1'b1; ctrl.upd_c = 1'b1; ctrl.upd_dc = 1'b1; end
            4'b1000: begin ctrl.alu_op = ALU_PASS_A; ctrl.upd_z = 1'b1; end
            4'b1001: begin ctrl.alu_op = ALU_COM;  ctrl.upd_z = 1'b1; end
            4'b1010: begin ctrl.alu_op = ALU_INC;  ctrl.upd_z = 1'b1; end
            4'b1011: begin ctrl.alu_op = ALU_DEC;  ctrl.skip_z = 1'b1; end
            4'b1100: begin ctrl.alu_op = ALU_RRF;  ctrl.upd_c = 1'b1; end
            4'b1101: begin ctrl.alu_op = ALU_RLF;  ctrl.upd_c = 1'b1; end
            4'b1110: begin ctrl.alu_op = ALU_SWAP; end
            4'b1111: begin ctrl.alu_op = ALU_INC;  ctrl.skip_z = 1'b1; end
            default: ;
          endcase
        end
        2'b01: begin  // bit-oriented operations
          ctrl.reads_f = 1'b1;
          unique case (instr[11:10])
            2'b00: begin ctrl.alu_op = ALU_BCF;  ctrl.wr_f = 1'b1; end
            2'b01: begin ctrl.alu_op = ALU_BSF;  ctrl.wr_f = 1'b1; end
            2'b10: begin ctrl.alu_op = ALU_BTST; ctrl.skip_z  = 1'b1; end
            2'b11: begin ctrl.alu_op = ALU_BTST; ctrl.skip_nz = 1'b1; end
            default: ;
          endcase
        end
        2'b10: begin  // call / goto
          ctrl.is_call = ~instr[11];
          ctrl.is_goto = instr[11];
        end
        2'b11: begin  // literal operations, result in W
          ctrl.use_lit = 1'b1;
          unique casez (instr[11:8])
            4'b00??: begin ctrl.alu_op = ALU_PASS_A; ctrl.wr_w = 1'b1; end  // movlw
            4'b1000: begin ctrl.alu_op = ALU_IOR; ctrl.wr_w = 1'b1; ctrl.upd_z = 1'b1; end
            4'b1001: begin ctrl.alu_op = ALU_AND; ctrl.wr_w = 1'b1; ctrl.upd_z = 1'b1; end
            4'b1010: begin ctrl.alu_op = ALU_XOR; ctrl.wr_w = 1'b1; ctrl.upd_z = 1'b1; end
            4'b110?: begin  // sublw: k - W
              ctrl.alu_op = ALU_SUB; ctrl.wr_w = 1'b1;
              ctrl.upd_z = 1'b1; ctrl.upd_c = 1'b1; ctrl.upd_dc = 1'b1;
            end
            4'b111?: begin  // addlw
              ctrl.alu_op = ALU_ADD; ctrl.wr_w = 1'b1;
              ctrl.upd_z = 1'b1; ctrl.upd_c = 1'b1; ctrl.upd_dc = 1'b1;
            end
            default: ctrl.use_lit = 1'b0;  // retlw and reserved: nop
          endcase
        end
        default: ;
      endcase
    end
  end

endmodule
