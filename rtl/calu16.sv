// calu16: 16-bit co-operative ALU (CALU) attached to the 8-bit processor.
//
// The CALU owns three 16-bit registers, operand A, operand B and result S,
// which the processor sees as six byte-wide special function registers
// (index 0..5 = A_L, A_H, B_L, B_H, S_L, S_H). Firmware loads A and B with
// ordinary byte moves and then issues one extended instruction; the CALU
// computes S = op(A, B) in a single instruction cycle, so a 16-bit add is one
// instruction instead of the six the 8-bit core needs. The eleven
// operations are add, subtract, increment, decrement, rotate left and right
// (through STATUS.C), swap, and, or, xor and complement, as listed by the
// source design; single-operand operations use A. The SFR mapping of A, B
// and S and the single-cycle execution follow the source design. The byte
// order of the swap (exchange the two bytes of A), the flags (Z for every
// operation, C as carry / no-borrow / shifted-out bit for add, sub and the
// rotates) and the register indices are this design's own choices.
//
// Timing: reg_we writes a byte of A or B on the clock edge; reg_rdata is a
// combinational read. When exec is high, S is loaded with the result on the
// clock edge; c_out and z_out are the flags of the current result and are
// valid in the same cycle so the control unit can write STATUS with them.
module calu16
  import risc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // byte-wide SFR access
  input  logic       reg_we,
  input  logic [2:0] reg_idx,
  input  logic [7:0] reg_wdata,
  output logic [7:0] reg_rdata,
  // execution
  input  logic       exec,
  input  calu_op_e   op,
  input  logic       c_in,
  output logic       c_out,
  output logic       z_out,
  output logic [15:0] s_o
);

  logic [15:0] a_q, b_q, s_q;
  logic [15:0] res;
  logic [16:0] wide;

  always_comb begin
    wide  = '0;
    res   = a_q;
    c_out = c_in;
    unique case (op)
      CALU_ADD: begin
        wide  = {1'b0, a_q} + {1'b0, b_q};
        res   = wide[15:0];
        c_out = wide[16];
      end
      CALU_SUB: begin
        wide  = {1'b0, a_q} + {1'b0, ~b_q} + 17'd1;
        res   = wide[15:0];
        c_out = wide[16];
      end
      CALU_INC:  res = a_q + 16'd1;
      CALU_DEC:  res = a_q - 16'd1;
      CALU_RL: begin
        res   = {a_q[14:0], c_in};
        c_out = a_q[15];
      end
      CALU_RR: begin
        res   = {c_in, a_q[15:1]};
        c_out = a_q[0];
      end
      CALU_SWAP: res = {a_q[7:0], a_q[15:8]};
      CALU_AND:  res = a_q & b_q;
      CALU_IOR:  res = a_q | b_q;
      CALU_XOR:  res = a_q ^ b_q;
      CALU_COM:  res = ~a_q;
      default:   res = a_q;
    endcase
    z_out = (res == 16'h0000);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      s_q <= '0;
    end else begin
      if (reg_we) begin
        unique case (reg_idx)
          3'd0: a_q[7:0]  <= reg_wdata;
          3'd1: a_q[15:8] <= reg_wdata;
          3'd2: b_q[7:0]  <= reg_wdata;
          3'd3: b_q[15:8] <= reg_wdata;
          default: ;  // S is read-only
        endcase
      end
      if (exec) s_q <= res;
    end
  end

  always_comb begin
    unique case (reg_idx)
      3'd0:    reg_rdata = a_q[7:0];
      3'd1:    reg_rdata = a_q[15:8];
      3'd2:    reg_rdata = b_q[7:0];
      3'd3:    reg_rdata = b_q[15:8];
      3'd4:    reg_rdata = s_q[7:0];
      3'd5:    reg_rdata = s_q[15:8];
      default: reg_rdata = 8'h00;
    endcase
  end

  assign s_o = s_q;

endmodule
