// tb_instr_decoder: self-checking testbench of the instruction decoder.
//
// Assembles one instance of every instruction with the testbench assembler
// (random operands) and checks the fields of the control word that define
// it: ALU or CALU operation, operand source, destinations, flag updates,
// skip condition and program-flow kind.
module tb_instr_decoder;
  import risc_pkg::*;
  import tb_asm_pkg::*;

  logic [14:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  instr_decoder dut (.instr(instr), .ctrl(ctrl));

  // expected: alu op, use_lit, reads_f, wr_w, wr_f, {z,c,dc}, {skip_z, skip_nz}
  task automatic chk(input string name, input word_t w, input alu_op_e op,
                     input bit lit, input bit rf, input bit ww, input bit wf,
                     input logic [2:0] zcd, input logic [1:0] sk);
    instr = w; #1;
    checks++;
    if (ctrl.alu_op !== op || ctrl.use_lit !== lit || ctrl.reads_f !== rf ||
        ctrl.wr_w !== ww || ctrl.wr_f !== wf ||
        {ctrl.upd_z, ctrl.upd_c, ctrl.upd_dc} !== zcd ||
        {ctrl.skip_z, ctrl.skip_nz} !== sk || ctrl.valid_calu || ctrl.is_mul ||
        ctrl.is_goto || ctrl.is_call || ctrl.is_return) begin
      failures++;
      $display("FAIL %s %h: %p", name, w, ctrl);
    end
  endtask

  initial begin
    for (int n = 0; n < 50; n++) begin
      logic [6:0] f; logic [7:0] k; logic [2:0] b; bit d;
      f = 7'($urandom_range(127, 1)); k = 8'($urandom); b = 3'($urandom); d = 1'($urandom);
      chk("nop",   nop(),       ALU_PASS_A, 0, 0, 0, 0, 3'b000, 2'b00);
      chk("movwf", movwf(f),    ALU_PASS_B, 0, 0, 0, 1, 3'b000, 2'b00);
      chk("clrw",  clrw(),      ALU_CLR,    0, 0, 1, 0, 3'b100, 2'b00);
      chk("clrf",  clrf(f),     ALU_CLR,    0, 0, 0, 1, 3'b100, 2'b00);
      chk("subwf", subwf(f, d), ALU_SUB,    0, 1, !d, d, 3'b111, 2'b00);
      chk("decf",  decf(f, d),  ALU_DEC,    0, 1, !d, d, 3'b100, 2'b00);
      chk("iorwf", iorwf(f, d), ALU_IOR,    0, 1, !d, d, 3'b100, 2'b00);
      chk("andwf", andwf(f, d), ALU_AND,    0, 1, !d, d, 3'b100, 2'b00);
      chk("xorwf", xorwf(f, d), ALU_XOR,    0, 1, !d, d, 3'b100, 2'b00);
      chk("addwf", addwf(f, d), ALU_ADD,    0, 1, !d, d, 3'b111, 2'b00);
      chk("movf",  movf(f, d),  ALU_PASS_A, 0, 1, !d, d, 3'b100, 2'b00);
      chk("comf",  comf(f, d),  ALU_COM,    0, 1, !d, d, 3'b100, 2'b00);
      chk("incf",  incf(f, d),  ALU_INC,    0, 1, !d, d, 3'b100, 2'b00);
      chk("decfsz",decfsz(f, d),ALU_DEC,    0, 1, !d, d, 3'b000, 2'b10);
      chk("rrf",   rrf(f, d),   ALU_RRF,    0, 1, !d, d, 3'b010, 2'b00);
      chk("rlf",   rlf(f, d),   ALU_RLF,    0, 1, !d, d, 3'b010, 2'b00);
      chk("swapf", swapf(f, d), ALU_SWAP,   0, 1, !d, d, 3'b000, 2'b00);
      chk("incfsz",incfsz(f, d),ALU_INC,    0, 1, !d, d, 3'b000, 2'b10);
      chk("bcf",   bcf(f, b),   ALU_BCF,    0, 1, 0, 1, 3'b000, 2'b00);
      chk("bsf",   bsf(f, b),   ALU_BSF,    0, 1, 0, 1, 3'b000, 2'b00);
      chk("btfsc", btfsc(f, b), ALU_BTST,   0, 1, 0, 0, 3'b000, 2'b10);
      chk("btfss", btfss(f, b), ALU_BTST,   0, 1, 0, 0, 3'b000, 2'b01);
      chk("movlw", movlw(k),    ALU_PASS_A, 1, 0, 1, 0, 3'b000, 2'b00);
      chk("iorlw", iorlw(k),    ALU_IOR,    1, 0, 1, 0, 3'b100, 2'b00);
      chk("andlw", andlw(k),    ALU_AND,    1, 0, 1, 0, 3'b100, 2'b00);
      chk("xorlw", xorlw(k),    ALU_XOR,    1, 0, 1, 0, 3'b100, 2'b00);
      chk("sublw", sublw(k),    ALU_SUB,    1, 0, 1, 0, 3'b111, 2'b00);
      chk("addlw", addlw(k),    ALU_ADD,    1, 0, 1, 0, 3'b111, 2'b00);
      // program flow
      instr = goto_(11'($urandom)); #1 checks++;
      if (!ctrl.is_goto || ctrl.is_call || ctrl.wr_w || ctrl.wr_f) begin failures++; $display("FAIL goto"); end
      instr = call(11'($urandom)); #1 checks++;
      if (!ctrl.is_call || ctrl.is_goto || ctrl.wr_w || ctrl.wr_f) begin failures++; $display("FAIL call"); end
      instr = ret(); #1 checks++;
      if (!ctrl.is_return || ctrl.wr_w || ctrl.wr_f) begin failures++; $display("FAIL return"); end
      // extended group
      for (int i = 0; i < NCALU; i++) begin
        instr = xop(CALU_CODES[i]); #1 checks++;
        if (!ctrl.valid_calu || ctrl.calu_op !== calu_op_e'(CALU_CODES[i]) || ctrl.wr_w ||
            ctrl.wr_f || ctrl.is_mul || !ctrl.upd_z || ctrl.upd_c !== (i <= 1 || i == 4 || i == 5)) begin
          failures++; $display("FAIL calu %0d: %p", i, ctrl);
        end
      end
      instr = mulwf(f); #1 checks++;
      if (!ctrl.is_mul || !ctrl.reads_f || ctrl.valid_calu || ctrl.wr_w || ctrl.wr_f) begin
        failures++; $display("FAIL mulwf");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
