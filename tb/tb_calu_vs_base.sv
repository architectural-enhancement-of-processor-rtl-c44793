// tb_calu_vs_base: the eleven 16-bit operations, on the base 8-bit
// instructions and on the CALU, with cycle counts.
//
// For random operand pairs the testbench assembles, for each of the 11
// CALU operations, a base-instruction sequence that computes the same
// 16-bit result in two file registers (A = A op B), and then the single
// CALU instruction. Operand set-up is outside the timed regions. It checks
// every result of both paths against a reference model, checks that the
// CALU path takes exactly one instruction cycle per operation (11 in all),
// and that the base sequences need 42 instruction cycles together (a taken
// skip costs a bubble cycle, so each sequence has a fixed length).
module tb_calu_vs_base;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [12:0] prog_addr = 0;
  logic [14:0] prog_data = 0;
  logic [12:0] addr_c;
  logic [14:0] data_c, ir;
  logic [8:0]  ram_adr;
  logic        readram, writeram, icycle_end, flush, stall, calu_exec, mul_start;
  logic [7:0]  ram_dat, w, status;
  logic [1:0]  tstate;

  int checks = 0, failures = 0;

  risc_enh_top dut (
    .clk(clk), .pon_rst_n_i(rst_n),
    .prog_we_i(prog_we), .prog_addr_i(prog_addr), .prog_data_i(prog_data),
    .addr_c_o(addr_c), .data_c_o(data_c), .ram_adr_o(ram_adr), .readram_o(readram),
    .writeram_o(writeram), .ram_dat_o(ram_dat), .w_o(w), .status_o(status), .ir_o(ir),
    .tstate_o(tstate), .icycle_end_o(icycle_end), .flush_o(flush), .stall_o(stall),
    .calu_exec_o(calu_exec), .mul_start_o(mul_start));

  always #5 clk = ~clk;

  localparam logic [6:0] AL = 7'h0C, AH = 7'h0D, BL = 7'h0E, BH = 7'h0F, TMP = 7'h10;
  localparam logic [6:0] CAL = 7'h50, CAH = 7'h51, CBL = 7'h52, CBH = 7'h53;
  localparam logic [6:0] CSL = 7'h54, CSH = 7'h55, STATUS = 7'h03;

  word_t prog [1024];
  int    pc, l_end;
  int    lb_s [NCALU], lb_e [NCALU], lc_s [NCALU], lc_e [NCALU];
  function automatic void emit(input word_t x); prog[pc] = x; pc++; endfunction

  function automatic void setup8(input logic [15:0] a, input logic [15:0] b);
    emit(movlw(a[7:0])); emit(movwf(AL)); emit(movlw(a[15:8])); emit(movwf(AH));
    emit(movlw(b[7:0])); emit(movwf(BL)); emit(movlw(b[15:8])); emit(movwf(BH));
    emit(bcf(STATUS, 0));
  endfunction

  // base-instruction sequence for operation i: A = A op B
  function automatic void base_seq(input int i);
    case (i)
      0: begin emit(movf(BL, W)); emit(addwf(AL, F)); emit(movf(BH, W));
               emit(btfsc(STATUS, 0)); emit(addlw(8'd1)); emit(addwf(AH, F)); end
      1: begin emit(movf(BL, W)); emit(subwf(AL, F)); emit(movf(BH, W));
               emit(btfss(STATUS, 0)); emit(addlw(8'd1)); emit(subwf(AH, F)); end
      2: begin emit(incf(AL, F)); emit(btfsc(STATUS, 2)); emit(incf(AH, F)); end
      3: begin emit(movlw(8'd1)); emit(subwf(AL, F)); emit(btfss(STATUS, 0)); emit(decf(AH, F)); end
      4: begin emit(rlf(AL, F)); emit(rlf(AH, F)); end
      5: begin emit(rrf(AH, F)); emit(rrf(AL, F)); end
      6: begin emit(movf(AH, W)); emit(xorwf(AL, F)); emit(xorwf(AL, W));
               emit(movwf(AH)); emit(xorwf(AL, F)); end
      7: begin emit(movf(BL, W)); emit(andwf(AL, F)); emit(movf(BH, W)); emit(andwf(AH, F)); end
      8: begin emit(movf(BL, W)); emit(iorwf(AL, F)); emit(movf(BH, W)); emit(iorwf(AH, F)); end
      9: begin emit(movf(BL, W)); emit(xorwf(AL, F)); emit(movf(BH, W)); emit(xorwf(AH, F)); end
      default: begin emit(comf(AL, F)); emit(comf(AH, F)); end
    endcase
  endfunction

  function automatic void build(input logic [15:0] a, input logic [15:0] b);
    for (int i = 0; i < 1024; i++) prog[i] = nop();
    pc = 0;
    for (int i = 0; i < NCALU; i++) begin
      setup8(a, b);
      lb_s[i] = pc; base_seq(i); lb_e[i] = pc;
      emit(movf(AL, W)); emit(movwf(7'(8'h20 + 2 * i)));
      emit(movf(AH, W)); emit(movwf(7'(8'h21 + 2 * i)));
    end
    emit(movlw(a[7:0])); emit(movwf(CAL)); emit(movlw(a[15:8])); emit(movwf(CAH));
    emit(movlw(b[7:0])); emit(movwf(CBL)); emit(movlw(b[15:8])); emit(movwf(CBH));
    for (int i = 0; i < NCALU; i++) begin
      emit(bcf(STATUS, 0));
      lc_s[i] = pc; emit(xop(CALU_CODES[i])); lc_e[i] = pc;
      emit(movf(CSL, W)); emit(movwf(7'(8'h38 + 2 * i)));
      emit(movf(CSH, W)); emit(movwf(7'(8'h39 + 2 * i)));
    end
    l_end = pc;
    emit(goto_(11'(l_end)));
  endfunction

  // exec-address tracking
  logic [7:0] shadow [128];
  int exec_addr, icyc;
  int at [1024];
  bit seen_end;

  always @(posedge clk) if (rst_n) begin
    if (writeram) shadow[ram_adr[6:0]] <= ram_dat;
    if (icycle_end) begin
      icyc++;
      exec_addr = flush ? -1 : int'(addr_c);
      if (exec_addr >= 0 && at[exec_addr] < 0) at[exec_addr] = icyc;
      if (exec_addr == l_end) seen_end = 1'b1;
    end
  end

  int base_total, calu_total;

  task automatic run(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] r;
    int nb, nc;
    rst_n = 0;
    build(a, b);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 13'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < 1024; i++) at[i] = -1;
    for (int i = 0; i < 128; i++) shadow[i] = 8'h00;
    icyc = 0; seen_end = 0; exec_addr = -1;
    @(negedge clk); rst_n = 1;
    fork
      wait (seen_end);
      repeat (20000) @(posedge clk);
    join_any
    disable fork;
    repeat (8) @(posedge clk);
    checks++;
    if (!seen_end) begin failures++; $display("FAIL program did not finish"); end
    base_total = 0; calu_total = 0;
    for (int i = 0; i < NCALU; i++) begin
      r = calu_ref(i, a, b, 1'b0);
      checks++;
      if ({shadow[7'(8'h21 + 2 * i)], shadow[7'(8'h20 + 2 * i)]} !== r[15:0]) begin
        failures++; $display("FAIL base op %0d: %h%h exp %h", i,
          shadow[7'(8'h21 + 2 * i)], shadow[7'(8'h20 + 2 * i)], r[15:0]);
      end
      checks++;
      if ({shadow[7'(8'h39 + 2 * i)], shadow[7'(8'h38 + 2 * i)]} !== r[15:0]) begin
        failures++; $display("FAIL CALU op %0d: exp %h", i, r[15:0]);
      end
      nb = at[lb_e[i]] - at[lb_s[i]];
      nc = at[lc_e[i]] - at[lc_s[i]];
      base_total += nb; calu_total += nc;
      checks++;
      if (nc != 1) begin failures++; $display("FAIL CALU op %0d took %0d cycles", i, nc); end
    end
    checks++;
    if (calu_total != 11) begin failures++; $display("FAIL CALU total %0d", calu_total); end
    // the sequences above are branch-free in length: 6+6+3+4+2+2+5+4+4+4+2
    checks++;
    if (base_total != 42) begin failures++; $display("FAIL base total %0d", base_total); end
  endtask

  initial begin
    run(16'h12FF, 16'h3401);
    run(16'h00FF, 16'h0001);
    run(16'h0100, 16'h0200);
    for (int k = 0; k < 5; k++) run(16'($urandom), 16'($urandom));
    $display("instruction cycles for the 11 operations: base instructions %0d, CALU %0d",
             base_total, calu_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
