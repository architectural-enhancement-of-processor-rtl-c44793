// tb_risc_enh_top: end-to-end testbench of the enhanced processor.
//
// Runs the whole design with its default parameters. For each of several
// runs the testbench draws random operands, assembles a program, loads it
// through the program port while the core is in reset, releases reset and
// watches the file-register bus. The program
//   1. adds two 16-bit numbers with six base (8-bit) instructions,
//   2. adds the same numbers with one CALU instruction,
//   3. executes all 11 CALU operations and stores each 16-bit result,
//   4. multiplies two bytes with MULWF and stores the 16-bit product,
//   5. exercises CALL/RETURN, a DECFSZ/GOTO loop, indirect addressing
//      through FSR/INDF and a computed jump by writing PCL.
// Results are compared with values computed here. The instruction cycles
// taken by the 16-bit addition are counted: 6 on the 8-bit path and 1 with
// the CALU. MULWF must take 12 clocks, 3 instruction cycles (8 stall clocks). Every
// mechanism (skip, jump flush, call/return, multiplier stall, CALU
// execution, indirect access, PCL write, 8-bit and 16-bit instruction
// classes) must occur at least once, or a failure is counted.
module tb_risc_enh_top;
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

  // ------------------------------------------------------------ program
  word_t prog [1024];
  int    pc;
  function automatic void emit(input word_t x); prog[pc] = x; pc++; endfunction

  localparam logic [6:0] AL = 7'h0C, AH = 7'h0D, BL = 7'h0E, BH = 7'h0F;
  localparam logic [6:0] CAL = 7'h50, CAH = 7'h51, CBL = 7'h52, CBH = 7'h53;
  localparam logic [6:0] CSL = 7'h54, CSH = 7'h55, PRL = 7'h56, PRH = 7'h57;
  localparam logic [6:0] STATUS = 7'h03, FSR = 7'h04, PCL = 7'h02, PCLATH = 7'h0A;
  localparam int SUB_ADDR = 600;

  int l_add8, l_add8_end, l_calu, l_calu_end, l_mul, l_mul_end, l_end;

  function automatic void build(input logic [15:0] a, input logic [15:0] b,
                                input logic [7:0] m1, input logic [7:0] m2);
    int l_loop, l_tgt;
    for (int i = 0; i < 1024; i++) prog[i] = nop();
    pc = 0;
    emit(movlw(a[7:0]));  emit(movwf(AL)); emit(movlw(a[15:8])); emit(movwf(AH));
    emit(movlw(b[7:0]));  emit(movwf(BL)); emit(movlw(b[15:8])); emit(movwf(BH));
    // 1. 16-bit addition B += A with the 8-bit core
    l_add8 = pc;
    emit(movf(AL, W)); emit(addwf(BL, F)); emit(movf(AH, W));
    emit(btfsc(STATUS, 0)); emit(addlw(8'd1)); emit(addwf(BH, F));
    l_add8_end = pc;
    // 2. same addition with the CALU
    emit(movf(AL, W)); emit(movwf(CAL)); emit(movf(AH, W)); emit(movwf(CAH));
    emit(movlw(b[7:0])); emit(movwf(CBL)); emit(movlw(b[15:8])); emit(movwf(CBH));
    l_calu = pc;
    emit(xop(CALU_CODES[0]));
    l_calu_end = pc;
    emit(movf(CSL, W)); emit(movwf(7'h20)); emit(movf(CSH, W)); emit(movwf(7'h21));
    // 3. all 11 CALU operations, carry cleared before each
    for (int i = 0; i < NCALU; i++) begin
      emit(bcf(STATUS, 0));
      emit(xop(CALU_CODES[i]));
      emit(movf(CSL, W)); emit(movwf(7'(8'h22 + 2 * i)));
      emit(movf(CSH, W)); emit(movwf(7'(8'h23 + 2 * i)));
    end
    // 4. multiplication
    emit(movlw(m2)); emit(movwf(7'h10)); emit(movlw(m1));
    l_mul = pc;
    emit(mulwf(7'h10));
    l_mul_end = pc;
    emit(movf(PRL, W)); emit(movwf(7'h40)); emit(movf(PRH, W)); emit(movwf(7'h41));
    // 5. program flow and addressing
    emit(clrf(7'h42)); emit(call(11'(SUB_ADDR))); emit(call(11'(SUB_ADDR)));
    emit(movlw(8'd3)); emit(movwf(7'h43)); emit(clrf(7'h44));
    l_loop = pc;
    emit(incf(7'h44, F)); emit(decfsz(7'h43, F)); emit(goto_(11'(l_loop)));
    emit(movlw(8'h45)); emit(movwf(FSR)); emit(movlw(8'h5A)); emit(movwf(7'h00));
    emit(incf(7'h00, F));
    emit(clrf(PCLATH));
    l_tgt = pc + 4;
    emit(movlw(8'(l_tgt))); emit(movwf(PCL));
    emit(movlw(8'h99)); emit(movwf(7'h46));        // jumped over
    emit(movlw(8'h77)); emit(movwf(7'h47));         // l_tgt
    l_end = pc;
    emit(goto_(11'(l_end)));
    // subroutine
    pc = SUB_ADDR;
    emit(incf(7'h42, F)); emit(ret());
  endfunction

  // ------------------------------------------------------------ monitors
  logic [7:0] shadow [128];
  int exec_addr, icyc, clk_n;
  bit seen_end;
  int at_add8, at_add8_end, at_calu, at_calu_end, at_mul, at_mul_end;
  int n_skip, n_flush, n_call, n_ret, n_stall, n_calu, n_mul, n_ind, n_pcl, n_base, n_ext;
  bit running;

  always @(posedge clk) if (rst_n) begin
    clk_n++;
    if (writeram) begin
      shadow[ram_adr[6:0]] <= ram_dat;
      if (ir[14] == 1'b0 && ir[6:0] == 7'h00) n_ind++;
      if (ram_adr[6:0] == 7'h02) n_pcl++;
    end
    if (stall) n_stall++;
    if (calu_exec) n_calu++;
    if (mul_start) n_mul++;
    if (icycle_end) begin
      if (flush) n_flush++;
      if (flush && ir[14:12] == 3'b001 && ir[11]) n_skip++;         // btfsc/btfss
      if (flush && ir[14:8] == 7'b0001011) n_skip++;                 // decfsz
      if (ir[14:11] == 4'b0100) n_call++;
      if (ir == 15'h0008) n_ret++;
      if (ir[14]) n_ext++; else if (ir != 15'h0000) n_base++;
      icyc++;
      exec_addr = flush ? -1 : int'(addr_c);
      if (exec_addr == l_end) seen_end = 1'b1;
      if (exec_addr == l_add8 && at_add8 < 0) at_add8 = icyc;
      if (exec_addr == l_add8_end && at_add8_end < 0) at_add8_end = icyc;
      if (exec_addr == l_calu && at_calu < 0) at_calu = icyc;
      if (exec_addr == l_calu_end && at_calu_end < 0) at_calu_end = icyc;
      if (exec_addr == l_mul && at_mul < 0) at_mul = clk_n;
      if (exec_addr == l_mul_end && at_mul_end < 0) at_mul_end = clk_n;
    end
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(input logic [15:0] a, input logic [15:0] b,
                     input logic [7:0] m1, input logic [7:0] m2);
    logic [15:0] s8;
    logic [16:0] r;
    rst_n = 0;
    build(a, b, m1, m2);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 13'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < 128; i++) shadow[i] = 8'h00;
    icyc = 0; clk_n = 0; seen_end = 0;
    at_add8 = -1; at_add8_end = -1; at_calu = -1; at_calu_end = -1; at_mul = -1; at_mul_end = -1;
    @(negedge clk); rst_n = 1;
    fork
      wait (seen_end);
      repeat (20000) @(posedge clk);
    join_any
    disable fork;
    repeat (8) @(posedge clk);
    chk("reached end", int'(seen_end), 1);
    // 16-bit addition on the 8-bit path (low byte carry propagated by btfsc/addlw)
    s8 = {8'(b[15:8] + a[15:8] + 8'((9'(a[7:0]) + 9'(b[7:0])) >> 8)), 8'(a[7:0] + b[7:0])};
    chk("8-bit path sum", {shadow[BH], shadow[BL]}, s8);
    chk("8-bit path cycles", at_add8_end - at_add8, 6);
    chk("CALU sum", {shadow[7'h21], shadow[7'h20]}, 16'(a + b));
    chk("CALU cycles", at_calu_end - at_calu, 1);
    for (int i = 0; i < NCALU; i++) begin
      r = calu_ref(i, a, b, 1'b0);
      chk($sformatf("CALU op %0d", i), {shadow[7'(8'h23 + 2 * i)], shadow[7'(8'h22 + 2 * i)]}, r[15:0]);
    end
    chk("product", {shadow[7'h41], shadow[7'h40]}, 16'(m1) * 16'(m2));
    chk("MULWF clocks (3 instruction cycles)", at_mul_end - at_mul, 12);
    chk("call/return", shadow[7'h42], 2);
    chk("loop", shadow[7'h44], 3);
    chk("loop counter", shadow[7'h43], 0);
    chk("indirect", shadow[7'h45], 8'h5B);
    chk("PCL jump over", shadow[7'h46], 0);
    chk("PCL target", shadow[7'h47], 8'h77);
  endtask

  initial begin
    n_skip = 0; n_flush = 0; n_call = 0; n_ret = 0; n_stall = 0; n_calu = 0; n_mul = 0;
    n_ind = 0; n_pcl = 0; n_base = 0; n_ext = 0; exec_addr = -1;
    run(16'h12FF, 16'h3401, 8'd200, 8'd123);   // low-byte carry: no skip
    run(16'h1234, 16'h0101, 8'hFF, 8'hFF);     // no carry: btfsc skips
    for (int k = 0; k < 4; k++)
      run(16'($urandom), 16'($urandom), 8'($urandom), 8'($urandom));
    chk("n_skip > 0", int'(n_skip > 0), 1);
    chk("n_flush > 0", int'(n_flush > 0), 1);
    chk("n_call", n_call, 12);
    chk("n_ret", n_ret, 12);
    chk("n_stall (8 per multiply)", n_stall, 6 * 8);
    chk("n_mul", n_mul, 6);
    chk("n_calu (12 per run)", n_calu, 6 * 12);
    chk("n_ind > 0", int'(n_ind > 0), 1);
    chk("n_pcl > 0", int'(n_pcl > 0), 1);
    chk("n_base > 0", int'(n_base > 0), 1);
    chk("n_ext > 0", int'(n_ext > 0), 1);
    $display("events: skip=%0d flush=%0d call=%0d return=%0d stall_clocks=%0d mul=%0d calu=%0d indirect=%0d pcl=%0d base=%0d extended=%0d",
             n_skip, n_flush, n_call, n_ret, n_stall, n_mul, n_calu, n_ind, n_pcl, n_base, n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
