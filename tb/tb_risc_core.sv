// tb_risc_core: self-checking testbench of the processor core.
//
// The core runs against a testbench program memory (synchronous read) and
// a file-register RAM model. The testbench assembles a random program in
// which every base instruction is applied to random operands, with random
// carry-in and both destinations, and predicts each write on the
// file-register bus with its own model of the 16F84 instruction semantics
// (W, C, DC, Z, skips). Every write the core makes is compared, in order,
// with the predicted one. It also checks that every base instruction cycle
// lasts four clocks (T1..T4).
module tb_risc_core;
  import risc_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [12:0] addr_c;
  logic [14:0] data_c;
  logic [8:0]  ram_adr;
  logic        readram, writeram, icycle_end, flush, stall, calu_exec, mul_start;
  logic [7:0]  ram_dat_o, ram_dat_i, w_o, status_o;
  logic [14:0] ir_o;
  logic [1:0]  tstate;

  int checks = 0, failures = 0;

  risc_core dut (.clk(clk), .rst_n(rst_n), .addr_c_o(addr_c), .data_c_i(data_c),
    .ram_adr_o(ram_adr), .readram_o(readram), .writeram_o(writeram),
    .ram_dat_o(ram_dat_o), .ram_dat_i(ram_dat_i), .w_o(w_o), .status_o(status_o),
    .ir_o(ir_o), .tstate_o(tstate), .icycle_end_o(icycle_end), .flush_o(flush),
    .stall_o(stall), .calu_exec_o(calu_exec), .mul_start_o(mul_start));

  always #5 clk = ~clk;

  // memories
  word_t      pmem [1024];
  logic [7:0] fmem [128];
  always_ff @(posedge clk) begin
    data_c <= pmem[addr_c[9:0]];
    if (readram) ram_dat_i <= fmem[ram_adr[6:0]];
    if (writeram) fmem[ram_adr[6:0]] <= ram_dat_o;
  end

  // program builder and expected-write model
  int pc;
  typedef struct { logic [6:0] a; logic [7:0] d; } wr_t;
  wr_t exp_q [$];
  logic [7:0] mw, mst, mf;   // model W, STATUS, f at 0x20

  function automatic void emit(input word_t w);
    pmem[pc] = w; pc++;
  endfunction
  function automatic void expect_wr(input logic [6:0] a, input logic [7:0] d);
    exp_q.push_back('{a, d});
  endfunction
  function automatic void set_flags(input bit uz, input bit uc, input bit udc,
                                    input logic [7:0] r, input logic c, input logic dc);
    if (uz)  mst[2] = (r == 0);
    if (uc)  mst[0] = c;
    if (udc) mst[1] = dc;
  endfunction

  localparam logic [6:0] FR = 7'h20, WS = 7'h30, SS = 7'h31;

  // one item: f = a, C = cin, W = b, then op f,d; record W and STATUS
  function automatic void item(input int op, input logic [7:0] a, input logic [7:0] b,
                               input bit cin, input bit d);
    logic [7:0] r; logic c, dc; bit uz, uc, udc; logic [8:0] t;
    emit(movlw(a)); mw = a;
    emit(movwf(FR)); mf = a; expect_wr(FR, a);
    emit(cin ? bsf(7'h03, 0) : bcf(7'h03, 0)); mst[0] = cin; expect_wr(7'h03, mst);
    emit(movlw(b)); mw = b;
    c = mst[0]; dc = mst[1]; uz = 1; uc = 0; udc = 0;
    case (op)
      0: begin emit(subwf(FR, d)); t = {1'b0, a} + {1'b0, ~b} + 9'd1; r = t[7:0]; c = t[8];
               dc = ({1'b0, a[3:0]} + {1'b0, ~b[3:0]} + 5'd1) > 5'd15; uc = 1; udc = 1; end
      1: begin emit(decf(FR, d));  r = a - 1; end
      2: begin emit(iorwf(FR, d)); r = a | b; end
      3: begin emit(andwf(FR, d)); r = a & b; end
      4: begin emit(xorwf(FR, d)); r = a ^ b; end
      5: begin emit(addwf(FR, d)); t = {1'b0, a} + {1'b0, b}; r = t[7:0]; c = t[8];
               dc = ({1'b0, a[3:0]} + {1'b0, b[3:0]}) > 5'd15; uc = 1; udc = 1; end
      6: begin emit(movf(FR, d));  r = a; end
      7: begin emit(comf(FR, d));  r = ~a; end
      8: begin emit(incf(FR, d));  r = a + 1; end
      9: begin emit(rrf(FR, d));   r = {mst[0], a[7:1]}; c = a[0]; uz = 0; uc = 1; end
      10: begin emit(rlf(FR, d));  r = {a[6:0], mst[0]}; c = a[7]; uz = 0; uc = 1; end
      11: begin emit(swapf(FR, d)); r = {a[3:0], a[7:4]}; uz = 0; end
      default: r = 0;
    endcase
    set_flags(uz, uc, udc, r, c, dc);
    if (d) begin mf = r; expect_wr(FR, r); end else mw = r;
    emit(movwf(WS)); expect_wr(WS, mw);
    emit(movf(7'h03, W)); emit(movwf(SS)); expect_wr(SS, mst);
    mst[2] = 1'b0;  // movf STATUS,w: STATUS is never zero
  endfunction

  // literal operation: W = b, then op k=a
  function automatic void litem(input int op, input logic [7:0] a, input logic [7:0] b,
                                input bit cin);
    logic [7:0] r; logic c, dc; bit uc; logic [8:0] t;
    emit(cin ? bsf(7'h03, 0) : bcf(7'h03, 0)); mst[0] = cin; expect_wr(7'h03, mst);
    emit(movlw(b));
    c = mst[0]; dc = mst[1]; uc = 0;
    case (op)
      0: begin emit(sublw(a)); t = {1'b0, a} + {1'b0, ~b} + 9'd1; r = t[7:0]; c = t[8];
               dc = ({1'b0, a[3:0]} + {1'b0, ~b[3:0]} + 5'd1) > 5'd15; uc = 1; end
      1: begin emit(addlw(a)); t = {1'b0, a} + {1'b0, b}; r = t[7:0]; c = t[8];
               dc = ({1'b0, a[3:0]} + {1'b0, b[3:0]}) > 5'd15; uc = 1; end
      2: begin emit(andlw(a)); r = a & b; end
      3: begin emit(iorlw(a)); r = a | b; end
      4: begin emit(xorlw(a)); r = a ^ b; end
      default: begin emit(clrw()); r = 0; end
    endcase
    set_flags(1, uc, uc, r, c, dc);
    mw = r;
    emit(movwf(WS)); expect_wr(WS, mw);
    emit(movf(7'h03, W)); emit(movwf(SS)); expect_wr(SS, mst);
    mst[2] = 1'b0;
  endfunction

  // bit and skip operations on f = a
  function automatic void bitem(input int op, input logic [7:0] a, input logic [2:0] b);
    logic [7:0] r; bit taken;
    emit(movlw(a)); emit(movwf(FR)); expect_wr(FR, a);
    r = a; taken = 0;
    case (op)
      0: begin emit(bcf(FR, b)); r = a & ~(8'd1 << b); expect_wr(FR, r); end
      1: begin emit(bsf(FR, b)); r = a | (8'd1 << b); expect_wr(FR, r); end
      2: begin emit(btfsc(FR, b)); taken = (a[b] == 1'b0); end
      3: begin emit(btfss(FR, b)); taken = (a[b] == 1'b1); end
      4: begin emit(decfsz(FR, F)); r = a - 1; expect_wr(FR, r); taken = (r == 0); end
      default: begin emit(incfsz(FR, F)); r = a + 1; expect_wr(FR, r); taken = (r == 0); end
    endcase
    emit(movlw(8'h11));            // skipped when taken
    emit(movwf(WS)); expect_wr(WS, taken ? a : 8'h11);
    emit(clrf(FR)); expect_wr(FR, 8'h00); mst[2] = 1'b1;
  endfunction

  int cyc_clocks, bad_len, end_pc;

  initial begin
    int n;
    for (int i = 0; i < 1024; i++) pmem[i] = 15'h0000;
    for (int i = 0; i < 128; i++) fmem[i] = 8'h00;
    pc = 0; mst = STATUS_RESET; mw = 0;
    for (n = 0; n < 40; n++) begin
      item(n % 12, 8'($urandom), 8'($urandom), 1'($urandom), 1'($urandom));
      litem(n % 6, 8'($urandom), 8'($urandom), 1'($urandom));
      bitem(n % 6, (n % 5 == 0) ? 8'(n % 2) : ((n % 7 == 0) ? 8'hFF : 8'($urandom)),
            3'($urandom));
    end
    end_pc = pc;
    emit(goto_(11'(end_pc)));
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  // compare writes in order
  always @(posedge clk) if (rst_n && writeram) begin
    wr_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected write %h=%h", ram_adr, ram_dat_o);
    end else begin
      e = exp_q.pop_front();
      if (ram_adr[6:0] !== e.a || ram_dat_o !== e.d) begin
        failures++;
        $display("FAIL write %h=%h expected %h=%h (ir %h)", ram_adr[6:0], ram_dat_o, e.a, e.d, ir_o);
      end
    end
  end

  // every instruction cycle is 4 clocks
  always @(posedge clk) if (rst_n) begin
    cyc_clocks++;
    if (icycle_end) begin
      if (cyc_clocks != 4) bad_len++;
      cyc_clocks = 0;
    end
  end

  initial begin
    cyc_clocks = 0; bad_len = 0;
    wait (rst_n);
    wait (addr_c == 13'(end_pc + 1));
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d writes missing", exp_q.size()); end
    checks++;
    if (bad_len != 0) begin failures++; $display("FAIL %0d cycles not 4 clocks", bad_len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
