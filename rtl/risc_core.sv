// risc_core: control unit and 8-bit datapath of the enhanced 16F84-class
// processor, with the 16-bit co-operative ALU (CALU) and the 8x8 multiplier.
//
// Every instruction cycle has four states T1..T4, one clock each, as in the
// PIC16 family the design builds on:
//   T1  the decoded file address is put on the RAM bus (readram_o)
//   T2  operand a (file register, SFR or literal) and operand b (W) are
//       latched into aluinp1/aluinp2
//   T3  the selected unit executes: the 8-bit ALU result and flags are
//       latched, or the CALU writes S, or the multiplier runs
//   T4  the result is written to W or to the file register, STATUS flags
//       are updated, and the next instruction is loaded into the
//       instruction register while the program counter moves on.
// Fetch overlaps execution: the program memory is read at the program
// counter during the whole cycle, and the word is taken into the
// instruction register at T4. GOTO, CALL, RETURN, a write to PCL and a
// taken skip (btfsc, btfss, decfsz, incfsz) replace that word by a NOP, so
// they take two instruction cycles, as on the 16F84.
//
// Only one unit works at a time: the 8-bit ALU, the CALU and the multiplier
// are all dispatched in T3 from the same decoded word (the source design
// states that the others stay idle). The CALU executes any of its 11
// operations within the single T3 state. MULWF f starts the shift-and-add
// multiplier in T3 and holds the state machine in T3 (a stall) for its 8
// add/shift steps, so it takes 12 clocks, i.e. three instruction cycles.
//
// What follows the source design: the 15-bit word with its class bit, the
// T1..T4 states with execution in T3, the 16F84 instruction set of its
// Table 1, CALL/GOTO, the SFR-mapped CALU registers, single-cycle CALU
// operations and a shift-and-add multiply instruction. This design's own
// choices: the encoding of the extended group, the addresses of the CALU
// and product registers, the multiply stall, STATUS C/Z updates by the CALU,
// and the subset of 16F84 special function registers (INDF, PCL, STATUS,
// FSR, PCLATH). Timer, ports, EEPROM, watchdog and interrupts of the 16F84
// are not part of this design.
//
// Interface: addr_c_o/data_c_i fetch from a synchronous program memory.
// ram_adr_o/readram_o/writeram_o/ram_dat_o/ram_dat_i form the file-register
// bus: a read is requested in T1 and its data is expected in T2; writes
// happen at the end of T4. The remaining outputs expose state for
// observation: W, STATUS, the instruction register, the T-state, a pulse
// at the end of every instruction cycle, the flush and stall indications.
module risc_core
  import risc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // program memory
  output logic [PCW-1:0]  addr_c_o,
  input  logic [IW-1:0]   data_c_i,
  // file-register RAM bus
  output logic [RAW-1:0]  ram_adr_o,
  output logic            readram_o,
  output logic            writeram_o,
  output logic [7:0]      ram_dat_o,
  input  logic [7:0]      ram_dat_i,
  // observation
  output logic [7:0]      w_o,
  output logic [7:0]      status_o,
  output logic [IW-1:0]   ir_o,
  output logic [1:0]      tstate_o,
  output logic            icycle_end_o,
  output logic            flush_o,
  output logic            stall_o,
  output logic            calu_exec_o,
  output logic            mul_start_o
);

  typedef enum logic [1:0] {T1, T2, T3, T4} tstate_e;

  tstate_e        t_q;
  logic [PCW-1:0] pc_q;
  logic [IW-1:0]  ir_q;
  logic [7:0]     w_q, status_q, fsr_q;
  logic [4:0]     pclath_q;
  logic [7:0]     aluinp1_q, aluinp2_q, aluout_q;
  logic           c_q, dc_q, z_q;
  logic           mul_started_q;

  ctrl_t          ctrl;

  // ---------------------------------------------------------------- decode
  instr_decoder u_dec (
    .instr (ir_q),
    .ctrl  (ctrl)
  );

  // effective file address: f = 0 selects indirect addressing through FSR
  logic [6:0]     f_dir;
  logic           indirect;
  logic [RAW-1:0] eff_adr;
  logic [6:0]     eff7;

  assign f_dir    = ir_q[6:0];
  assign indirect = (f_dir == A_INDF);
  assign eff_adr  = indirect ? {status_q[ST_IRP], fsr_q}
                             : {status_q[6], status_q[ST_RP0], f_dir};
  assign eff7     = eff_adr[6:0];

  logic is_calu_reg;
  assign is_calu_reg = (eff7 >= A_CALU) && (eff7 < A_CALU + 7'd6);

  // ----------------------------------------------------------------- units
  logic [7:0]  alu_y;
  logic        alu_c, alu_dc, alu_z;

  alu8 u_alu8 (
    .op     (ctrl.alu_op),
    .a      (aluinp1_q),
    .b      (aluinp2_q),
    .bsel   (ir_q[9:7]),
    .c_in   (status_q[ST_C]),
    .y      (alu_y),
    .c_out  (alu_c),
    .dc_out (alu_dc),
    .z_out  (alu_z)
  );

  logic        calu_we, calu_exec, calu_c, calu_z;
  logic [7:0]  calu_rdata;
  logic [15:0] calu_s;
  logic [7:0]  result;   // value written back in T4

  assign calu_exec = (t_q == T3) && ctrl.valid_calu;

  calu16 u_calu (
    .clk       (clk),
    .rst_n     (rst_n),
    .reg_we    (calu_we),
    .reg_idx   (3'(eff7 - A_CALU)),
    .reg_wdata (result),
    .reg_rdata (calu_rdata),
    .exec      (calu_exec),
    .op        (ctrl.calu_op),
    .c_in      (status_q[ST_C]),
    .c_out     (calu_c),
    .z_out     (calu_z),
    .s_o       (calu_s)
  );

  logic        mul_start, mul_busy, mul_done;
  logic [15:0] mul_prod;

  assign mul_start = (t_q == T3) && ctrl.is_mul && !mul_started_q;

  mult8x8 u_mul (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (mul_start),
    .mcand  (aluinp2_q),   // W
    .mplier (aluinp1_q),   // f
    .busy   (mul_busy),
    .done   (mul_done),
    .prod   (mul_prod)
  );

  logic           stk_push, stk_pop;
  logic [PCW-1:0] stk_top;

  call_stack #(.DEPTH(8), .WIDTH(PCW)) u_stack (
    .clk  (clk),
    .rst_n(rst_n),
    .push (stk_push),
    .pop  (stk_pop),
    .din  (pc_q),
    .top  (stk_top)
  );

  // ------------------------------------------------------- operand read (T2)
  logic [7:0] fval;

  always_comb begin
    if (indirect && fsr_q[6:0] == A_INDF) fval = 8'h00;  // INDF through INDF
    else if (eff7 == A_PCL)    fval = pc_q[7:0];
    else if (eff7 == A_STATUS) fval = status_q;
    else if (eff7 == A_FSR)    fval = fsr_q;
    else if (eff7 == A_PCLATH) fval = {3'b000, pclath_q};
    else if (is_calu_reg)      fval = calu_rdata;
    else if (eff7 == A_PRODL)  fval = mul_prod[7:0];
    else if (eff7 == A_PRODH)  fval = mul_prod[15:8];
    else                       fval = ram_dat_i;
  end

  // ------------------------------------------------------ write back (T4)
  logic in_t4, wr_f, skip, jump, flush;
  logic [PCW-1:0] pc_next;

  assign result = aluout_q;
  assign in_t4  = (t_q == T4);
  assign wr_f   = in_t4 && ctrl.wr_f;
  assign calu_we = wr_f && is_calu_reg;
  assign skip   = (ctrl.skip_z && z_q) || (ctrl.skip_nz && !z_q);
  assign jump   = ctrl.is_goto || ctrl.is_call || ctrl.is_return ||
                  (ctrl.wr_f && eff7 == A_PCL);
  assign flush  = skip || jump;

  assign stk_push = in_t4 && ctrl.is_call;
  assign stk_pop  = in_t4 && ctrl.is_return;

  always_comb begin
    if (ctrl.is_goto || ctrl.is_call) pc_next = {pclath_q[4:3], ir_q[10:0]};
    else if (ctrl.is_return)          pc_next = stk_top;
    else if (ctrl.wr_f && eff7 == A_PCL) pc_next = {pclath_q, result};
    else                              pc_next = pc_q + PCW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q           <= T1;
      pc_q          <= '0;
      ir_q          <= INSTR_NOP;
      w_q           <= '0;
      status_q      <= STATUS_RESET;
      fsr_q         <= '0;
      pclath_q      <= '0;
      aluinp1_q     <= '0;
      aluinp2_q     <= '0;
      aluout_q      <= '0;
      c_q           <= 1'b0;
      dc_q          <= 1'b0;
      z_q           <= 1'b0;
      mul_started_q <= 1'b0;
    end else begin
      unique case (t_q)
        T1: t_q <= T2;
        T2: begin
          aluinp1_q <= ctrl.use_lit ? ir_q[7:0] : fval;
          aluinp2_q <= w_q;
          t_q       <= T3;
        end
        T3: begin
          if (ctrl.is_mul) begin
            // stall in T3 until the multiplier finishes its 8 steps
            if (mul_start) mul_started_q <= 1'b1;
            if (mul_done) begin
              mul_started_q <= 1'b0;
              t_q           <= T4;
            end
          end else begin
            if (ctrl.valid_calu) begin
              c_q <= calu_c;
              z_q <= calu_z;
            end else begin
              aluout_q <= alu_y;
              c_q      <= alu_c;
              dc_q     <= alu_dc;
              z_q      <= alu_z;
            end
            t_q <= T4;
          end
        end
        T4: begin
          t_q <= T1;
          // register destinations
          if (ctrl.wr_w) w_q <= result;
          if (wr_f) begin
            unique case (eff7)
              A_FSR:    fsr_q    <= result;
              A_PCLATH: pclath_q <= result[4:0];
              default: ;
            endcase
          end
          // STATUS: an explicit write first, then the flags the
          // instruction affects take precedence
          begin
            logic [7:0] st;
            st = (wr_f && eff7 == A_STATUS) ? result : status_q;
            if (ctrl.upd_c)  st[ST_C]  = c_q;
            if (ctrl.upd_dc) st[ST_DC] = dc_q;
            if (ctrl.upd_z)  st[ST_Z]  = z_q;
            status_q <= st;
          end
          // program flow and fetch
          pc_q <= pc_next;
          ir_q <= flush ? INSTR_NOP : data_c_i;
        end
        default: t_q <= T1;
      endcase
    end
  end

  // ------------------------------------------------------------ RAM bus
  assign addr_c_o   = pc_q;
  assign ram_adr_o  = eff_adr;
  assign readram_o  = (t_q == T1) && ctrl.reads_f;
  assign writeram_o = wr_f;
  assign ram_dat_o  = result;

  // ---------------------------------------------------------- observation
  assign w_o          = w_q;
  assign status_o     = status_q;
  assign ir_o         = ir_q;
  assign tstate_o     = t_q;
  assign icycle_end_o = in_t4;
  assign flush_o      = in_t4 && flush;
  assign stall_o      = (t_q == T3) && ctrl.is_mul && !mul_done;
  assign calu_exec_o  = calu_exec;
  assign mul_start_o  = mul_start;

  // The units work one at a time: the multiplier only runs while the
  // control unit holds a MULWF instruction in state T3.
  a_mul_only_in_t3: assert property (@(posedge clk) disable iff (!rst_n)
    mul_busy |-> (t_q == T3 && ctrl.is_mul));

endmodule
