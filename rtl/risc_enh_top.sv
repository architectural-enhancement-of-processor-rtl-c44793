// risc_enh_top: the enhanced 8-bit RISC processor as a whole.
//
// A 16F84-class core extended with a 16-bit co-operative ALU (CALU) and an
// 8x8 shift-and-add multiplier (both inside risc_core), connected to its
// program memory (PROG_DEPTH words of 15 bits) and to its general-purpose
// file-register RAM (68 bytes). One instruction cycle is four clocks
// (T1..T4); see risc_core for the instruction timing.
//
// Ports: clk and the active-low power-on reset pon_rst_n_i. The program is
// written through prog_we_i/prog_addr_i/prog_data_i while the core is held
// in reset (device programming is outside the source design; this port is
// this design's own). The remaining outputs let a user watch the core: the
// program address, the file-register bus, W, STATUS, the instruction
// register, the T-state and event strobes (end of instruction cycle, pipeline
// flush, multiplier stall, CALU execution, multiplier start).
module risc_enh_top
  import risc_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 1024,
  parameter int unsigned RAM_SIZE   = 68
) (
  input  logic            clk,
  input  logic            pon_rst_n_i,
  // program load
  input  logic            prog_we_i,
  input  logic [PCW-1:0]  prog_addr_i,
  input  logic [IW-1:0]   prog_data_i,
  // observation
  output logic [PCW-1:0]  addr_c_o,
  output logic [IW-1:0]   data_c_o,
  output logic [RAW-1:0]  ram_adr_o,
  output logic            readram_o,
  output logic            writeram_o,
  output logic [7:0]      ram_dat_o,
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

  logic [PCW-1:0] addr_c;
  logic [IW-1:0]  data_c;
  logic [RAW-1:0] ram_adr;
  logic           readram, writeram;
  logic [7:0]     ram_wdat, ram_rdat;

  prog_mem #(.DEPTH(PROG_DEPTH), .IW(IW), .AW(PCW)) u_prog (
    .clk       (clk),
    .addr      (addr_c),
    .data      (data_c),
    .load_we   (prog_we_i),
    .load_addr (prog_addr_i),
    .load_data (prog_data_i)
  );

  data_ram #(.SIZE(RAM_SIZE), .BASE(int'(A_GPR_LO))) u_ram (
    .clk       (clk),
    .rst_n     (pon_rst_n_i),
    .ram_adr   (ram_adr),
    .readram   (readram),
    .writeram  (writeram),
    .ram_dat_w (ram_wdat),
    .ram_dat_r (ram_rdat)
  );

  risc_core u_core (
    .clk          (clk),
    .rst_n        (pon_rst_n_i),
    .addr_c_o     (addr_c),
    .data_c_i     (data_c),
    .ram_adr_o    (ram_adr),
    .readram_o    (readram),
    .writeram_o   (writeram),
    .ram_dat_o    (ram_wdat),
    .ram_dat_i    (ram_rdat),
    .w_o          (w_o),
    .status_o     (status_o),
    .ir_o         (ir_o),
    .tstate_o     (tstate_o),
    .icycle_end_o (icycle_end_o),
    .flush_o      (flush_o),
    .stall_o      (stall_o),
    .calu_exec_o  (calu_exec_o),
    .mul_start_o  (mul_start_o)
  );

  assign addr_c_o   = addr_c;
  assign data_c_o   = data_c;
  assign ram_adr_o  = ram_adr;
  assign readram_o  = readram;
  assign writeram_o = writeram;
  assign ram_dat_o  = ram_wdat;

endmodule
