// data_ram: general-purpose file registers of the processor.
//
// Holds SIZE bytes at file addresses BASE .. BASE+SIZE-1 (0x0C..0x4F, the
// 68 bytes of the 16F84). The core presents a 9-bit address {bank bits,
// f[6:0]}; the bank bits are ignored so both banks see the same RAM, as in
// the 16F84. Addresses outside the window read as 0 and ignore writes (the
// core serves its special function registers itself). Port names follow
// the core's RAM bus: ram_adr, readram, writeram, ram_dat_w, ram_dat_r.
//
// Timing: a read is synchronous. When readram is high the byte at ram_adr
// is registered on the clock edge and ram_dat_r holds it from then on. A
// write takes place on the clock edge when writeram is high. The array is
// cleared at reset so that no read returns an undefined value.
module data_ram #(
  parameter int unsigned SIZE = 68,
  parameter int unsigned BASE = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [8:0] ram_adr,
  input  logic       readram,
  input  logic       writeram,
  input  logic [7:0] ram_dat_w,
  output logic [7:0] ram_dat_r
);

  logic [7:0] mem [SIZE];
  logic [6:0] f;
  logic       hit;
  logic [6:0] idx;

  assign f   = ram_adr[6:0];
  assign hit = (32'(f) >= BASE) && (32'(f) < BASE + SIZE);
  assign idx = f - 7'(BASE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SIZE; i++) mem[i] <= '0;
      ram_dat_r <= '0;
    end else begin
      if (writeram && hit) mem[idx] <= ram_dat_w;
      if (readram) ram_dat_r <= hit ? mem[idx] : 8'h00;
    end
  end

endmodule
