// prog_mem: program memory of 15-bit instruction words.
//
// DEPTH words of IW bits (1K x 15 by default: the 16F84's 1K program space,
// widened by the extra class bit of the enhanced instruction format). The
// core reads it through a synchronous port: data is the word at addr as
// sampled on the previous clock edge, which suits an FPGA block RAM. The
// core holds addr for a whole instruction cycle, so the word is stable long
// before it is loaded into the instruction register. Only the low
// $clog2(DEPTH) address bits are used, so the 13-bit program counter wraps.
//
// A separate write port (load_we, load_addr, load_data) fills the memory;
// it stands in for device programming, which the source design does not
// describe. The array is not reset; load it before releasing the core.
module prog_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned IW    = 15,
  parameter int unsigned AW    = 13
) (
  input  logic          clk,
  // core fetch port
  input  logic [AW-1:0] addr,
  output logic [IW-1:0] data,
  // load port
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [IW-1:0] load_data
);

  localparam int unsigned IDXW = $clog2(DEPTH);

  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[IDXW-1:0]] <= load_data;
    data <= mem[addr[IDXW-1:0]];
  end

endmodule
