// mult8x8: 8 by 8 bit unsigned shift-and-add multiplier.
//
// The structure follows the source design: an 8-bit multiplier register
// shifted right, a multiplicand register shifted left (held 16 bits wide), a
// 16-bit adder and a 16-bit result register. In each of 8 steps the control
// logic looks at the multiplier's low bit and adds either the shifted
// multiplicand or zero into the result register; then the multiplicand moves
// one place left and the multiplier one place right.
//
// Interface and timing (this design's own handshake): a one-cycle start
// pulse loads the operands and clears the result register. The next 8
// clock cycles perform the 8 steps with busy high; done is high during the
// last step, and prod holds the product from the edge that ends that step
// until the next start. A start while busy is ignored.
module mult8x8 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  mcand,
  input  logic [7:0]  mplier,
  output logic        busy,
  output logic        done,
  output logic [15:0] prod
);

  logic [15:0] mcand_q;
  logic [7:0]  mplier_q;
  logic [15:0] acc_q;
  logic [2:0]  step_q;
  logic        busy_q;
  logic [15:0] addend;

  assign addend = mplier_q[0] ? mcand_q : 16'h0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcand_q  <= '0;
      mplier_q <= '0;
      acc_q    <= '0;
      step_q   <= '0;
      busy_q   <= 1'b0;
    end else if (busy_q) begin
      acc_q    <= acc_q + addend;
      mcand_q  <= {mcand_q[14:0], 1'b0};
      mplier_q <= {1'b0, mplier_q[7:1]};
      step_q   <= step_q + 3'd1;
      if (step_q == 3'd7) busy_q <= 1'b0;
    end else if (start) begin
      mcand_q  <= {8'h00, mcand};
      mplier_q <= mplier;
      acc_q    <= '0;
      step_q   <= '0;
      busy_q   <= 1'b1;
    end
  end

  assign busy = busy_q;
  assign done = busy_q && (step_q == 3'd7);
  assign prod = acc_q;

endmodule
