// tb_mult8x8: self-checking testbench of the shift-and-add multiplier.
//
// Multiplies corner cases and random operand pairs, checks each product
// against a * b and checks the latency: done comes in the 8th cycle after
// the start cycle and the product is valid right after it.
module tb_mult8x8;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [7:0] mcand = 0, mplier = 0;
  logic [15:0] prod;
  int checks = 0, failures = 0;

  mult8x8 dut (.clk(clk), .rst_n(rst_n), .start(start), .mcand(mcand),
               .mplier(mplier), .busy(busy), .done(done), .prod(prod));

  always #5 clk = ~clk;

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] x, y;
      x = 8'($urandom); y = 8'($urandom);
      if (n == 0) begin x = 8'hFF; y = 8'hFF; end
      if (n == 1) begin x = 8'h00; y = 8'h9C; end
      if (n == 2) begin x = 8'd200; y = 8'd123; end
      @(negedge clk); mcand = x; mplier = y; start = 1;
      @(negedge clk); start = 0; mcand = 8'($urandom); mplier = 8'($urandom);
      cyc = 1;
      while (!done && cyc < 20) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 8) begin failures++; $display("FAIL latency %0d", cyc); end
      @(negedge clk);
      checks++;
      if (prod !== 16'(x) * 16'(y) || busy) begin
        failures++; $display("FAIL %0d * %0d = %0d busy=%b", x, y, prod, busy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
