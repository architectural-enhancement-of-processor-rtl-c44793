// tb_prog_mem: self-checking testbench of the program memory.
//
// Fills all 1K words with a pattern through the load port, then reads them
// back through the synchronous fetch port, checking the one-cycle read
// latency and that the 13-bit address wraps onto the 1K array.
module tb_prog_mem;
  logic clk = 0, load_we = 0;
  logic [12:0] addr = 0, load_addr = 0;
  logic [14:0] data, load_data = 0;
  int checks = 0, failures = 0;

  prog_mem #(.DEPTH(1024)) dut (.clk(clk), .addr(addr), .data(data), .load_we(load_we),
                                .load_addr(load_addr), .load_data(load_data));

  always #5 clk = ~clk;

  function automatic logic [14:0] pat(input int i);
    return 15'((i * 40503) ^ (i >> 3));
  endfunction

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); load_we = 1; load_addr = 13'(i); load_data = pat(i);
    end
    @(negedge clk); load_we = 0;
    for (int n = 0; n < 2000; n++) begin
      int i;
      i = $urandom_range(8191);
      @(negedge clk); addr = 13'(i);
      @(negedge clk); addr = 13'($urandom);  // data must hold the sampled word
      checks++;
      if (data !== pat(i % 1024)) begin
        failures++; $display("FAIL addr %0d: %h exp %h", i, data, pat(i % 1024));
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
