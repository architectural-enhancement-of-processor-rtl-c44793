// tb_call_stack: self-checking testbench of the return-address stack.
//
// Pushes and pops random addresses against a queue model, including
// nesting to the full depth of 8, then checks the wrap-around: a ninth push
// overwrites the oldest entry.
module tb_call_stack;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [12:0] din = 0, top;
  int checks = 0, failures = 0;
  logic [12:0] model [$];

  call_stack #(.DEPTH(8), .WIDTH(13)) dut (.clk(clk), .rst_n(rst_n), .push(push),
              .pop(pop), .din(din), .top(top));

  always #5 clk = ~clk;

  task automatic do_push(input logic [12:0] v);
    @(negedge clk); push = 1; din = v;
    @(negedge clk); push = 0;
    model.push_back(v);
    checks++;
    if (top !== v) begin failures++; $display("FAIL push top=%h exp %h", top, v); end
  endtask

  task automatic do_pop();
    logic [12:0] v;
    v = model.pop_back();
    checks++;
    if (top !== v) begin failures++; $display("FAIL pop top=%h exp %h", top, v); end
    @(negedge clk); pop = 1;
    @(negedge clk); pop = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      if (model.size() == 0 || (model.size() < 8 && $urandom_range(1) == 1))
        do_push(13'($urandom));
      else
        do_pop();
    end
    while (model.size() > 0) do_pop();
    // full depth, then one more push wraps onto the oldest slot
    for (int i = 0; i < 9; i++) do_push(13'(100 + i));
    for (int i = 8; i >= 1; i--) begin
      checks++;
      if (top !== 13'(100 + i)) begin failures++; $display("FAIL wrap %0d top=%0d", i, top); end
      @(negedge clk); pop = 1; @(negedge clk); pop = 0;
    end
    checks++;
    if (top !== 13'(108)) begin failures++; $display("FAIL wrap oldest top=%0d", top); end
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
