// tb_calu16: self-checking testbench of the 16-bit co-operative ALU.
//
// Loads A and B byte by byte through the SFR port, executes each of the 11
// operations with exec, reads S back through the SFR port and compares S,
// C and Z with a reference model. Each operation must complete in a single
// clock (one exec cycle).
module tb_calu16;
  import risc_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_we = 0, exec = 0, c_in = 0, c_out, z_out;
  logic [2:0] reg_idx = 0;
  logic [7:0] reg_wdata = 0, reg_rdata;
  logic [15:0] s_o;
  calu_op_e op = CALU_ADD;
  int checks = 0, failures = 0;

  calu16 dut (.clk(clk), .rst_n(rst_n), .reg_we(reg_we), .reg_idx(reg_idx),
              .reg_wdata(reg_wdata), .reg_rdata(reg_rdata), .exec(exec),
              .op(op), .c_in(c_in), .c_out(c_out), .z_out(z_out), .s_o(s_o));

  always #5 clk = ~clk;

  task automatic wr(input logic [2:0] i, input logic [7:0] d);
    @(negedge clk); reg_we = 1; reg_idx = i; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic rd(input logic [2:0] i, output logic [7:0] d);
    @(negedge clk); reg_idx = i; #1 d = reg_rdata;
  endtask

  initial begin
    logic [15:0] a, b, s;
    logic [7:0]  lo, hi;
    logic [16:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (n == 0) begin a = 16'hFFFF; b = 16'h0001; end
      if (n == 1) begin a = 16'h12FF; b = 16'h3401; end
      wr(0, a[7:0]); wr(1, a[15:8]); wr(2, b[7:0]); wr(3, b[15:8]);
      rd(0, lo); rd(1, hi); checks++;
      if ({hi, lo} !== a) begin failures++; $display("FAIL readback A"); end
      for (int i = 0; i < NCALU; i++) begin
        @(negedge clk);
        op = calu_op_e'(CALU_CODES[i]); c_in = 1'($urandom); exec = 1;
        #1 r = calu_ref(i, a, b, c_in);
        checks++;
        if (c_out !== r[16] || z_out !== (r[15:0] == 0)) begin
          failures++; $display("FAIL flags op %0d: c=%b z=%b exp %h", i, c_out, z_out, r);
        end
        @(negedge clk); exec = 0;   // exactly one exec cycle
        rd(4, lo); rd(5, hi); s = {hi, lo};
        checks++;
        if (s !== r[15:0] || s_o !== r[15:0]) begin
          failures++; $display("FAIL op %0d a=%h b=%h: S=%h exp %h", i, a, b, s, r[15:0]);
        end
      end
      // writes to S are ignored
      wr(4, 8'h5A); rd(4, lo); checks++;
      if (lo !== s[7:0]) begin failures++; $display("FAIL S written"); end
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
