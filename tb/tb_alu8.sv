// tb_alu8: self-checking testbench of the 8-bit ALU.
//
// Drives every operation with random operands and compares result and
// flags with a reference computed here from the 16F84 operation
// definitions (add/sub carry as carry-out / no-borrow, DC from bit 3).
module tb_alu8;
  import risc_pkg::*;

  alu_op_e    op;
  logic [7:0] a, b, y;
  logic [2:0] bsel;
  logic       c_in, c_out, dc_out, z_out;
  int checks = 0, failures = 0;

  alu8 dut (.op(op), .a(a), .b(b), .bsel(bsel), .c_in(c_in),
            .y(y), .c_out(c_out), .dc_out(dc_out), .z_out(z_out));

  task automatic check(input string what, input logic [7:0] ey,
                       input logic ec, input bit chk_c,
                       input logic edc, input bit chk_dc);
    checks++;
    if (y !== ey || z_out !== (ey == 0) || (chk_c && c_out !== ec) ||
        (chk_dc && dc_out !== edc)) begin
      failures++;
      $display("FAIL %s a=%h b=%h c=%b bsel=%0d: y=%h c=%b dc=%b z=%b exp y=%h c=%b dc=%b",
               what, a, b, c_in, bsel, y, c_out, dc_out, z_out, ey, ec, edc);
    end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      a = 8'($urandom); b = 8'($urandom); c_in = 1'($urandom); bsel = 3'($urandom);
      if (n < 4) begin a = 8'hFF * 8'(n & 1); b = 8'h01 * 8'(n >> 1); end
      op = ALU_ADD;  #1 check("add", a + b, (int'(a) + int'(b)) > 255, 1,
                              (int'(a[3:0]) + int'(b[3:0])) > 15, 1);
      op = ALU_SUB;  #1 check("sub", a - b, a >= b, 1, a[3:0] >= b[3:0], 1);
      op = ALU_AND;  #1 check("and", a & b, 0, 0, 0, 0);
      op = ALU_IOR;  #1 check("ior", a | b, 0, 0, 0, 0);
      op = ALU_XOR;  #1 check("xor", a ^ b, 0, 0, 0, 0);
      op = ALU_COM;  #1 check("com", ~a, 0, 0, 0, 0);
      op = ALU_INC;  #1 check("inc", a + 1, 0, 0, 0, 0);
      op = ALU_DEC;  #1 check("dec", a - 1, 0, 0, 0, 0);
      op = ALU_RLF;  #1 check("rlf", {a[6:0], c_in}, a[7], 1, 0, 0);
      op = ALU_RRF;  #1 check("rrf", {c_in, a[7:1]}, a[0], 1, 0, 0);
      op = ALU_SWAP; #1 check("swap", {a[3:0], a[7:4]}, 0, 0, 0, 0);
      op = ALU_BCF;  #1 check("bcf", a & ~(8'd1 << bsel), 0, 0, 0, 0);
      op = ALU_BSF;  #1 check("bsf", a | (8'd1 << bsel), 0, 0, 0, 0);
      op = ALU_BTST; #1 check("btst", a & (8'd1 << bsel), 0, 0, 0, 0);
      op = ALU_PASS_A; #1 check("pass_a", a, 0, 0, 0, 0);
      op = ALU_PASS_B; #1 check("pass_b", b, 0, 0, 0, 0);
      op = ALU_CLR;  #1 check("clr", 8'h00, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
