// tb_data_ram: self-checking testbench of the file-register RAM.
//
// Random reads and writes over the whole 9-bit address space against a
// model: 0x0C..0x4F hold data in both banks (bank bits ignored), other
// addresses read 0 and ignore writes; reads are registered.
module tb_data_ram;
  logic clk = 0, rst_n = 0, readram = 0, writeram = 0;
  logic [8:0] ram_adr = 0;
  logic [7:0] ram_dat_w = 0, ram_dat_r;
  logic [7:0] model [128];
  int checks = 0, failures = 0;

  data_ram #(.SIZE(68), .BASE(12)) dut (.clk(clk), .rst_n(rst_n), .ram_adr(ram_adr),
    .readram(readram), .writeram(writeram), .ram_dat_w(ram_dat_w), .ram_dat_r(ram_dat_r));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 128; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [8:0] a;
      a = 9'($urandom);
      if ($urandom_range(1) == 1) begin
        @(negedge clk); ram_adr = a; writeram = 1; ram_dat_w = 8'($urandom);
        if (a[6:0] >= 12 && a[6:0] < 80) model[a[6:0]] = ram_dat_w;
        @(negedge clk); writeram = 0;
      end else begin
        @(negedge clk); ram_adr = a; readram = 1;
        @(negedge clk); readram = 0; ram_adr = 9'($urandom);
        checks++;
        if (ram_dat_r !== model[a[6:0]]) begin
          failures++; $display("FAIL read %h: %h exp %h", a, ram_dat_r, model[a[6:0]]);
        end
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
