// tb_register_file: self-checking test of the register file.  Random
// writes to all 32 addresses are mirrored in a reference array; after each
// edge both read buses (all 32 slots, and the 16 GPRs) are compared.
// Addresses 24..31 must stay zero; reset must clear everything.
module tb_register_file;
  import asip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we; logic [4:0] waddr; logic [15:0] wdata;
  logic [15:0] regs [32];
  logic [15:0] gprs [16];
  logic [15:0] model [32];

  register_file dut (.clk, .rst_n, .we, .waddr, .wdata, .regs, .gprs);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic compare();
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (regs[i] !== model[i]) begin failures++; $display("FAIL r%0d=%h exp %h", i, regs[i], model[i]); end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (gprs[i] !== model[i]) begin failures++; $display("FAIL gpr%0d", i); end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0;
    foreach (model[i]) model[i] = 0;
    #12 rst_n = 1;
    compare();
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0); waddr = 5'($urandom); wdata = 16'($urandom);
      @(posedge clk); #1;
      if (we && waddr < 24) model[waddr] = wdata;
      compare();
    end
    @(negedge clk); we = 0; rst_n = 0; #1; rst_n = 1;
    foreach (model[i]) model[i] = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
