// tb_program_memory: self-checking test of the instruction store.  Fills
// all words, then reads them back in random order, checking the one-cycle
// synchronous read and that the output holds while rd_en is low.
module tb_program_memory;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en; logic [7:0] rd_addr, wr_addr; logic [15:0] rd_data, wr_data;
  logic [15:0] model [256];

  program_memory dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 8'(i); wr_data = 16'($urandom); model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 400; n++) begin
      logic [15:0] prev;
      logic [7:0] a;
      prev = rd_data; a = 8'($urandom);
      @(negedge clk); rd_en = (n % 5 != 0); rd_addr = a;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== (rd_en ? model[a] : prev)) begin
        failures++; $display("FAIL addr=%0d en=%b data=%h", a, rd_en, rd_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
