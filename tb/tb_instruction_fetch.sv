// tb_instruction_fetch: self-checking test of the program counter:
// increment, hold on stall and when run is low, jump (also during a
// stall), and the read-enable it gives the program memory.
module tb_instruction_fetch;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run, stall, jump, fetch_en; logic [7:0] jump_addr, pc, model;

  instruction_fetch dut (.clk, .rst_n, .run, .stall, .jump, .jump_addr, .pc, .fetch_en);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    run = 0; stall = 0; jump = 0; jump_addr = 0; model = 0;
    #12 rst_n = 1;
    checks++; if (pc !== 0) failures++;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      run = ($urandom_range(0, 7) != 0); stall = ($urandom_range(0, 3) == 0);
      jump = ($urandom_range(0, 5) == 0); jump_addr = 8'($urandom);
      #1;
      checks++;
      if (fetch_en !== (run && (jump || !stall))) begin failures++; $display("FAIL fetch_en"); end
      if (run) model = jump ? jump_addr : (stall ? model : model + 1);
      @(posedge clk); #1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc=%0d exp %0d", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
