// tb_data_memory: self-checking test of the local pixel memory.  Both
// areas are filled with random words through the 16-bit write port, then
// every pixel is read back through each of the byte read ports (two lanes)
// and compared with the byte the model expects, including the out-of-range
// search-area rule (reads 0).
module tb_data_memory;
  localparam int SA_W = 48, SA_H = 48, L = 2;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, wr_sa; logic [10:0] wr_idx; logic [15:0] wr_data;
  logic [7:0] mb_addr [L]; logic [11:0] sa_addr [L];
  logic [7:0] mb_pix [L], sa_pix [L];
  logic [7:0] mb_model [256];
  logic [7:0] sa_model [SA_W*SA_H];

  data_memory #(.SA_W(SA_W), .SA_H(SA_H), .LANES(L)) dut (
    .clk, .wr_en, .wr_sa, .wr_idx, .wr_data, .mb_addr, .sa_addr, .mb_pix, .sa_pix);

  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; wr_sa = 0; wr_idx = 0; wr_data = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); wr_en = 1; wr_sa = 0; wr_idx = 11'(i); wr_data = 16'($urandom);
      mb_model[2*i] = wr_data[7:0]; mb_model[2*i+1] = wr_data[15:8];
    end
    for (int i = 0; i < SA_W*SA_H/2; i++) begin
      @(negedge clk); wr_en = 1; wr_sa = 1; wr_idx = 11'(i); wr_data = 16'($urandom);
      sa_model[2*i] = wr_data[7:0]; sa_model[2*i+1] = wr_data[15:8];
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < SA_W*SA_H; i++) begin
      for (int l = 0; l < L; l++) begin
        mb_addr[l] = 8'(i + 77*l);
        sa_addr[l] = 12'((i + 1000*l) % (SA_W*SA_H));
      end
      #1;
      for (int l = 0; l < L; l++) begin
        checks += 2;
        if (mb_pix[l] !== mb_model[mb_addr[l]]) begin failures++; $display("FAIL mb %0d", mb_addr[l]); end
        if (sa_pix[l] !== sa_model[sa_addr[l]]) begin failures++; $display("FAIL sa %0d", sa_addr[l]); end
      end
    end
    sa_addr[0] = 12'(SA_W*SA_H + 10); #1;
    checks++; if (sa_pix[0] !== 8'h00) begin failures++; $display("FAIL out of range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
