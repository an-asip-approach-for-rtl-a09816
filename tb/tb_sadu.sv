// tb_sadu: self-checking test of the SAD unit.  Random pixel sets are fed
// lane group by lane group as the AGU would; the result on the last cycle
// is compared with a reference SAD plus the starting accumulator, and the
// number of cycles with 16/LANES.  Back-to-back operations check that the
// step counter restarts.  Runs with LANES = 1 (16 cycles) and LANES = 4.
module tb_sadu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] cur [16], cand [16];

  // LANES = 1
  logic go1; logic [15:0] acc1, res1; logic [3:0] step1; logic last1;
  logic [7:0] cp1 [1], kp1 [1];
  assign cp1[0] = cur[step1];
  assign kp1[0] = cand[step1];
  sadu #(.LANES(1)) d1 (.clk, .rst_n, .go(go1), .acc_in(acc1), .cur_pix(cp1), .cand_pix(kp1),
                        .step(step1), .last(last1), .result(res1));

  // LANES = 4
  logic go4; logic [15:0] acc4, res4; logic [1:0] step4; logic last4;
  logic [7:0] cp4 [4], kp4 [4];
  always_comb for (int l = 0; l < 4; l++) begin
    cp4[l] = cur[step4*4 + l];
    kp4[l] = cand[step4*4 + l];
  end
  sadu #(.LANES(4)) d4 (.clk, .rst_n, .go(go4), .acc_in(acc4), .cur_pix(cp4), .cand_pix(kp4),
                        .step(step4), .last(last4), .result(res4));

  function automatic logic [15:0] ref_sad(logic [15:0] acc);
    int s = acc;
    for (int i = 0; i < 16; i++) s += (cur[i] > cand[i]) ? cur[i] - cand[i] : cand[i] - cur[i];
    return 16'(s);
  endfunction

  task automatic run1(int t);
    int n; logic [15:0] exp;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      cur[i]  = (t == 0) ? 8'hFF : 8'($urandom);
      cand[i] = (t == 0) ? 8'h00 : 8'($urandom);
    end
    acc1 = (t % 3 == 0) ? 16'h0 : 16'($urandom_range(0, 30000));
    exp = ref_sad(acc1);
    go1 = 1; n = 1; #1;
    while (!last1 && n < 40) begin @(negedge clk); n++; #1; end
    checks++;
    if (res1 !== exp || n != 16) begin
      failures++; $display("FAIL L1 t=%0d res=%h exp=%h cycles=%0d", t, res1, exp, n);
    end
    if (t % 2 == 0) begin @(negedge clk); go1 = 0; end
  endtask

  task automatic run4(int t);
    int n; logic [15:0] exp;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      cur[i]  = 8'($urandom);
      cand[i] = 8'($urandom);
    end
    acc4 = 16'($urandom_range(0, 30000));
    exp = ref_sad(acc4);
    go4 = 1; n = 1; #1;
    while (!last4 && n < 40) begin @(negedge clk); n++; #1; end
    checks++;
    if (res4 !== exp || n != 4) begin
      failures++; $display("FAIL L4 t=%0d res=%h exp=%h cycles=%0d", t, res4, exp, n);
    end
    if (t % 2 == 0) begin @(negedge clk); go4 = 0; end
  endtask

  initial begin
    go1 = 0; go4 = 0; acc1 = 0; acc4 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) run1(t);
    @(negedge clk); go1 = 0;
    for (int t = 0; t < 60; t++) run4(t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
