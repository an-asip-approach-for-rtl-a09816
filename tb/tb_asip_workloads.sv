// tb_asip_workloads: the core running the two encoder configurations the
// design is meant for, beyond a single 16x16 search.
//
// 1. Several reference frames.  Three reference frames sit in the external
//    memory; only the second one contains the current MB exactly (moved by
//    a planted vector), the others are brightness-shifted copies.  The
//    program loops over the frames: it moves SA_BASE on by one frame, loads
//    the search area with LD, tests the predictors and runs the square
//    pattern until the centre is best or the cost reaches zero, then keeps
//    the best frame, cost and position in SPR4..SPR6.  The result must be
//    frame 1, cost 0, the planted position; per-frame results are also
//    compared with a software model.
// 2. All partition sizes.  For one candidate the program computes the cost
//    of the 16x16 block, the upper 16x8 half, the left 8x16 half, the sum
//    over the four 8x8 blocks and the sum over the sixteen 4x4 blocks,
//    switching SPR BLKW between 16, 8 and 4.  Each value is compared with a
//    reference SAD computed directly from the frames, and the number of
//    SAD16 instructions executed with the 16 + 8 + 8 + 16 + 16 the program
//    issues.
module tb_asip_workloads;
  import asip_pkg::*;

  localparam int SA_W = 48, SA_H = 48;
  localparam int FW = 96, FH = 96;
  localparam int CUR_W = 0, REF_W = 8192, FRAME_STEP_W = 8192, NREF = 3;
  localparam int MB_X = 32, MB_Y = 32, MVX = 3, MVY = -2;
  localparam int SA_X0 = MB_X - 16, SA_Y0 = MB_Y - 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;

  logic pm_we; logic [7:0] pm_waddr; logic [15:0] pm_wdata;
  logic ext_req, ext_gnt, ext_rvalid; logic [19:0] ext_addr; logic [15:0] ext_rdata;
  logic [4:0] dbg_addr; logic [15:0] dbg_data; logic [7:0] pc; logic ld_busy, halted;

  asip_top dut (
    .clk, .rst_n, .run, .pm_we, .pm_waddr, .pm_wdata,
    .ext_req, .ext_addr, .ext_gnt, .ext_rvalid, .ext_rdata,
    .dbg_addr, .dbg_data, .pc, .ld_busy, .halted);

  frame_memory_model #(.AW(20), .DEPTH(65536), .LATENCY(5), .STALL_PCT(15)) ext (
    .clk, .rst_n, .req(ext_req), .addr(ext_addr), .gnt(ext_gnt), .rvalid(ext_rvalid), .rdata(ext_rdata));

  initial begin
    #80000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ images
  function automatic int base_pix(int x, int y);
    return ((x * x + 2 * y * y) / 48 + ((x ^ y) & 1)) & 255;
  endfunction
  function automatic int ref_pix(int k, int x, int y);
    return (k == 1) ? base_pix(x, y) : ((base_pix(x, y) + 9 * (k + 1)) & 255);
  endfunction
  function automatic int frame_pix(int base_w, int x, int y);
    logic [15:0] w;
    w = ext.mem[base_w + y * (FW / 2) + x / 2];
    return (x % 2) ? w[15:8] : w[7:0];
  endfunction

  task automatic fill_frames();
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x += 2) begin
        for (int k = 0; k < NREF; k++)
          ext.mem[REF_W + k * FRAME_STEP_W + y * (FW / 2) + x / 2] =
            {8'(ref_pix(k, x + 1, y)), 8'(ref_pix(k, x, y))};
        ext.mem[CUR_W + y * (FW / 2) + x / 2] =
          {8'(base_pix(x + 1 + MVX, y + MVY)), 8'(base_pix(x + MVX, y + MVY))};
      end
  endtask

  // SAD of a W x H block at MB offset (ox,oy), candidate cand, in frame k
  function automatic int sad_blk(int k, logic [15:0] cand, int ox, int oy, int w, int h);
    int s = 0;
    for (int dy = 0; dy < h; dy++)
      for (int dx = 0; dx < w; dx++) begin
        int sx, sy, a, b;
        sx = (int'(cand[15:8]) + ox + dx) % 512; sy = (int'(cand[7:0]) + oy + dy) % 512;
        a = frame_pix(CUR_W, MB_X + ox + dx, MB_Y + oy + dy);
        b = (sx < SA_W && sy < SA_H) ?
            frame_pix(REF_W + k * FRAME_STEP_W, SA_X0 + sx, SA_Y0 + sy) : 0;
        s += (a > b) ? a - b : b - a;
      end
    return s & 16'hFFFF;
  endfunction

  // ------------------------------------------------------------ assembler
  logic [15:0] prog [$];
  int          patch_at [string][$];
  int          label_of [string];
  int          eval_id = 0;

  function automatic void emit(logic [15:0] w); prog.push_back(w); endfunction
  function automatic void label(string n); label_of[n] = prog.size(); endfunction
  function automatic void jmp(cond_e cc, string n);
    patch_at[n].push_back(prog.size());
    emit(enc_j(cc, 8'h00));
  endfunction
  function automatic void resolve();
    foreach (patch_at[n]) begin
      int q [$];
      q = patch_at[n];
      foreach (q[i]) prog[q[i]][7:0] = 8'(label_of[n]);
    end
  endfunction
  function automatic void movc16(logic [3:0] rd, logic [15:0] v);
    emit(enc_movc(1'b0, rd, v[7:0]));
    if (v[15:8] != 0) emit(enc_movc(1'b1, rd, v[15:8]));
  endfunction
  function automatic void set_spr(logic [4:0] spr, logic [15:0] v);
    movc16(4'd8, v);
    emit(enc_movr(spr, 5'd8));
  endfunction
  function automatic logic [15:0] pos(int x, int y); return 16'(x * 256 + y); endfunction
  function automatic void start_prog();
    prog.delete(); patch_at.delete(); label_of.delete(); eval_id = 0;
  endfunction

  localparam logic [3:0] R256 = 0, RCAND = 1, RPTR = 2, RACC = 3, RCNT = 4, RONE = 5,
                         RBEST = 6, RBPOS = 7, RTMP = 8, RFRM = 9, RSAB = 10, RCTR = 11,
                         RFSTEP = 12, RTHR = 13, RLEFT = 14;
  localparam logic [4:0] SPR_GBEST = 5'd20, SPR_GPOS = 5'd21, SPR_GFRM = 5'd22;

  function automatic void emit_eval();
    string l_loop, l_skip;
    l_loop = $sformatf("sad%0d", eval_id); l_skip = $sformatf("skip%0d", eval_id); eval_id++;
    emit(enc_movc(1'b0, RACC, 8'd0));
    emit(enc_movc(1'b0, RPTR, 8'd0));
    emit(enc_movc(1'b0, RCNT, 8'd16));
    label(l_loop);
    emit(enc_rrr(OP_SAD16, RACC, RCAND, RPTR));
    emit(enc_rrr(OP_SUB, RCNT, RCNT, RONE));
    jmp(CC_NZ, l_loop);
    emit(enc_rrr(OP_SUB, RTMP, RACC, RBEST));
    jmp(CC_NC, l_skip);
    emit(enc_movr({1'b0, RBEST}, {1'b0, RACC}));
    emit(enc_movr({1'b0, RBPOS}, {1'b0, RCAND}));
    label(l_skip);
  endfunction

  // ------------------------------------------------ multi-reference search
  function automatic void gen_multiref(logic [15:0] preds [3]);
    start_prog();
    set_spr(SPR_MB_BASE, 16'((CUR_W + (MB_Y * FW + MB_X) / 2) / 8));
    set_spr(SPR_PITCH, 16'(FW / 16));
    emit(enc_ld(1'b0));
    movc16(RONE, 16'd1);
    emit(enc_movc(1'b0, R256, 8'd0)); emit(enc_movc(1'b1, R256, 8'd1));
    movc16(RTHR, 16'd1);
    movc16(RSAB, 16'((REF_W + (SA_Y0 * FW + SA_X0) / 2) / 8));
    movc16(RFSTEP, 16'(FRAME_STEP_W / 8));
    movc16(RFRM, 16'd0);
    movc16(RLEFT, 16'(NREF));
    set_spr(SPR_GBEST, 16'hFFFF);
    label("frame");
    emit(enc_movr(SPR_SA_BASE, {1'b0, RSAB}));
    emit(enc_ld(1'b1));
    movc16(RBEST, 16'hFFFF);
    for (int p = 0; p < 3; p++) begin movc16(RCAND, preds[p]); emit_eval(); end
    emit(enc_movr({1'b0, RCTR}, {1'b0, RBPOS}));
    label("sqloop");
    emit(enc_rrr(OP_ADD, RCAND, RCTR, R256)); emit_eval();
    emit(enc_rrr(OP_SUB, RCAND, RCTR, R256)); emit_eval();
    emit(enc_rrr(OP_ADD, RCAND, RCTR, RONE)); emit_eval();
    emit(enc_rrr(OP_SUB, RCAND, RCTR, RONE)); emit_eval();
    emit(enc_rrr(OP_ADD, RCAND, RCTR, R256)); emit(enc_rrr(OP_ADD, RCAND, RCAND, RONE)); emit_eval();
    emit(enc_rrr(OP_ADD, RCAND, RCTR, R256)); emit(enc_rrr(OP_SUB, RCAND, RCAND, RONE)); emit_eval();
    emit(enc_rrr(OP_SUB, RCAND, RCTR, R256)); emit(enc_rrr(OP_ADD, RCAND, RCAND, RONE)); emit_eval();
    emit(enc_rrr(OP_SUB, RCAND, RCTR, R256)); emit(enc_rrr(OP_SUB, RCAND, RCAND, RONE)); emit_eval();
    emit(enc_rrr(OP_SUB, RTMP, RBEST, RTHR)); jmp(CC_C, "fdone");
    emit(enc_rrr(OP_SUB, RTMP, RBPOS, RCTR)); jmp(CC_Z, "fdone");
    emit(enc_movr({1'b0, RCTR}, {1'b0, RBPOS}));
    jmp(CC_ALWAYS, "sqloop");
    label("fdone");
    // keep the best frame so far in SPR4..SPR6
    emit(enc_movr({1'b0, RACC}, SPR_GBEST));
    emit(enc_rrr(OP_SUB, RTMP, RBEST, RACC)); jmp(CC_NC, "nextf");
    emit(enc_movr(SPR_GBEST, {1'b0, RBEST}));
    emit(enc_movr(SPR_GPOS, {1'b0, RBPOS}));
    emit(enc_movr(SPR_GFRM, {1'b0, RFRM}));
    label("nextf");
    emit(enc_rrr(OP_ADD, RFRM, RFRM, RONE));
    emit(enc_rrr(OP_ADD, RSAB, RSAB, RFSTEP));
    emit(enc_rrr(OP_SUB, RLEFT, RLEFT, RONE)); jmp(CC_NZ, "frame");
    label("end"); jmp(CC_ALWAYS, "end");
    resolve();
  endfunction

  task automatic model_frame(int k, logic [15:0] preds [3], output int best, output logic [15:0] bpos);
    logic [15:0] ctr;
    best = 16'hFFFF; bpos = 0;
    for (int p = 0; p < 3; p++) begin
      int s = sad_blk(k, preds[p], 0, 0, 16, 16);
      if (s < best) begin best = s; bpos = preds[p]; end
    end
    ctr = bpos;
    forever begin
      logic [15:0] c [8];
      c[0] = ctr + 256; c[1] = ctr - 256; c[2] = ctr + 1; c[3] = ctr - 1;
      c[4] = ctr + 257; c[5] = ctr + 255; c[6] = ctr - 255; c[7] = ctr - 257;
      for (int j = 0; j < 8; j++) begin
        int s = sad_blk(k, c[j], 0, 0, 16, 16);
        if (s < best) begin best = s; bpos = c[j]; end
      end
      if (best < 1 || bpos == ctr) return;
      ctr = bpos;
    end
  endtask

  // ------------------------------------------------ partition costs
  function automatic void gen_partitions(logic [15:0] cand);
    start_prog();
    set_spr(SPR_MB_BASE, 16'((CUR_W + (MB_Y * FW + MB_X) / 2) / 8));
    set_spr(SPR_SA_BASE, 16'((REF_W + FRAME_STEP_W + (SA_Y0 * FW + SA_X0) / 2) / 8));
    set_spr(SPR_PITCH, 16'(FW / 16));
    emit(enc_ld(1'b1));
    emit(enc_ld(1'b0));
    movc16(RCAND, cand);
    // 16x16 into r3, upper 16x8 half into r12
    movc16(RTMP, 16'd16); emit(enc_movr(SPR_BLKW, 5'd8));
    movc16(RACC, 16'd0); movc16(RPTR, 16'd0);
    for (int i = 0; i < 8; i++) emit(enc_rrr(OP_SAD16, RACC, RCAND, RPTR));
    emit(enc_movr(5'd12, {1'b0, RACC}));
    for (int i = 0; i < 8; i++) emit(enc_rrr(OP_SAD16, RACC, RCAND, RPTR));
    // 8-wide: left 8x16 half into r13, then all four 8x8 into r10
    movc16(RTMP, 16'd8); emit(enc_movr(SPR_BLKW, 5'd8));
    movc16(13, 16'd0); movc16(RPTR, 16'd0);
    for (int i = 0; i < 8; i++) emit(enc_rrr(OP_SAD16, 13, RCAND, RPTR));
    movc16(10, 16'd0);
    for (int q = 0; q < 4; q++) begin
      movc16(RPTR, pos((q % 2) * 8, (q / 2) * 8));
      for (int i = 0; i < 4; i++) emit(enc_rrr(OP_SAD16, 10, RCAND, RPTR));
    end
    // 4-wide: all sixteen 4x4 into r11
    movc16(RTMP, 16'd4); emit(enc_movr(SPR_BLKW, 5'd8));
    movc16(11, 16'd0);
    for (int b = 0; b < 16; b++) begin
      movc16(RPTR, pos((b % 4) * 4, (b / 4) * 4));
      emit(enc_rrr(OP_SAD16, 11, RCAND, RPTR));
    end
    label("end"); jmp(CC_ALWAYS, "end");
    resolve();
  endfunction

  // ------------------------------------------------------------ helpers
  int n_sad_ops;
  always @(posedge clk) if (rst_n && run && dut.ex.valid && dut.ex.is_sad && dut.sad_last) n_sad_ops++;

  task automatic load_and_run(int max_cycles, output int cycles);
    run = 0; rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (prog.size() > 256) begin failures++; $display("FAIL program too long: %0d", prog.size()); end
    foreach (prog[i]) begin
      @(negedge clk); pm_we = 1; pm_waddr = 8'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 0; run = 1; n_sad_ops = 0;
    cycles = 0;
    while (!halted && cycles < max_cycles) begin @(posedge clk); cycles++; end
    @(negedge clk); run = 0;
    checks++;
    if (!halted) begin failures++; $display("FAIL program did not halt"); end
  endtask

  function automatic int rd(int r); return int'(dut.regs[r]); endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    logic [15:0] preds [3];
    int cyc, gbest, gfrm;
    logic [15:0] gpos;
    pm_we = 0; pm_waddr = 0; pm_wdata = 0; dbg_addr = 0;
    fill_frames();

    // 1. three reference frames
    preds = '{pos(16, 16), pos(18, 15), pos(12, 19)};
    gen_multiref(preds);
    gbest = 16'hFFFF; gfrm = 0; gpos = 0;
    for (int k = 0; k < NREF; k++) begin
      int b; logic [15:0] p;
      model_frame(k, preds, b, p);
      $display("model frame %0d: best SAD %0d at (%0d,%0d)", k, b, p[15:8], p[7:0]);
      if (b < gbest) begin gbest = b; gpos = p; gfrm = k; end
    end
    load_and_run(400000, cyc);
    $display("multi-reference: %0d words, %0d cycles, %0d SAD16, best frame %0d SAD %0d at (%0d,%0d)",
             prog.size(), cyc, n_sad_ops, rd(22), rd(20), rd(21) >> 8, rd(21) & 255);
    expect_eq("best frame", rd(22), gfrm);
    expect_eq("best SAD", rd(20), gbest);
    expect_eq("best position", rd(21), gpos);
    expect_eq("planted frame", gfrm, 1);
    expect_eq("planted SAD", gbest, 0);
    expect_eq("planted position", gpos, pos(16 + MVX, 16 + MVY));
    expect_eq("frames visited", rd(RFRM), NREF);

    // 2. partition costs
    begin
      logic [15:0] cand;
      int s16, s8sum, s4sum;
      cand = pos(18, 15);
      gen_partitions(cand);
      load_and_run(100000, cyc);
      s16 = sad_blk(1, cand, 0, 0, 16, 16);
      s8sum = 0; s4sum = 0;
      for (int q = 0; q < 4; q++) s8sum += sad_blk(1, cand, (q % 2) * 8, (q / 2) * 8, 8, 8);
      for (int b = 0; b < 16; b++) s4sum += sad_blk(1, cand, (b % 4) * 4, (b / 4) * 4, 4, 4);
      $display("partitions: %0d words, %0d cycles, %0d SAD16; 16x16 %0d, 16x8 %0d, 8x16 %0d, 4x 8x8 %0d, 16x 4x4 %0d",
               prog.size(), cyc, n_sad_ops, rd(RACC), rd(12), rd(13), rd(10), rd(11));
      expect_eq("16x16", rd(RACC), s16);
      expect_eq("16x8 upper", rd(12), sad_blk(1, cand, 0, 0, 16, 8));
      expect_eq("8x16 left", rd(13), sad_blk(1, cand, 0, 0, 8, 16));
      expect_eq("8x8 sum", rd(10), s8sum);
      expect_eq("4x4 sum", rd(11), s4sum);
      expect_eq("SAD16 count", n_sad_ops, 16 + 8 + 16 + 16);
      expect_eq("nonzero cost", int'(s16 != 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
