// tb_asip_top: end-to-end test of the ASIP running motion estimation.
//
// A reference frame with a smooth texture and a current frame that is the
// reference moved by a known motion vector are placed in the external
// memory model.  A program for the core is generated here (an in-line
// assembler): it sets the SPRs, loads the search area and the macroblock
// with LD, and runs the adaptive search of the design's algorithm: test the
// predictors, stop if the best cost is under the threshold, otherwise use
// the square pattern alone (best cost under the median threshold) or the
// adaptive cross with a radius that shrinks each step until it is 2 and
// then the square pattern, re-centred until the centre is the best point.
// Each candidate is a 16x16 SAD computed by a loop of 16 SAD16.  The same
// search is run on a software model of the instruction semantics, and the
// best cost and best position in the core's registers are compared with it.
// Three runs take the three exits of the algorithm.  A second program
// checks 8-wide and 4-wide SAD16 addressing, DIV2, MOVC of the high byte,
// MOVR to and from SPRs and polling a running LD with J LDBUSY.
//
// Mechanisms counted (each must occur): LD/SAD16 interlock stalls, cycles
// in which the core executes while the AGU loads, taken and not-taken
// jumps, operand forwarding, SAD16 execute holds (each must last exactly
// 16/LANES cycles), the early exit, square-only and cross-to-square
// searches and radius decrements.
module tb_asip_top;
  import asip_pkg::*;

  localparam int LANES   = 1;
  localparam int SA_W    = 48, SA_H = 48;
  localparam int FW      = 96, FH = 96;        // frame size in pixels
  localparam int CUR_W   = 0;                  // current frame, word address
  localparam int REF_W   = 8192;               // reference frame, word address
  localparam int MB_X    = 32, MB_Y = 32;      // macroblock position
  localparam int MVX     = 3, MVY = -2;        // planted motion

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

  frame_memory_model #(.AW(20), .DEPTH(65536), .LATENCY(4), .STALL_PCT(20)) ext (
    .clk, .rst_n, .req(ext_req), .addr(ext_addr), .gnt(ext_gnt), .rvalid(ext_rvalid), .rdata(ext_rdata));

  initial begin
    #50000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ images
  function automatic int ref_pix(int x, int y);
    return ((x * x + 2 * y * y) / 48 + ((x ^ y) & 1)) & 255;
  endfunction
  function automatic int frame_pix(int base_w, int x, int y);
    logic [15:0] w;
    w = ext.mem[base_w + y * (FW / 2) + x / 2];
    return (x % 2) ? w[15:8] : w[7:0];
  endfunction

  task automatic fill_frames();
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x += 2) begin
        int cx0, cx1;
        ext.mem[REF_W + y * (FW / 2) + x / 2] = {8'(ref_pix(x + 1, y)), 8'(ref_pix(x, y))};
        cx0 = ref_pix(x + MVX, y + MVY); cx1 = ref_pix(x + 1 + MVX, y + MVY);
        ext.mem[CUR_W + y * (FW / 2) + x / 2] = {8'(cx1), 8'(cx0)};
      end
  endtask

  // search area origin in the reference frame: MB position - 16
  localparam int SA_X0 = MB_X - 16, SA_Y0 = MB_Y - 16;

  // --------------------------------------------------- instruction model
  function automatic int sad16x16(logic [15:0] cand);
    int s = 0;
    for (int dy = 0; dy < 16; dy++)
      for (int dx = 0; dx < 16; dx++) begin
        int sx, sy, a, b;
        sx = (int'(cand[15:8]) + dx) % 512; sy = (int'(cand[7:0]) + dy) % 512;
        a = frame_pix(CUR_W, MB_X + dx, MB_Y + dy);
        b = (sx < SA_W && sy < SA_H) ? frame_pix(REF_W, SA_X0 + sx, SA_Y0 + sy) : 0;
        s += (a > b) ? a - b : b - a;
      end
    return s & 16'hFFFF;
  endfunction

  // ------------------------------------------------------------ assembler
  logic [15:0] prog [$];
  int          patch_at [string][$];
  int          label_of [string];

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

  // register roles of the search program
  localparam logic [3:0] R256 = 0, RCAND = 1, RPTR = 2, RACC = 3, RCNT = 4, RONE = 5,
                         RBEST = 6, RBPOS = 7, RTMP = 8, RCTR = 11, RRAD = 12,
                         RTHR = 13, RMTHR = 14, RRADX = 15;
  int eval_id = 0;

  // 16x16 SAD of the candidate in RCAND; keep it if it beats RBEST
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

  function automatic logic [15:0] pos(int x, int y); return 16'(x * 256 + y); endfunction

  // the adaptive search program
  function automatic void gen_search(logic [15:0] preds [3], int radius, int thr, int mthr);
    prog.delete(); patch_at.delete(); label_of.delete(); eval_id = 0;
    set_spr(SPR_MB_BASE, 16'((CUR_W + (MB_Y * FW + MB_X) / 2) / 8));
    set_spr(SPR_SA_BASE, 16'((REF_W + (SA_Y0 * FW + SA_X0) / 2) / 8));
    set_spr(SPR_PITCH,   16'(FW / 16));
    emit(enc_ld(1'b1));                      // search area
    emit(enc_ld(1'b0));                      // macroblock: waits for the AGU
    movc16(RONE, 16'd1);
    emit(enc_movc(1'b0, R256, 8'd0)); emit(enc_movc(1'b1, R256, 8'd1));
    movc16(RBEST, 16'hFFFF);
    movc16(RTHR, 16'(thr));
    movc16(RMTHR, 16'(mthr));
    movc16(RRAD, 16'(radius));
    emit(enc_movc(1'b0, RRADX, 8'd0)); emit(enc_movc(1'b1, RRADX, 8'(radius)));
    for (int p = 0; p < 3; p++) begin
      movc16(RCAND, preds[p]);
      emit_eval();
    end
    emit(enc_rrr(OP_SUB, RTMP, RBEST, RTHR)); jmp(CC_C, "done");
    emit(enc_rrr(OP_SUB, RTMP, RBEST, RMTHR)); jmp(CC_C, "square");
    // adaptive cross
    emit(enc_movr({1'b0, RCTR}, {1'b0, RBPOS}));
    label("cross");
    emit(enc_rrr(OP_ADD, RCAND, RCTR, RRADX)); emit_eval();
    emit(enc_rrr(OP_SUB, RCAND, RCTR, RRADX)); emit_eval();
    emit(enc_rrr(OP_ADD, RCAND, RCTR, RRAD));  emit_eval();
    emit(enc_rrr(OP_SUB, RCAND, RCTR, RRAD));  emit_eval();
    emit(enc_movr({1'b0, RCTR}, {1'b0, RBPOS}));
    emit(enc_rrr(OP_SUB, RTMP, RBEST, RTHR)); jmp(CC_C, "done");
    emit(enc_movc(1'b0, RTMP, 8'd2));
    emit(enc_rrr(OP_SUB, RTMP, RTMP, RRAD)); jmp(CC_NC, "square");  // radius <= 2
    label("raddec");
    emit(enc_rrr(OP_SUB, RRAD, RRAD, RONE));
    emit(enc_rrr(OP_SUB, RRADX, RRADX, R256));
    jmp(CC_ALWAYS, "cross");
    // square pattern
    label("square");
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
    emit(enc_rrr(OP_SUB, RTMP, RBEST, RTHR)); jmp(CC_C, "done");
    emit(enc_rrr(OP_SUB, RTMP, RBPOS, RCTR)); jmp(CC_Z, "done");     // centre is best
    label("sqmove");
    emit(enc_movr({1'b0, RCTR}, {1'b0, RBPOS}));
    jmp(CC_ALWAYS, "sqloop");
    label("done");
    jmp(CC_ALWAYS, "done");
    resolve();
  endfunction

  // software model of the same search
  int m_cross_steps, m_raddec, m_square_iters;
  string m_exit;
  task automatic model_search(logic [15:0] preds [3], int radius, int thr, int mthr,
                              output int best, output logic [15:0] bpos);
    logic [15:0] ctr, radx, rad;
    best = 16'hFFFF; bpos = 0;
    m_cross_steps = 0; m_raddec = 0; m_square_iters = 0;
    rad = 16'(radius); radx = 16'(radius * 256);
    for (int p = 0; p < 3; p++) begin
      int s = sad16x16(preds[p]);
      if (s < best) begin best = s; bpos = preds[p]; end
    end
    if (best < thr) begin m_exit = "pred"; return; end
    if (!(best < mthr)) begin
      ctr = bpos;
      forever begin
        logic [15:0] c [4];
        c[0] = ctr + radx; c[1] = ctr - radx; c[2] = ctr + rad; c[3] = ctr - rad;
        m_cross_steps++;
        for (int k = 0; k < 4; k++) begin
          int s = sad16x16(c[k]);
          if (s < best) begin best = s; bpos = c[k]; end
        end
        ctr = bpos;
        if (best < thr) begin m_exit = "cross"; return; end
        if (!(2 < rad)) break;
        rad = rad - 1; radx = radx - 256; m_raddec++;
      end
    end
    ctr = bpos;
    forever begin
      logic [15:0] c [8];
      c[0] = ctr + 256; c[1] = ctr - 256; c[2] = ctr + 1; c[3] = ctr - 1;
      c[4] = ctr + 257; c[5] = ctr + 255; c[6] = ctr - 255; c[7] = ctr - 257;
      m_square_iters++;
      for (int k = 0; k < 8; k++) begin
        int s = sad16x16(c[k]);
        if (s < best) begin best = s; bpos = c[k]; end
      end
      if (best < thr) begin m_exit = "square_thr"; return; end
      if (bpos == ctr) begin m_exit = "square"; return; end
      ctr = bpos;
    end
  endtask

  // -------------------------------------------------------- monitors
  int n_ld_stall, n_sad_stall, n_overlap, n_jtaken, n_jnot, n_fwd, n_sad_ops, n_sad_bad;
  int n_hit_raddec, n_hit_square, n_hit_cross, n_hit_sqmove;
  int hold_len;
  always @(posedge clk) if (rst_n && run) begin
    if (dut.id_stall && dut.id_ctrl.is_ld)  n_ld_stall++;
    if (dut.id_stall && dut.id_ctrl.is_sad) n_sad_stall++;
    if (dut.agu_busy && dut.ex.valid && !dut.ex.is_ld && !dut.ex.is_sad) n_overlap++;
    if (dut.id_ctrl.is_jump && !dut.stall) begin
      if (dut.jump) n_jtaken++; else n_jnot++;
    end
    if (dut.wr_en && !dut.stall &&
        ((dut.id_ctrl.use_alu && (dut.wr_addr == dut.id_ctrl.rs_a ||
                                  dut.wr_addr == {1'b0, dut.id_ctrl.rs_b})))) n_fwd++;
    if (dut.ex.valid && dut.ex.is_sad) begin
      hold_len++;
      if (dut.sad_last) begin
        n_sad_ops++;
        if (hold_len != 16 / LANES) n_sad_bad++;
        hold_len = 0;
      end
    end
    if (dut.id_valid && !dut.stall) begin
      if (label_of.exists("raddec") && dut.id_pc == 8'(label_of["raddec"])) n_hit_raddec++;
      if (label_of.exists("square") && dut.id_pc == 8'(label_of["square"])) n_hit_square++;
      if (label_of.exists("cross")  && dut.id_pc == 8'(label_of["cross"]))  n_hit_cross++;
      if (label_of.exists("sqmove") && dut.id_pc == 8'(label_of["sqmove"])) n_hit_sqmove++;
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic load_and_run(int max_cycles, output int cycles);
    run = 0; rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    if (prog.size() > 256) begin failures++; $display("FAIL program too long: %0d", prog.size()); end
    foreach (prog[i]) begin
      @(negedge clk); pm_we = 1; pm_waddr = 8'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 0; run = 1;
    cycles = 0;
    while (!halted && cycles < max_cycles) begin @(posedge clk); cycles++; end
    @(negedge clk); run = 0;
    checks++;
    if (!halted) begin failures++; $display("FAIL program did not halt"); end
  endtask

  function automatic logic [15:0] rd_reg(int r);
    return dut.regs[r];
  endfunction

  task automatic search_case(string name, logic [15:0] preds [3], int radius, int thr, int mthr,
                             string exp_exit);
    int best, cyc, rc, rs, rr;
    logic [15:0] bpos;
    int hw_best, hw_pos;
    rc = n_hit_cross; rs = n_hit_square; rr = n_hit_raddec;
    gen_search(preds, radius, thr, mthr);
    model_search(preds, radius, thr, mthr, best, bpos);
    load_and_run(200000, cyc);
    hw_best = rd_reg(RBEST); hw_pos = rd_reg(RBPOS);
    $display("%s: %0d words, %0d cycles, best SAD %0d at (%0d,%0d), model %0d at (%0d,%0d), exit %s, cross steps %0d, square iterations %0d",
             name, prog.size(), cyc, hw_best, hw_pos >> 8, hw_pos & 255, best, bpos[15:8], bpos[7:0],
             m_exit, m_cross_steps, m_square_iters);
    checks += 3;
    if (hw_best != best) begin failures++; $display("FAIL %s best SAD", name); end
    if (hw_pos != bpos) begin failures++; $display("FAIL %s best position", name); end
    if (m_exit != exp_exit) begin failures++; $display("FAIL %s took exit %s, wanted %s", name, m_exit, exp_exit); end
    // the core must have gone the same way as the model
    checks += 2;
    if ((n_hit_cross - rc) != (m_cross_steps > 0 ? m_cross_steps : 0)) begin
      failures++; $display("FAIL %s cross steps %0d", name, n_hit_cross - rc);
    end
    if ((n_hit_raddec - rr) != m_raddec) begin
      failures++; $display("FAIL %s radius decrements %0d, model %0d", name, n_hit_raddec - rr, m_raddec);
    end
  endtask

  // ------------------------------------------------- feature program
  task automatic feature_case();
    int cyc, polls;
    logic [15:0] v;
    int e8, e4, e8b;
    prog.delete(); patch_at.delete(); label_of.delete();
    set_spr(SPR_MB_BASE, 16'((CUR_W + (MB_Y * FW + MB_X) / 2) / 8));
    set_spr(SPR_SA_BASE, 16'((REF_W + (SA_Y0 * FW + SA_X0) / 2) / 8));
    set_spr(SPR_PITCH,   16'(FW / 16));
    emit(enc_ld(1'b1));
    movc16(9, 16'd0);                         // poll counter
    movc16(RONE, 16'd1);
    label("poll");
    emit(enc_rrr(OP_ADD, 9, 9, RONE));
    jmp(CC_LDBUSY, "poll");
    emit(enc_ld(1'b0));
    // 8x8 block at MB offset (8,0), candidate (18,14): 4 SAD16
    movc16(RTMP, 16'd8); emit(enc_movr(SPR_BLKW, 5'd8));
    movc16(RCAND, pos(18, 14)); movc16(12, pos(8, 0)); movc16(RACC, 16'd0);
    for (int i = 0; i < 4; i++) emit(enc_rrr(OP_SAD16, RACC, RCAND, 12));
    // 4x4 block at MB offset (4,12), candidate (17,15): 1 SAD16
    movc16(RTMP, 16'd4); emit(enc_movr(SPR_BLKW, 5'd8));
    movc16(RCAND, pos(17, 15)); movc16(RPTR, pos(4, 12)); movc16(10, 16'd100);
    emit(enc_rrr(OP_SAD16, 10, RCAND, RPTR));
    // DIV2 of a negative and a positive value, MOVC of the high byte
    movc16(14, 16'hFFF7);                     // -9
    emit(enc_rrr(OP_DIV2, 13, 14, 0));
    emit(enc_movc(1'b0, 15, 8'h34)); emit(enc_movc(1'b1, 15, 8'h12));
    emit(enc_rrr(OP_DIV2, 15, 15, 0));
    emit(enc_movr(5'd20, 5'd15));             // GPR -> spare SPR
    emit(enc_movr(5'd11, 5'd20));             // SPR -> GPR
    label("end"); jmp(CC_ALWAYS, "end");
    resolve();
    load_and_run(20000, cyc);
    e8 = 0; e4 = 100;
    for (int dy = 0; dy < 8; dy++) for (int dx = 0; dx < 8; dx++) begin
      int a, b;
      a = frame_pix(CUR_W, MB_X + 8 + dx, MB_Y + dy);
      b = frame_pix(REF_W, SA_X0 + 18 + 8 + dx, SA_Y0 + 14 + dy);
      e8 += (a > b) ? a - b : b - a;
    end
    for (int dy = 0; dy < 4; dy++) for (int dx = 0; dx < 4; dx++) begin
      int a, b;
      a = frame_pix(CUR_W, MB_X + 4 + dx, MB_Y + 12 + dy);
      b = frame_pix(REF_W, SA_X0 + 17 + 4 + dx, SA_Y0 + 15 + 12 + dy);
      e4 += (a > b) ? a - b : b - a;
    end
    polls = rd_reg(9);
    $display("features: %0d cycles, LD polled %0d times, SAD8x8=%0d (exp %0d), SAD4x4+100=%0d (exp %0d)",
             cyc, polls, rd_reg(RACC), e8, rd_reg(10), e4);
    checks += 9;
    if (rd_reg(RACC) != e8)        begin failures++; $display("FAIL 8x8 SAD"); end
    if (rd_reg(12) != pos(8, 8))   begin failures++; $display("FAIL 8-wide pointer update"); end
    if (rd_reg(RPTR) != pos(4, 16)) begin failures++; $display("FAIL 4-wide pointer update"); end
    if (rd_reg(10) != e4)          begin failures++; $display("FAIL 4x4 SAD"); end
    if (rd_reg(13) != 16'hFFFB)    begin failures++; $display("FAIL DIV2 negative"); end
    if (rd_reg(15) != 16'h091A)    begin failures++; $display("FAIL MOVC high byte / DIV2"); end
    if (rd_reg(11) != 16'h091A || rd_reg(20) != 16'h091A) begin failures++; $display("FAIL MOVR SPR"); end
    if (rd_reg(SPR_BLKW) != 16'd4) begin failures++; $display("FAIL SPR write"); end
    if (polls < 100)               begin failures++; $display("FAIL LD poll count %0d", polls); end
  endtask

  initial begin
    logic [15:0] p_near [3], p_far [3];
    pm_we = 0; pm_waddr = 0; pm_wdata = 0; dbg_addr = 0;
    fill_frames();
    // predictors as search-area positions (zero MV is (16,16))
    p_near = '{pos(16, 16), pos(18, 15), pos(12, 19)};
    p_far  = '{pos(16, 16), pos(12, 20), pos(20, 20)};
    search_case("early exit",  p_near, 4, 60000, 60000, "pred");
    search_case("square only", p_far,  4, 0, 60000, "square");
    search_case("cross+square", p_far, 4, 0, 0, "square");
    search_case("converge", p_near, 4, 1, 60000, "square_thr");
    checks++;
    if (rd_reg(RBPOS) != pos(16 + MVX, 16 + MVY) || rd_reg(RBEST) != 0) begin
      failures++; $display("FAIL planted motion not found");
    end
    feature_case();

    // the debug port shows the registers
    for (int r = 0; r < 24; r++) begin
      dbg_addr = 5'(r); #1;
      checks++;
      if (dbg_data !== dut.regs[r]) begin failures++; $display("FAIL debug port r%0d", r); end
    end
    $display("mechanisms: LD stalls %0d, SAD16 stalls %0d, overlap cycles %0d, jumps taken %0d / not %0d, forwards %0d, SAD16 ops %0d (bad length %0d), cross steps %0d, radius decrements %0d, square entries %0d, square moves %0d",
             n_ld_stall, n_sad_stall, n_overlap, n_jtaken, n_jnot, n_fwd, n_sad_ops, n_sad_bad,
             n_hit_cross, n_hit_raddec, n_hit_square, n_hit_sqmove);
    checks += 11;
    if (n_ld_stall == 0)   begin failures++; $display("FAIL no LD interlock"); end
    if (n_sad_stall == 0)  begin failures++; $display("FAIL no SAD16 interlock"); end
    if (n_overlap == 0)    begin failures++; $display("FAIL no LD overlap"); end
    if (n_jtaken == 0)     begin failures++; $display("FAIL no taken jump"); end
    if (n_jnot == 0)       begin failures++; $display("FAIL no untaken jump"); end
    if (n_fwd == 0)        begin failures++; $display("FAIL no forwarding"); end
    if (n_sad_ops == 0 || n_sad_bad != 0) begin failures++; $display("FAIL SAD16 timing"); end
    if (n_hit_cross == 0)  begin failures++; $display("FAIL no cross step"); end
    if (n_hit_raddec == 0) begin failures++; $display("FAIL no radius decrement"); end
    if (n_hit_square == 0) begin failures++; $display("FAIL no square pattern"); end
    if (n_hit_sqmove == 0) begin failures++; $display("FAIL no square re-centring"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
