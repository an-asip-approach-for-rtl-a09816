// tb_agu: self-checking test of the address generation unit.
// LD part: the external memory model (random grant stalls, 3-cycle
// latency) is filled with random words; LD t=0 and t=1 are started with
// random origins and pitch, every word the AGU writes into the local memory
// is compared with the word the origin/pitch arithmetic says it must be,
// the word count is checked, busy must fall right after the last word, and
// the AGU must ignore a start while busy.
// SAD16 part: for random candidate origins, line pointers, block widths and
// SADU steps, the MB and search-area pixel addresses, the out-of-area rule
// and the pointer increment are compared with an independent model.
module tb_agu;
  localparam int SA_W = 48, SA_H = 48, L = 2, AW = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_start, ld_t, busy, ext_req, ext_gnt, ext_rvalid, wr_en, wr_sa;
  logic [15:0] mb_base, sa_base, pitch, ext_rdata, wr_data, cand, ptr, blkw, lines;
  logic [AW-1:0] ext_addr;
  logic [10:0] wr_idx;
  logic [2:0] step;
  logic [7:0] mb_addr [L]; logic [11:0] sa_addr [L];
  logic [7:0] mb_pix [L], sa_pix [L], cur_pix [L], cand_pix [L];

  agu #(.SA_W(SA_W), .SA_H(SA_H), .LANES(L), .EXT_AW(AW)) dut (
    .clk, .rst_n, .ld_start, .ld_t, .mb_base, .sa_base, .pitch, .busy,
    .ext_req, .ext_addr, .ext_gnt, .ext_rvalid, .ext_rdata,
    .wr_en, .wr_sa, .wr_idx, .wr_data,
    .cand, .ptr, .blkw, .step, .mb_addr, .sa_addr, .mb_pix, .sa_pix, .cur_pix, .cand_pix, .lines);

  frame_memory_model #(.AW(AW), .DEPTH(65536), .LATENCY(3), .STALL_PCT(30)) ext (
    .clk, .rst_n, .req(ext_req), .addr(ext_addr), .gnt(ext_gnt), .rvalid(ext_rvalid), .rdata(ext_rdata));

  // pixels the local memory would return: a fixed function of the address
  always_comb for (int l = 0; l < L; l++) begin
    mb_pix[l] = mb_addr[l] ^ 8'h5A;
    sa_pix[l] = sa_addr[l][7:0] + 8'(sa_addr[l][11:8] * 7);
  end

  // a request must stay put until it is granted
  property p_req_hold;
    @(posedge clk) disable iff (!rst_n) (ext_req && !ext_gnt) |=> (ext_req && $stable(ext_addr));
  endproperty
  a_req_hold: assert property (p_req_hold) else failures++;

  initial begin
    #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_ld(logic t);
    int words, wpl, lines_n, got; logic [15:0] base;
    int idx_seen [int];
    mb_base = 16'($urandom_range(0, 200)); sa_base = 16'($urandom_range(0, 200));
    pitch = 16'($urandom_range(4, 22));
    wpl = t ? SA_W/2 : 8; lines_n = t ? SA_H : 16; words = wpl * lines_n;
    base = t ? sa_base : mb_base;
    @(negedge clk); ld_start = 1; ld_t = t;
    @(negedge clk); ld_start = 0;
    checks++; if (!busy) begin failures++; $display("FAIL busy not set"); end
    // a second start while busy must be ignored
    ld_start = 1; ld_t = !t; mb_base = 16'hFFFF; sa_base = 16'hFFFF;
    @(negedge clk); ld_start = 0;
    got = 0;
    while (busy) begin
      @(posedge clk); #1;
      if (wr_en) begin
        int line, w, ea;
        line = int'(wr_idx) / wpl; w = int'(wr_idx) % wpl;
        ea = int'(base) * 8 + line * int'(pitch) * 8 + w;
        checks++;
        if (wr_sa !== t || int'(wr_idx) != got || wr_data !== ext.mem[ea % 65536]) begin
          failures++;
          $display("FAIL ld t=%0d idx=%0d (exp %0d) data=%h exp %h", t, wr_idx, got, wr_data, ext.mem[ea % 65536]);
        end
        got++;
      end
      if (got > words + 5) break;
    end
    checks++;
    if (got != words) begin failures++; $display("FAIL ld t=%0d wrote %0d words, exp %0d", t, got, words); end
  endtask

  initial begin
    ld_start = 0; ld_t = 0; mb_base = 0; sa_base = 0; pitch = 22;
    cand = 0; ptr = 0; blkw = 16; step = 0;
    for (int i = 0; i < 65536; i++) ext.mem[i] = 16'($urandom);
    #22 rst_n = 1;
    for (int n = 0; n < 4; n++) begin do_ld(0); do_ld(1); end

    for (int n = 0; n < 3000; n++) begin
      int w, cx, cy, px, py;
      blkw = (n % 4 == 0) ? 16'd16 : (n % 4 == 1) ? 16'd8 : (n % 4 == 2) ? 16'd4 : 16'($urandom_range(0, 40));
      w = (blkw == 8) ? 8 : (blkw == 4) ? 4 : 16;
      cx = $urandom_range(0, 40); cy = $urandom_range(0, 40);
      if (n % 17 == 0) cy = 250;   // far outside the search area
      px = $urandom_range(0, 15); py = $urandom_range(0, 15);
      cand = 16'(cx * 256 + cy); ptr = 16'(px * 256 + py); step = 3'($urandom);
      #1;
      checks++;
      if (lines !== 16'(16 / w)) begin failures++; $display("FAIL lines %0d w=%0d", lines, w); end
      for (int l = 0; l < L; l++) begin
        int p, dx, dy, mx, my, sx, sy;
        logic [7:0] e_cur, e_cand;
        p = int'(step) * L + l; dx = p % w; dy = p / w;
        mx = (px + dx) % 16; my = (py + dy) % 16;
        sx = (cx + px + dx) % 512; sy = (cy + py + dy) % 512;
        e_cur = 8'(my * 16 + mx) ^ 8'h5A;
        e_cand = (sx < SA_W && sy < SA_H) ? 8'((sy * SA_W + sx) % 256) + 8'(((sy * SA_W + sx) / 256) * 7) : 8'h00;
        checks++;
        if (cur_pix[l] !== e_cur || cand_pix[l] !== e_cand) begin
          failures++;
          $display("FAIL sad lane %0d w=%0d c=(%0d,%0d) p=(%0d,%0d) step=%0d cur %h/%h cand %h/%h",
                   l, w, cx, cy, px, py, step, cur_pix[l], e_cur, cand_pix[l], e_cand);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
