// agu: address generation unit of the ASIP.
//
// Two jobs, both dedicated to motion estimation:
//
// 1. LD.  On ld_start the AGU copies a whole image area from the external
//    frame memory into the local data memory, on its own, while the core
//    keeps executing.  t = 0 loads the 16x16 macroblock whose origin is
//    SPR MB_BASE, t = 1 the SA_W x SA_H search area whose origin is SPR
//    SA_BASE.  Origins and the line pitch (SPR PITCH) are in units of 16
//    pixels, i.e. of 8 external words of two pixels each.  Requests go out
//    in raster order on a request/grant port (one word per granted cycle);
//    read data returns in order, any number of cycles later, flagged by
//    ext_rvalid, and is written straight into the local memory.  `busy`
//    stays high until the last word has been written.
//
// 2. SAD16 pixel addressing.  From the candidate-block origin (cand, x in
//    [15:8], y in [7:0], search-area coordinates), the line pointer inside
//    the block (ptr, same packing) and the block width (SPR BLKW: 16, 8 or
//    4; anything else counts as 16), it computes which 16 pixels one SAD16
//    covers: one line of a 16-wide block, two lines of an 8-wide block or
//    four lines of a 4-wide block.  In SADU step s lane l handles pixel
//    p = s*LANES + l at (ptr.x + p mod W, ptr.y + p div W) of the MB and
//    the same offset from cand in the search area.  Pixels outside the
//    search area read as 0.  `lines` (16/W) is the amount the ALU adds to
//    the pointer.  This path is combinational.
//
// That the AGU fetches MB and search area independently, in parallel with
// the core, and computes the SAD16 pixel addresses follows the document;
// the memory port, SPR roles, address units and coordinate packing are this
// design's choices.
module agu #(
  parameter int unsigned SA_W   = 48,
  parameter int unsigned SA_H   = 48,
  parameter int unsigned LANES  = 1,
  parameter int unsigned EXT_AW = 20,
  parameter int unsigned CYCLES = 16 / LANES,
  parameter int unsigned SW     = (CYCLES > 1) ? $clog2(CYCLES) : 1,
  parameter int unsigned WIW    = $clog2(SA_W * SA_H / 2),
  parameter int unsigned SAA    = $clog2(SA_W * SA_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // LD control
  input  logic              ld_start,
  input  logic              ld_t,
  input  logic [15:0]       mb_base,
  input  logic [15:0]       sa_base,
  input  logic [15:0]       pitch,
  output logic              busy,
  // external frame memory
  output logic              ext_req,
  output logic [EXT_AW-1:0] ext_addr,
  input  logic              ext_gnt,
  input  logic              ext_rvalid,
  input  logic [15:0]       ext_rdata,
  // local memory write
  output logic              wr_en,
  output logic              wr_sa,
  output logic [WIW-1:0]    wr_idx,
  output logic [15:0]       wr_data,
  // SAD16 addressing
  input  logic [15:0]       cand,
  input  logic [15:0]       ptr,
  input  logic [15:0]       blkw,
  input  logic [SW-1:0]     step,
  output logic [7:0]        mb_addr  [LANES],
  output logic [SAA-1:0]    sa_addr  [LANES],
  input  logic [7:0]        mb_pix   [LANES],
  input  logic [7:0]        sa_pix   [LANES],
  output logic [7:0]        cur_pix  [LANES],
  output logic [7:0]        cand_pix [LANES],
  output logic [15:0]       lines
);
  localparam int unsigned SA_WPL = SA_W / 2;     // words per search-area line
  localparam int unsigned MB_WPL = 8;            // words per MB line
  localparam int unsigned CW     = $clog2(SA_W * SA_H / 2 + 1);

  // ------------------------------------------------------------------ LD
  logic              t_q;
  logic [EXT_AW-1:0] row_addr, pitch_w;
  logic [7:0]        word_in_row;
  logic [CW-1:0]     issued, received, total;
  logic [7:0]        wpl;

  assign wpl      = t_q ? 8'(SA_WPL) : 8'(MB_WPL);
  assign ext_req  = busy && (issued != total);
  assign ext_addr = row_addr + EXT_AW'(word_in_row);
  assign wr_en    = busy && ext_rvalid;
  assign wr_sa    = t_q;
  assign wr_idx   = WIW'(received);
  assign wr_data  = ext_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      t_q         <= 1'b0;
      row_addr    <= '0;
      pitch_w     <= '0;
      word_in_row <= '0;
      issued      <= '0;
      received    <= '0;
      total       <= '0;
    end else if (!busy) begin
      if (ld_start) begin
        busy        <= 1'b1;
        t_q         <= ld_t;
        row_addr    <= EXT_AW'({ld_t ? sa_base : mb_base, 3'b000});
        pitch_w     <= EXT_AW'({pitch, 3'b000});
        word_in_row <= '0;
        issued      <= '0;
        received    <= '0;
        total       <= ld_t ? CW'(SA_WPL * SA_H) : CW'(MB_WPL * 16);
      end
    end else begin
      if (ext_req && ext_gnt) begin
        issued <= issued + 1'b1;
        if (word_in_row == wpl - 1'b1) begin
          word_in_row <= '0;
          row_addr    <= row_addr + pitch_w;
        end else begin
          word_in_row <= word_in_row + 1'b1;
        end
      end
      if (ext_rvalid) begin
        received <= received + 1'b1;
        if (received == total - 1'b1) busy <= 1'b0;
      end
    end
  end

  // --------------------------------------------------------- SAD16 addresses
  logic [1:0]  wlog;   // log2(W) - 2
  logic        sa_in [LANES];
  logic [4:0]  wmask;
  always_comb begin
    unique case (blkw)
      16'd8:   wlog = 2'd1;
      16'd4:   wlog = 2'd0;
      default: wlog = 2'd2;
    endcase
    wmask = 5'((32'd4 << wlog) - 1);
    lines = 16'd4 >> wlog;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [4:0] p, dx, dy;
      logic [3:0] mx, my;
      logic [8:0] sx, sy;
      p  = 5'(32'(step) * LANES + l);
      dx = p & wmask;
      dy = p >> (3'(wlog) + 3'd2);
      mx = 4'(ptr[15:8] + 8'(dx));
      my = 4'(ptr[7:0]  + 8'(dy));
      sx = 9'(cand[15:8]) + 9'(ptr[15:8]) + 9'(dx);
      sy = 9'(cand[7:0])  + 9'(ptr[7:0])  + 9'(dy);
      mb_addr[l]  = {my, mx};
      sa_addr[l]  = SAA'(32'(sy) * SA_W + 32'(sx));
      sa_in[l]    = (32'(sx) < SA_W) && (32'(sy) < SA_H);
    end
  end

  // pixels handed to the SADU; outside the search area they read as 0
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      cur_pix[l]  = mb_pix[l];
      cand_pix[l] = sa_in[l] ? sa_pix[l] : 8'h00;
    end
  end
endmodule
