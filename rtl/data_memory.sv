// data_memory: local pixel memory of the ASIP.
//
// Holds the current macroblock (16x16 pixels) and its search area
// (SA_W x SA_H pixels), one byte per pixel, stored row by row.  Both areas
// are filled by the AGU through a 16-bit write port, two horizontally
// adjacent pixels per word (even pixel in bits [7:0]); wr_sa selects the
// area and wr_idx is the word index inside it.  For SAD16 the memory has
// LANES asynchronous byte read ports into each area.  Holding the MB and
// the search area follows the document; the search-area size (+/-16 pixel
// range, 48x48) and the port organisation are this design's choices.
module data_memory #(
  parameter int unsigned SA_W   = 48,
  parameter int unsigned SA_H   = 48,
  parameter int unsigned LANES  = 1,
  parameter int unsigned MB_WORDS = 128,                     // 16*16/2
  parameter int unsigned SA_WORDS = SA_W * SA_H / 2,
  parameter int unsigned WIW    = $clog2(SA_WORDS),          // word index width
  parameter int unsigned MBA    = 8,                         // MB byte address width
  parameter int unsigned SAA    = $clog2(SA_W * SA_H)        // SA byte address width
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic           wr_sa,
  input  logic [WIW-1:0] wr_idx,
  input  logic [15:0]    wr_data,
  input  logic [MBA-1:0] mb_addr  [LANES],
  input  logic [SAA-1:0] sa_addr  [LANES],
  output logic [7:0]     mb_pix   [LANES],
  output logic [7:0]     sa_pix   [LANES]
);
  logic [15:0] mb_mem [MB_WORDS];
  logic [15:0] sa_mem [SA_WORDS];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_sa && (32'(wr_idx) < MB_WORDS)) mb_mem[wr_idx[6:0]] <= wr_data;
    if (wr_en &&  wr_sa && (32'(wr_idx) < SA_WORDS)) sa_mem[wr_idx] <= wr_data;
  end

  logic [15:0] mb_word [LANES];
  logic [15:0] sa_word [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      mb_word[l] = mb_mem[mb_addr[l][MBA-1:1]];
      sa_word[l] = (32'(sa_addr[l][SAA-1:1]) < SA_WORDS) ? sa_mem[sa_addr[l][SAA-1:1]] : 16'h0000;
      mb_pix[l]  = mb_addr[l][0] ? mb_word[l][15:8] : mb_word[l][7:0];
      sa_pix[l]  = sa_addr[l][0] ? sa_word[l][15:8] : sa_word[l][7:0];
    end
  end
endmodule
