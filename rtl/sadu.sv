// sadu: sum-of-absolute-differences unit of the ASIP.
//
// Executes the arithmetic of one SAD16 instruction: 16 pixel pairs (MB
// pixel, candidate pixel) are compared, the absolute differences summed and
// added to the accumulator value taken from the destination GPR.  LANES
// pairs are handled per cycle, so SAD16 occupies CYCLES = 16/LANES cycles;
// the default of one lane gives the sixteen cycles quoted for the slowest,
// smallest form of the unit, and LANES trades area for speed.  LANES must
// divide 16 and be at most 8 (the first SAD16 cycle is reserved for the
// pointer write-back, the last one for the accumulator write-back).
//
// Interface: `go` is high in every cycle a SAD16 occupies the execute
// stage.  `step` tells the AGU which group of LANES pixels to deliver in
// the current cycle; on the cycle with `last` high, `result` holds
// acc_in + SAD over all 16 pairs (modulo 2^16) and the instruction ends.
// The accumulator holds its value while `go` is low.
module sadu #(
  parameter int unsigned LANES  = 1,
  parameter int unsigned CYCLES = 16 / LANES,
  parameter int unsigned SW     = (CYCLES > 1) ? $clog2(CYCLES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  logic [15:0]   acc_in,
  input  logic [7:0]    cur_pix  [LANES],
  input  logic [7:0]    cand_pix [LANES],
  output logic [SW-1:0] step,
  output logic          last,
  output logic [15:0]   result
);
  logic [SW-1:0] cnt;
  logic [15:0]   acc_q;
  logic [15:0]   partial;

  initial begin
    assert (LANES >= 1 && LANES <= 8 && (16 % LANES) == 0)
      else $error("sadu: LANES must divide 16 and be at most 8");
  end

  always_comb begin
    partial = '0;
    for (int l = 0; l < LANES; l++) begin
      partial += {8'h00, (cur_pix[l] > cand_pix[l]) ? (cur_pix[l] - cand_pix[l])
                                                     : (cand_pix[l] - cur_pix[l])};
    end
  end

  assign step   = cnt;
  assign last   = go && (cnt == SW'(CYCLES - 1));
  assign result = ((cnt == '0) ? acc_in : acc_q) + partial;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      acc_q <= '0;
    end else if (go) begin
      acc_q <= result;
      cnt   <= last ? '0 : cnt + 1'b1;
    end
  end
endmodule
