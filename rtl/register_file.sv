// register_file: sixteen 16-bit general purpose registers and eight
// special purpose registers of the ASIP.
//
// Registers 0..15 are the GPRs, 16..23 the SPRs; addresses 24..31 read as
// zero and ignore writes.  As in the datapath drawing, the file is read
// through wide buses rather than numbered ports: `regs` shows all 32
// register slots (32x16) and `gprs` the sixteen GPRs (16x16); the operand
// multiplexers in front of the execute stage pick from them.  One write
// port, written at the rising edge.  Reset clears every register (the
// reset value is this design's choice).
module register_file
  import asip_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [RAW-1:0]  waddr,
  input  logic [DW-1:0]   wdata,
  output logic [DW-1:0]   regs [32],
  output logic [DW-1:0]   gprs [NGPR]
);
  logic [DW-1:0] r [NGPR+NSPR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NGPR + NSPR; i++) r[i] <= '0;
    end else if (we && (waddr < RAW'(NGPR + NSPR))) begin
      r[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < 32; i++) regs[i] = (i < NGPR + NSPR) ? r[i] : '0;
    for (int i = 0; i < NGPR; i++) gprs[i] = r[i];
  end
endmodule
