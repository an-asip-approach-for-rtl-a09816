// program_memory: instruction store of the ASIP.
//
// DEPTH words of 16 bits.  The read is synchronous: the word at rd_addr
// appears on rd_data after the next rising edge when rd_en is high, and is
// held otherwise, so the output register doubles as the instruction register
// (IR) of the fetch stage.  A separate write port lets a host load the
// program while the core is stopped.  The depth follows from the 8-bit
// #addr field of J; the host write port is this design's own addition.
module program_memory #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [15:0]   rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [15:0]   wr_data
);
  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
