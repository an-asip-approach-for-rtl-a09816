// alu: arithmetic unit of the ASIP.
//
// Combinational.  ADD and SUB serve address arithmetic and the comparison
// of ME costs; DIV2 halves a value (arithmetic shift right, so it also
// halves signed motion-vector components); PASS forwards operand A for
// MOVR.  During SAD16 the same adder moves the line pointer of the
// candidate block on.  Flags: z = result zero, n = result bit 15,
// c = carry out of ADD, borrow of SUB (a < b unsigned), bit shifted out by
// DIV2.  The operations follow the instruction set; the flag set and the
// signed shift are this design's choices.
module alu
  import asip_pkg::*;
(
  input  alu_op_e       op,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] y,
  output flags_t        flags
);
  logic [DW:0] wide;

  always_comb begin
    wide = '0;
    unique case (op)
      ALU_ADD:  wide = {1'b0, a} + {1'b0, b};
      ALU_SUB:  wide = {1'b0, a} - {1'b0, b};
      ALU_DIV2: wide = {a[0], a[DW-1], a[DW-1:1]};
      ALU_PASS: wide = {1'b0, a};
      default:  wide = '0;
    endcase
    y       = wide[DW-1:0];
    flags.z = (wide[DW-1:0] == '0);
    flags.n = wide[DW-1];
    flags.c = wide[DW];
  end
endmodule
