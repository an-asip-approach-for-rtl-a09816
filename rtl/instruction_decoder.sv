// instruction_decoder: hardwired decoder of the ASIP (ID stage).
//
// Every instruction is one 16-bit word with the opcode in bits [15:13], so
// decoding is a small combinational table.  Field layout used here:
//   LD    000 t ------------            t: 0 = macroblock, 1 = search area
//   J     001 cc[12:10] -- addr[7:0]
//   MOVR  010 Rd[12:8] --- Rs[4:0]      5-bit fields reach GPRs and SPRs
//   MOVC  011 t Rd[11:8] const[7:0]     t=0: Rd = const (zero-extended)
//                                       t=1: Rd[15:8] = const, Rd[7:0] kept
//   SAD16 100 - Rd Rs1 Rs2              Rd += SAD; Rs1 candidate origin;
//                                       Rs2 line pointer (updated)
//   DIV2  101 - Rd Rs ----              Rd = Rs >>> 1
//   ADD   110 - Rd Rs1 Rs2              Rd = Rs1 + Rs2
//   SUB   111 - Rd Rs1 Rs2              Rd = Rs1 - Rs2
// The opcodes, the t bit of LD/MOVC, the 8-bit constant and the operand
// fields follow the instruction-set table of the design; the width of cc,
// the meaning of t for MOVC and the SAD16 operand roles are this design's.
// The jump condition is evaluated here against the flags the execute stage
// is producing this very cycle (forwarded), so a J right after a SUB sees
// its result; the taken output is gated by the caller with the stall.
module instruction_decoder
  import asip_pkg::*;
(
  input  logic        valid,     // IR holds a live instruction
  input  logic [15:0] ir,
  input  flags_t      flags,     // flags as seen by this instruction
  input  logic        ld_busy,   // an LD is still running
  output ctrl_t       ctrl,
  output logic        jump_taken
);
  opcode_e op;
  logic    cond;

  assign op = opcode_e'(ir[15:13]);

  always_comb begin
    ctrl           = '0;
    ctrl.valid     = valid;
    ctrl.op        = op;
    ctrl.t         = ir[12];
    ctrl.imm       = ir[7:0];
    ctrl.cc        = cond_e'(ir[12:10]);
    ctrl.rd        = {1'b0, ir[11:8]};
    ctrl.rs_a      = {1'b0, ir[7:4]};
    ctrl.rs_b      = ir[3:0];
    ctrl.alu_op    = ALU_PASS;
    ctrl.res_sel   = RES_ALU;
    unique case (op)
      OP_LD:    ctrl.is_ld = valid;
      OP_J:     ctrl.is_jump = valid;
      OP_MOVR: begin
        ctrl.rd      = ir[12:8];
        ctrl.rs_a    = ir[4:0];
        ctrl.we      = valid;
        ctrl.use_alu = valid;
        ctrl.alu_op  = ALU_PASS;
      end
      OP_MOVC: begin
        ctrl.we      = valid;
        ctrl.res_sel = RES_CONST;
      end
      OP_SAD16: begin
        ctrl.is_sad  = valid;
        ctrl.use_alu = valid;
        ctrl.alu_op  = ALU_ADD;
        ctrl.res_sel = RES_SADU;
      end
      OP_DIV2: begin
        ctrl.we        = valid;
        ctrl.use_alu   = valid;
        ctrl.alu_op    = ALU_DIV2;
        ctrl.set_flags = valid;
      end
      OP_ADD, OP_SUB: begin
        ctrl.we        = valid;
        ctrl.use_alu   = valid;
        ctrl.alu_op    = (op == OP_ADD) ? ALU_ADD : ALU_SUB;
        ctrl.set_flags = valid;
      end
      default: ;
    endcase
  end

  always_comb begin
    unique case (cond_e'(ir[12:10]))
      CC_ALWAYS: cond = 1'b1;
      CC_Z:      cond = flags.z;
      CC_NZ:     cond = !flags.z;
      CC_C:      cond = flags.c;
      CC_NC:     cond = !flags.c;
      CC_N:      cond = flags.n;
      CC_NN:     cond = !flags.n;
      CC_LDBUSY: cond = ld_busy;
      default:   cond = 1'b0;
    endcase
  end

  assign jump_taken = valid && (op == OP_J) && cond;
endmodule
