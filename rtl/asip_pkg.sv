// asip_pkg: types and constants shared by the motion-estimation ASIP.
//
// The instruction word is 16 bits in a fixed format with a 3-bit opcode in
// bits [15:13]; the eight opcodes and their order follow the instruction-set
// table of the design.  Field positions inside each format are partly this
// design's reading (see instruction_decoder.sv).  The register address space
// is 5 bits: 0..15 are the sixteen GPRs, 16..23 the eight SPRs.  The roles
// given to the SPRs, the jump condition codes and the flag set are this
// design's own choices.
package asip_pkg;

  localparam int unsigned DW       = 16;  // register / datapath width
  localparam int unsigned NGPR     = 16;
  localparam int unsigned NSPR     = 8;
  localparam int unsigned RAW      = 5;   // register address width (GPR+SPR)
  localparam int unsigned PAW      = 8;   // program address width (#addr field)

  typedef enum logic [2:0] {
    OP_LD    = 3'b000,
    OP_J     = 3'b001,
    OP_MOVR  = 3'b010,
    OP_MOVC  = 3'b011,
    OP_SAD16 = 3'b100,
    OP_DIV2  = 3'b101,
    OP_ADD   = 3'b110,
    OP_SUB   = 3'b111
  } opcode_e;

  // Jump conditions (field cc of J).
  typedef enum logic [2:0] {
    CC_ALWAYS = 3'd0,  // unconditional
    CC_Z      = 3'd1,  // last flag-setting result was zero
    CC_NZ     = 3'd2,  // ... was not zero
    CC_C      = 3'd3,  // carry/borrow set (SUB: Rs1 < Rs2 unsigned)
    CC_NC     = 3'd4,  // carry/borrow clear
    CC_N      = 3'd5,  // result negative (bit 15)
    CC_NN     = 3'd6,  // result not negative
    CC_LDBUSY = 3'd7   // an LD is still being executed by the AGU
  } cond_e;

  typedef enum logic [1:0] {
    ALU_ADD  = 2'd0,
    ALU_SUB  = 2'd1,
    ALU_DIV2 = 2'd2,
    ALU_PASS = 2'd3
  } alu_op_e;

  typedef enum logic [1:0] {
    RES_ALU   = 2'd0,
    RES_SADU  = 2'd1,
    RES_CONST = 2'd2
  } res_sel_e;

  typedef struct packed {
    logic z;   // zero
    logic n;   // negative
    logic c;   // carry (ADD), borrow (SUB), shifted-out bit (DIV2)
  } flags_t;

  // Special purpose registers (absolute register numbers).
  localparam logic [RAW-1:0] SPR_MB_BASE = 5'd16; // MB origin in frame memory, 16-pixel units
  localparam logic [RAW-1:0] SPR_SA_BASE = 5'd17; // search-area origin, 16-pixel units
  localparam logic [RAW-1:0] SPR_PITCH   = 5'd18; // frame line pitch, 16-pixel units
  localparam logic [RAW-1:0] SPR_BLKW    = 5'd19; // SAD16 block width: 16, 8 or 4

  // Decoded control word of one instruction.
  typedef struct packed {
    logic             valid;
    opcode_e          op;
    logic [RAW-1:0]   rd;       // destination register
    logic [RAW-1:0]   rs_a;     // operand A (any register)
    logic [3:0]       rs_b;     // operand B (GPR only)
    logic             t;        // LD / MOVC type bit
    logic [7:0]       imm;      // #const / #addr
    cond_e            cc;
    logic             we;       // writes rd in EXE (SAD16 handled apart)
    logic             use_alu;
    alu_op_e          alu_op;
    logic             set_flags;
    res_sel_e         res_sel;
    logic             is_ld;
    logic             is_sad;
    logic             is_jump;
  } ctrl_t;

  // Encoders, used by testbenches and software generators.
  function automatic logic [15:0] enc_ld(logic t);
    return {OP_LD, t, 12'h000};
  endfunction
  function automatic logic [15:0] enc_j(cond_e cc, logic [7:0] addr);
    return {OP_J, cc, 2'b00, addr};
  endfunction
  function automatic logic [15:0] enc_movr(logic [4:0] rd, logic [4:0] rs);
    return {OP_MOVR, rd, 3'b000, rs};
  endfunction
  function automatic logic [15:0] enc_movc(logic t, logic [3:0] rd, logic [7:0] k);
    return {OP_MOVC, t, rd, k};
  endfunction
  function automatic logic [15:0] enc_rrr(opcode_e op, logic [3:0] rd, logic [3:0] rs1, logic [3:0] rs2);
    return {op, 1'b0, rd, rs1, rs2};
  endfunction

endpackage
