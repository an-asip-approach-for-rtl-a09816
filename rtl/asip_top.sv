// asip_top: motion-estimation ASIP core.
//
// A small register-register processor with eight 16-bit instructions,
// built to run adaptive block-matching motion estimation programs.  It has
// three pipeline stages:
//   IF      the PC reads the program memory; the memory's output register
//           is the instruction register (IR).
//   ID      the hardwired decoder turns the IR into controls, evaluates J
//           and reads the operands from the register-file buses through the
//           operand multiplexers (with forwarding from EXE).  A taken J
//           squashes the word fetched behind it: one bubble.
//   EXE/MEM ALU, SADU and AGU work; the result multiplexer selects ALU,
//           SADU or constant; the register file and the flags are written.
// Most instructions issue one per cycle.  SAD16 holds EXE for 16/LANES
// cycles (16 by default): in its first cycle the ALU writes the moved line
// pointer back to Rs2, in its last the SADU writes Rd + SAD to Rd.  LD only
// starts the AGU, which then fills the local data memory from the external
// frame memory while the core runs on; an LD or SAD16 reaching ID while a
// load is in progress waits there (interlock), and J with condition
// LDBUSY lets a program poll instead.  Operand registers of the execute
// stage only load for instructions that use them, so idle units see no
// input toggles.
//
// Ports: the host loads the program through pm_* while `run` is low and
// starts execution by raising `run` (low freezes the core).  ext_* is the
// external frame-memory read port of the AGU (request/grant, in-order
// rvalid data).  dbg_addr/dbg_data read any register.  `halted` rises when
// the core reaches "J always" to its own address, the convention used here
// to end a program.  The pipeline organisation, the units and the
// instruction set follow the document; forwarding, the interlocks, the halt
// convention and the host ports are this design's choices.  The execute
// stage keeps the whole decoded control word, including fields only the
// decode stage needs (jump condition, jump flag); the lint warning about
// those unused bits is expected.
module asip_top
  import asip_pkg::*;
#(
  parameter int unsigned SA_W     = 48,
  parameter int unsigned SA_H     = 48,
  parameter int unsigned LANES    = 1,
  parameter int unsigned EXT_AW   = 20,
  parameter int unsigned PM_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  // program load
  input  logic              pm_we,
  input  logic [PAW-1:0]    pm_waddr,
  input  logic [15:0]       pm_wdata,
  // external frame memory
  output logic              ext_req,
  output logic [EXT_AW-1:0] ext_addr,
  input  logic              ext_gnt,
  input  logic              ext_rvalid,
  input  logic [15:0]       ext_rdata,
  // status and debug
  input  logic [RAW-1:0]    dbg_addr,
  output logic [DW-1:0]     dbg_data,
  output logic [PAW-1:0]    pc,
  output logic              ld_busy,
  output logic              halted
);
  localparam int unsigned CYCLES = 16 / LANES;
  localparam int unsigned SW     = (CYCLES > 1) ? $clog2(CYCLES) : 1;
  localparam int unsigned WIW    = $clog2(SA_W * SA_H / 2);
  localparam int unsigned SAA    = $clog2(SA_W * SA_H);

  // ---------------------------------------------------------------- IF
  logic        fetch_en, stall, jump;
  logic [15:0] ir;
  logic        id_valid;
  logic [PAW-1:0] id_pc;

  instruction_fetch #(.AW(PAW)) u_if (
    .clk, .rst_n, .run, .stall, .jump,
    .jump_addr(ir[7:0]), .pc, .fetch_en
  );

  program_memory #(.DEPTH(PM_DEPTH), .AW(PAW)) u_pm (
    .clk, .rd_en(fetch_en), .rd_addr(pc), .rd_data(ir),
    .wr_en(pm_we), .wr_addr(pm_waddr), .wr_data(pm_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_valid <= 1'b0;
      id_pc    <= '0;
    end else if (fetch_en) begin
      id_valid <= !jump;
      id_pc    <= pc;
    end
  end

  // ---------------------------------------------------------------- ID
  ctrl_t   id_ctrl, ex;
  logic    id_jump_raw;
  flags_t  flags_q, flags_eff, alu_flags;
  logic    ld_busy_eff, agu_busy;
  logic    ex_hold, id_stall;
  logic    sad_last;
  logic [SW-1:0] sad_step;

  logic [DW-1:0] regs [32];
  logic [DW-1:0] gprs [NGPR];
  logic          wr_en;
  logic [RAW-1:0] wr_addr;
  logic [DW-1:0] wr_data;

  instruction_decoder u_dec (
    .valid(id_valid), .ir, .flags(flags_eff), .ld_busy(ld_busy_eff),
    .ctrl(id_ctrl), .jump_taken(id_jump_raw)
  );

  // operand multiplexers with forwarding of the value EXE writes now
  function automatic logic [DW-1:0] fwd(logic [RAW-1:0] a, logic [DW-1:0] rv,
                                        logic we, logic [RAW-1:0] wa, logic [DW-1:0] wd);
    return (we && wa == a) ? wd : rv;
  endfunction

  logic [DW-1:0] id_opa, id_opb, id_opd;
  assign id_opa = fwd(id_ctrl.rs_a, regs[id_ctrl.rs_a], wr_en, wr_addr, wr_data);
  assign id_opb = fwd({1'b0, id_ctrl.rs_b}, gprs[id_ctrl.rs_b], wr_en, wr_addr, wr_data);
  assign id_opd = fwd(id_ctrl.rd, regs[id_ctrl.rd], wr_en, wr_addr, wr_data);

  assign ex_hold     = ex.valid && ex.is_sad && !sad_last;
  assign ld_busy_eff = agu_busy || (ex.valid && ex.is_ld);
  assign id_stall    = (id_ctrl.is_sad || id_ctrl.is_ld) && ld_busy_eff;
  assign stall       = ex_hold || id_stall || !run;
  assign jump        = id_jump_raw && !stall;
  assign ld_busy     = ld_busy_eff;

  // ---------------------------------------------------------------- ID/EX
  logic [DW-1:0] ex_opa, ex_opb, ex_opd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex     <= '0;
      ex_opa <= '0;
      ex_opb <= '0;
      ex_opd <= '0;
    end else if (run && !ex_hold) begin
      if (id_stall) begin
        ex.valid <= 1'b0;
      end else begin
        ex <= id_ctrl;
        // operand isolation: only units that are used see new inputs
        if (id_ctrl.use_alu || id_ctrl.is_sad) begin
          ex_opa <= id_opa;
          ex_opb <= id_opb;
        end
        if (id_ctrl.is_sad) ex_opd <= id_opd;
      end
    end
  end

  // ---------------------------------------------------------------- EXE
  logic [DW-1:0] alu_a, alu_b, alu_y, sad_lines, sad_result, const_val;
  logic          sad_go;

  assign sad_go = run && ex.valid && ex.is_sad;
  assign alu_a  = ex.is_sad ? ex_opb    : ex_opa;
  assign alu_b  = ex.is_sad ? sad_lines : ex_opb;

  alu u_alu (.op(ex.alu_op), .a(alu_a), .b(alu_b), .y(alu_y), .flags(alu_flags));

  logic [7:0]     mb_addr  [LANES];
  logic [SAA-1:0] sa_addr  [LANES];
  logic [7:0]     mb_pix   [LANES];
  logic [7:0]     sa_pix   [LANES];
  logic [7:0]     cur_pix  [LANES];
  logic [7:0]     cand_pix [LANES];
  logic           dm_we, dm_sa;
  logic [WIW-1:0] dm_idx;
  logic [15:0]    dm_wdata;

  agu #(.SA_W(SA_W), .SA_H(SA_H), .LANES(LANES), .EXT_AW(EXT_AW)) u_agu (
    .clk, .rst_n,
    .ld_start(run && ex.valid && ex.is_ld), .ld_t(ex.t),
    .mb_base(regs[SPR_MB_BASE]), .sa_base(regs[SPR_SA_BASE]), .pitch(regs[SPR_PITCH]),
    .busy(agu_busy),
    .ext_req, .ext_addr, .ext_gnt, .ext_rvalid, .ext_rdata,
    .wr_en(dm_we), .wr_sa(dm_sa), .wr_idx(dm_idx), .wr_data(dm_wdata),
    .cand(ex_opa), .ptr(ex_opb), .blkw(regs[SPR_BLKW]), .step(sad_step),
    .mb_addr, .sa_addr, .mb_pix, .sa_pix, .cur_pix, .cand_pix,
    .lines(sad_lines)
  );

  data_memory #(.SA_W(SA_W), .SA_H(SA_H), .LANES(LANES)) u_dm (
    .clk, .wr_en(dm_we), .wr_sa(dm_sa), .wr_idx(dm_idx), .wr_data(dm_wdata),
    .mb_addr, .sa_addr, .mb_pix, .sa_pix
  );

  sadu #(.LANES(LANES)) u_sadu (
    .clk, .rst_n, .go(sad_go), .acc_in(ex_opd),
    .cur_pix, .cand_pix, .step(sad_step), .last(sad_last), .result(sad_result)
  );

  // MOVC: the two byte multiplexers in front of the register file
  assign const_val = ex.t ? {ex.imm, regs[ex.rd][7:0]} : {8'h00, ex.imm};

  // result multiplexer and write-back
  always_comb begin
    wr_en   = 1'b0;
    wr_addr = ex.rd;
    wr_data = alu_y;
    if (run && ex.valid) begin
      if (ex.is_sad) begin
        if (sad_last) begin
          wr_en   = 1'b1;
          wr_data = sad_result;
        end else if (sad_step == '0) begin
          wr_en   = 1'b1;
          wr_addr = {1'b0, ex.rs_b};
        end
      end else if (ex.we) begin
        wr_en   = 1'b1;
        wr_data = (ex.res_sel == RES_CONST) ? const_val : alu_y;
      end
    end
  end

  register_file u_rf (.clk, .rst_n, .we(wr_en), .waddr(wr_addr), .wdata(wr_data),
                      .regs, .gprs);

  assign flags_eff = (run && ex.valid && ex.set_flags) ? alu_flags : flags_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags_q <= '0;
    else        flags_q <= flags_eff;
  end

  // ---------------------------------------------------------------- status
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) halted <= 1'b0;
    else if (jump && id_ctrl.cc == CC_ALWAYS && ir[7:0] == id_pc) halted <= 1'b1;
  end

  assign dbg_data = regs[dbg_addr];

  // a SAD16 needs its first and last cycles apart for the two write-backs
  initial assert (LANES <= 8) else $error("asip_top: LANES must be at most 8");
endmodule
