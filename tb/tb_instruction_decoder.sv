// tb_instruction_decoder: self-checking test of the hardwired decoder.
// Random instruction words, flags and LD-busy values are decoded; the
// control word and the jump decision are compared with an independent
// field-by-field model of the instruction formats.
module tb_instruction_decoder;
  import asip_pkg::*;
  int checks = 0, failures = 0;
  logic valid, ld_busy, jt; logic [15:0] ir; flags_t flags; ctrl_t c;

  instruction_decoder dut (.valid, .ir, .flags, .ld_busy, .ctrl(c), .jump_taken(jt));

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s ir=%h got %0d exp %0d", what, ir, got, exp); end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int op; bit cond; int ecc;
      ir = 16'($urandom); valid = ($urandom_range(0, 7) != 0);
      flags = 3'($urandom); ld_busy = 1'($urandom);
      #1;
      op = ir[15:13];
      ecc = ir[12:10];
      case (ecc)
        0: cond = 1; 1: cond = flags.z; 2: cond = !flags.z; 3: cond = flags.c;
        4: cond = !flags.c; 5: cond = flags.n; 6: cond = !flags.n; default: cond = ld_busy;
      endcase
      expect_eq("jump", jt, valid && op == 1 && cond);
      expect_eq("is_ld", c.is_ld, valid && op == 0);
      expect_eq("is_sad", c.is_sad, valid && op == 4);
      expect_eq("is_jump", c.is_jump, valid && op == 1);
      expect_eq("we", c.we, valid && (op == 2 || op == 3 || op >= 5));
      expect_eq("flags", c.set_flags, valid && op >= 5);
      expect_eq("imm", c.imm, ir[7:0]);
      expect_eq("t", c.t, ir[12]);
      if (op == 2) begin
        expect_eq("movr rd", c.rd, ir[12:8]);
        expect_eq("movr rs", c.rs_a, ir[4:0]);
        expect_eq("movr alu", c.alu_op, ALU_PASS);
      end else begin
        expect_eq("rd", c.rd, ir[11:8]);
        expect_eq("rs1", c.rs_a, ir[7:4]);
        expect_eq("rs2", c.rs_b, ir[3:0]);
      end
      if (op == 6) expect_eq("add", c.alu_op, ALU_ADD);
      if (op == 7) expect_eq("sub", c.alu_op, ALU_SUB);
      if (op == 5) expect_eq("div2", c.alu_op, ALU_DIV2);
      if (op == 3) expect_eq("movc sel", c.res_sel, RES_CONST);
      if (op == 4) expect_eq("sad sel", c.res_sel, RES_SADU);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
