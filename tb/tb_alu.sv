// tb_alu: self-checking test of the ALU against an independent model of
// ADD, SUB, DIV2 and PASS and of the z/n/c flags, on directed corner values
// and random operands.
module tb_alu;
  import asip_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [15:0] a, b, y;
  flags_t f;

  alu dut (.op, .a, .b, .y, .flags(f));

  task automatic check(alu_op_e o, logic [15:0] x, logic [15:0] z);
    logic [15:0] ey; logic ec;
    op = o; a = x; b = z; #1;
    case (o)
      ALU_ADD:  begin ey = x + z; ec = (int'(x) + int'(z)) > 65535; end
      ALU_SUB:  begin ey = x - z; ec = x < z; end
      ALU_DIV2: begin ey = 16'($signed(x) >>> 1); ec = x[0]; end
      default:  begin ey = x; ec = 1'b0; end
    endcase
    checks++;
    if (y !== ey || f.z !== (ey == 0) || f.n !== ey[15] || f.c !== ec) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h f=%b exp y=%h c=%b", o, x, z, y, f, ey, ec);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check(ALU_ADD, 16'hFFFF, 16'h0001);
    check(ALU_SUB, 16'h0003, 16'h0005);
    check(ALU_SUB, 16'h0005, 16'h0005);
    check(ALU_DIV2, 16'hFFFB, 16'h0000);   // -5 / 2 -> -3
    check(ALU_DIV2, 16'h0007, 16'h0000);
    check(ALU_PASS, 16'h8000, 16'h1234);
    for (int i = 0; i < 2000; i++)
      check(alu_op_e'($urandom_range(0, 3)), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
