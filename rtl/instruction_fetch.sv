// instruction_fetch: program counter of the ASIP (IF stage).
//
// The PC addresses the program memory.  Each cycle in which the fetch is
// not stalled the PC advances by one; a taken J from the decode stage loads
// the jump target instead (J changes the PC directly).  fetch_pc is the
// address of the word being read this cycle; it is handed to the decode
// stage together with the word.  Reset starts execution at address 0, and
// a low run input freezes the PC.
module instruction_fetch #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          stall,      // decode or execute stage holds the IR
  input  logic          jump,       // taken jump in decode stage
  input  logic [AW-1:0] jump_addr,
  output logic [AW-1:0] pc,         // address read this cycle
  output logic          fetch_en    // program memory read enable
);
  assign fetch_en = run && (jump || !stall);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pc <= '0;
    else if (run) begin
      if (jump)        pc <= jump_addr;
      else if (!stall) pc <= pc + 1'b1;
    end
  end
endmodule
