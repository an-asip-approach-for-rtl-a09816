// frame_memory_model: behavioural model of the external frame memory the
// AGU loads from (testbench only; the memory itself is outside the core).
// Word-addressed, 16-bit words.  A request is accepted when req and gnt
// are both high; gnt is withheld at random when STALL_PCT > 0.  Read data
// returns in order LATENCY cycles after acceptance, one word per cycle at
// most, flagged by rvalid.  Requests during reset are ignored.  Testbenches fill `mem` directly.
module frame_memory_model #(
  parameter int AW        = 20,
  parameter int DEPTH     = 65536,
  parameter int LATENCY   = 3,
  parameter int STALL_PCT = 25
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic [AW-1:0] addr,
  output logic          gnt,
  output logic          rvalid,
  output logic [15:0]   rdata
);
  logic [15:0] mem [DEPTH];
  longint      cycle = 0;
  longint      due [$];
  logic [15:0] data [$];
  int          accepted = 0, stalled = 0;

  initial begin
    gnt = 1'b1; rvalid = 1'b0; rdata = '0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      due.delete(); data.delete();
    end else if (req && gnt) begin
      due.push_back(cycle + LATENCY);
      data.push_back(mem[int'(addr) % DEPTH]);
      accepted++;
    end else if (req) begin
      stalled++;
    end
    if (due.size() > 0 && due[0] <= cycle) begin
      void'(due.pop_front());
      rdata  <= data.pop_front();
      rvalid <= 1'b1;
    end else begin
      rvalid <= 1'b0;
    end
    gnt <= ($urandom_range(0, 99) >= STALL_PCT);
  end
endmodule
