// Single-port synchronous RAM with a registered read.
//
// Every memory of the network is one of these: the 256x16 input and weight
// memories of stage 1, the 128x8 tanh look-up tables and the 16x8 target
// look-up tables of stage 3. The sizes are the ones the design calls for; a
// single port is enough because the training scheme never reads and writes
// the same memory in one pass (one weight memory of a pair is read while the
// other is written).
//
// Timing: on a rising edge with we=1 the word at addr is written; rdata
// always shows, one clock after addr was presented, the word stored there
// before that edge (read-before-write).
module sync_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
