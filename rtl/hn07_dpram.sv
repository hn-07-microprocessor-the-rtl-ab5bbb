// hn07_dpram: the dual-port data RAM (512 x 8 by default).
//
// One read port and one write port, both synchronous to clk, so that the CPU
// can read an operand in pipeline stage 3 while an older instruction writes
// its result in stage 5. The read data appears one clock after the address
// (at the start of stage 4). A read and a write of the same word in the same
// cycle return the old word; the CPU bypasses that case itself. The size is
// the document's; the port timing is this design's choice. No reset: the
// contents are undefined until written.
module hn07_dpram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
