// sdp_ram: simple dual-port synchronous RAM.
//
// One write port and one read port on the same clock. A read issued with re
// high returns mem[raddr] on rdata after the next rising edge; rdata holds its
// value while re is low. A read and a write to the same address in one cycle
// return the old contents. There is no reset: contents are whatever was last
// written.
//
// Used for the PE data memory (36K x 32), the PE configuration memory
// (24K x 32) and the switchbox schedule memory (512 x 32). Those sizes come
// from the architecture; the one-cycle read latency is this design's choice.
module sdp_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    if (re) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
