// tc_bram: simple dual-port block RAM used inside the test core.
//
// The test core holds two of these local memories: the address BRAM, which
// the processor fills with the off-chip addresses of a test before it
// starts and the slave FSM reads back one address per request, and the
// data BRAM, which the slave side fills with every data word returned by
// the memory controller and the processor reads after the test.
// One write port and one read port; the read is synchronous (rdata is the
// word at raddr one cycle after re is sampled) so it maps onto an FPGA
// block RAM. Depth and width are parameters; the depth is this design's
// choice, the document does not size the memories.
module tc_bram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
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
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
