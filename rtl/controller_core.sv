// controller_core: starts the selected test cores of a multi-core test.
//
// The processor writes, over the bus, which test cores take part in the
// next test (a select mask, one bit per core), then writes the GO
// register. The controller core then raises the start line of every
// selected core for exactly one clock cycle. The start lines are direct
// wires to the cores, so starting a test costs no bus transaction and all
// selected cores start on the same edge, as the document requires.
// The core also gathers the cores' busy lines so software can poll for the
// end of the test.
//
// Registers (32-bit words, reg.addr[1:0]):
//   0 SELECT  R/W  bit i selects test core i
//   1 GO      W    any write pulses start[i] for every selected core;
//                  R    bit i is busy[i] (core i still running)
// start is registered: it goes high on the cycle after the GO write is
// sampled. Reads return rdata one cycle after reg.rd. The register map and
// the busy read-back are this design's own choices.
module controller_core
  import membw_pkg::*;
#(
  parameter int unsigned NUM_CORES = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  reg_req_t             reg_req,
  output logic [REG_DW-1:0]    reg_rdata,
  input  logic [NUM_CORES-1:0] busy,
  output logic [NUM_CORES-1:0] start
);

  logic [NUM_CORES-1:0] select_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      select_q  <= '0;
      start     <= '0;
      reg_rdata <= '0;
    end else begin
      start <= '0;
      if (reg_req.wr && reg_req.addr[1:0] == 2'd0)
        select_q <= reg_req.wdata[NUM_CORES-1:0];
      if (reg_req.wr && reg_req.addr[1:0] == 2'd1)
        start <= select_q;
      if (reg_req.rd) begin
        unique case (reg_req.addr[1:0])
          2'd0:    reg_rdata <= REG_DW'(select_q);
          2'd1:    reg_rdata <= REG_DW'(busy);
          default: reg_rdata <= '0;
        endcase
      end
    end
  end

  a_start_selected: assert property (@(posedge clk) disable iff (!rst_n)
    (start & ~select_q) == '0);

endmodule
