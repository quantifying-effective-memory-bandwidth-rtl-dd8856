// seq_test_core: simplified test core for the multi-core experiments.
//
// Same measurement as test_core, restricted to sequential single and burst
// reads so that it is small enough for eight copies to share one FPGA: the
// address and data BRAMs are removed, the addresses are generated from a
// start address, and only the most recent data beat is kept so software
// can compare the final datum with off-chip memory after the test. The
// test is started by this core's own start line from the controller core,
// without any bus transaction, so all selected cores start on the same
// clock edge.
//
// Register space (32-bit words, reg.addr[3:0], names from membw_pkg):
//   MODE, XFER_LEN, NUM_REQ, LOCAL, BASE (first off-chip address) - R/W
//   CTRL (bit0 busy), TIMER, XACT, ERR, LAST_LO, LAST_HI          - R
// Reads return rdata one cycle after reg.rd. Beats written by the bus to a
// local address other than LOCAL are ignored.
// Sequential-only operation, the start line and the final-datum check are
// the document's; the register map is this design's.
//
// BURST_BYTES and BEAT_BYTES choose the bus: 128 and 8 for the 64-bit
// processor bus (default), 64 and 4 for the 32-bit peripheral bus, whose
// beats arrive in the low half of the data field.
module seq_test_core
  import membw_pkg::*;
#(
  parameter int unsigned BURST_BYTES = 128,
  parameter int unsigned BEAT_BYTES  = 8,
  parameter int unsigned CNT_W       = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  reg_req_t          reg_req,
  output logic [REG_DW-1:0] reg_rdata,
  output logic              bus_req,
  output mst_cmd_t          bus_cmd,
  input  logic              bus_req_ack,
  input  logic              bus_done,
  input  logic              bus_err,
  input  bus_wr_t           bus_wr,
  output logic              busy
);

  logic              burst_q;
  logic [LEN_W-1:0]  xfer_len_q;
  logic [CNT_W-1:0]  num_req_q;
  logic [ADDR_W-1:0] local_q;
  logic [ADDR_W-1:0] base_q;
  logic [DATA_W-1:0] last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      burst_q    <= 1'b0;
      xfer_len_q <= LEN_W'(BEAT_BYTES);
      num_req_q  <= '0;
      local_q    <= '0;
      base_q     <= '0;
    end else if (reg_req.wr) begin
      unique case (reg_req.addr[3:0])
        REG_MODE:     burst_q    <= reg_req.wdata[0];
        REG_XFER_LEN: xfer_len_q <= reg_req.wdata[LEN_W-1:0];
        REG_NUM_REQ:  num_req_q  <= reg_req.wdata[CNT_W-1:0];
        REG_LOCAL:    local_q    <= reg_req.wdata;
        REG_BASE:     base_q     <= reg_req.wdata;
        default: ;
      endcase
    end
  end

  logic     m_start, m_req_issued, m_ack, m_err, m_busy;
  mst_cmd_t m_cmd;
  logic     clear, timing, xact_done, xact_err;

  seq_slave_fsm #(.CNT_W(CNT_W), .BEAT_BYTES(BEAT_BYTES)) u_slave (
    .clk, .rst_n,
    .start      (start),
    .num_req    (num_req_q),
    .burst      (burst_q),
    .xfer_len   (xfer_len_q),
    .base_addr  (base_q),
    .local_addr (local_q),
    .m_start, .m_cmd, .m_req_issued, .m_ack, .m_err,
    .busy, .clear, .timing, .xact_done, .xact_err
  );

  master_fsm #(.BURST_BYTES(BURST_BYTES), .BEAT_BYTES(BEAT_BYTES)) u_master (
    .clk, .rst_n,
    .start      (m_start),
    .cmd        (m_cmd),
    .req_issued (m_req_issued),
    .master_ack (m_ack),
    .master_err (m_err),
    .busy       (m_busy),
    .bus_req, .bus_cmd, .bus_req_ack, .bus_done, .bus_err
  );

  // keep the latest beat delivered to the local data register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                    last_q <= '0;
    else if (bus_wr.en && bus_wr.addr == local_q)  last_q <= bus_wr.data;
  end

  logic [CNT_W-1:0] timer, xact, errors;

  result_counters #(.CNT_W(CNT_W)) u_counters (
    .clk, .rst_n, .clear, .timing, .xact_done, .xact_err,
    .timer, .xact, .errors
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg_rdata <= '0;
    else if (reg_req.rd) begin
      unique case (reg_req.addr[3:0])
        REG_CTRL:     reg_rdata <= REG_DW'({m_busy, busy});
        REG_MODE:     reg_rdata <= REG_DW'(burst_q);
        REG_XFER_LEN: reg_rdata <= REG_DW'(xfer_len_q);
        REG_NUM_REQ:  reg_rdata <= REG_DW'(num_req_q);
        REG_LOCAL:    reg_rdata <= local_q;
        REG_TIMER:    reg_rdata <= REG_DW'(timer);
        REG_XACT:     reg_rdata <= REG_DW'(xact);
        REG_ERR:      reg_rdata <= REG_DW'(errors);
        REG_BASE:     reg_rdata <= base_q;
        REG_LAST_LO:  reg_rdata <= last_q[31:0];
        REG_LAST_HI:  reg_rdata <= last_q[63:32];
        default:      reg_rdata <= '0;
      endcase
    end
  end

endmodule
