// seq_slave_fsm: slave-side controller of the simplified multi-core core.
//
// For the multi-core tests the test core keeps only sequential reads, so
// the address BRAM and its read state are gone: the slave FSM generates
// the addresses itself. Starting from base_addr it issues num_req read
// commands to the master FSM, each beginning where the previous one ended
// (BEAT_BYTES further for single reads, xfer_len bytes further for bursts),
// waits for each to complete with the timer running, and returns to IDLE
// after the last one. Removing the BRAM and reading contiguous addresses
// follows the document; the address step rule is this design's reading of
// "the next contiguous address".
//
// Interface: start is the controller core's start line for this core,
// sampled in IDLE; the master handshake and the counter outputs are those
// of slave_fsm. Timing per request: 1 cycle issue, the counted wait,
// 1 cycle CHECK.
module seq_slave_fsm
  import membw_pkg::*;
#(
  parameter int unsigned CNT_W      = 32,
  parameter int unsigned BEAT_BYTES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CNT_W-1:0]  num_req,
  input  logic              burst,
  input  logic [LEN_W-1:0]  xfer_len,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [ADDR_W-1:0] local_addr,
  output logic              m_start,
  output mst_cmd_t          m_cmd,
  input  logic              m_req_issued,
  input  logic              m_ack,
  input  logic              m_err,
  output logic              busy,
  output logic              clear,
  output logic              timing,
  output logic              xact_done,
  output logic              xact_err
);

  typedef enum logic [1:0] {S_IDLE, S_RD_REQ, S_WAIT_DATA, S_CHECK} state_t;

  state_t            state;
  logic [CNT_W-1:0]  idx_q;
  logic [ADDR_W-1:0] addr_q;

  wire [ADDR_W-1:0] step = burst ? ADDR_W'(xfer_len) : ADDR_W'(BEAT_BYTES);

  assign m_start          = (state == S_RD_REQ);
  assign m_cmd.addr       = addr_q;
  assign m_cmd.local_addr = local_addr;
  assign m_cmd.burst      = burst;
  assign m_cmd.nbytes     = xfer_len;

  assign busy      = (state != S_IDLE);
  assign clear     = (state == S_IDLE) && start;
  assign timing    = (state == S_WAIT_DATA);
  assign xact_done = (state == S_WAIT_DATA) && m_ack;
  assign xact_err  = m_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      idx_q  <= '0;
      addr_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          idx_q  <= '0;
          addr_q <= base_addr;
          if (num_req != '0) state <= S_RD_REQ;
        end
        S_RD_REQ:    if (m_req_issued) state <= S_WAIT_DATA;
        S_WAIT_DATA: if (m_ack)        state <= S_CHECK;
        S_CHECK: begin
          idx_q  <= idx_q + 1'b1;
          addr_q <= addr_q + step;
          state  <= (idx_q + 1'b1 >= num_req) ? S_IDLE : S_RD_REQ;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_held: assert property (@(posedge clk) disable iff (!rst_n)
    m_start && !m_req_issued |=> m_start && $stable(m_cmd));

endmodule
