// slave_fsm: the slave-side controller of the single-core test core.
//
// It runs one test: for each of num_req requests it reads the next
// off-chip address from the address BRAM, hands a read command to the
// master FSM and waits until the master reports that all requested data
// has been written into the core. Only that wait is timed (`timing` is
// high in the wait-for-data state and drives the timer counter). After
// each request it checks whether the test is complete and either returns
// to IDLE or reads the next address. The five states and their order are
// the document's slave state diagram.
//
// Interface:
//   start_test   one-cycle pulse (or level) sampled in IDLE; clears the
//                counters (`clear`) and starts the test. num_req = 0 ends
//                the test at once.
//   abram_*      synchronous read port of the address BRAM; addr_ready is
//                the read's valid flag one cycle after abram_re.
//   m_*          command handshake with the master FSM: m_start/m_cmd are
//                held until m_req_issued; m_ack/m_err end the wait.
//   xact_done/xact_err  one pulse per completed request for the counters.
// Timing: per request 1 cycle READ_ADDR issue + 1 cycle address return,
// 1 cycle issue to the master, the wait (counted), 1 cycle CHECK.
// The burst flag, transfer length and local data-register address are
// test-wide settings written by software before the start, as the
// document describes; the BRAM read latency is this design's choice.
module slave_fsm
  import membw_pkg::*;
#(
  parameter int unsigned ADDR_DEPTH = 512,
  parameter int unsigned CNT_W      = 32,
  localparam int unsigned AW        = (ADDR_DEPTH > 1) ? $clog2(ADDR_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // test set-up (software registers)
  input  logic              start_test,
  input  logic [CNT_W-1:0]  num_req,
  input  logic              burst,
  input  logic [LEN_W-1:0]  xfer_len,
  input  logic [ADDR_W-1:0] local_addr,
  // address BRAM read port
  output logic              abram_re,
  output logic [AW-1:0]     abram_raddr,
  input  logic [ADDR_W-1:0] abram_rdata,
  // master FSM
  output logic              m_start,
  output mst_cmd_t          m_cmd,
  input  logic              m_req_issued,
  input  logic              m_ack,
  input  logic              m_err,
  // status and counters
  output logic              busy,
  output logic              clear,
  output logic              timing,
  output logic              xact_done,
  output logic              xact_err
);

  typedef enum logic [2:0] {
    S_IDLE, S_READ_ADDR, S_RD_REQ, S_WAIT_DATA, S_CHECK
  } state_t;

  state_t            state;
  logic [CNT_W-1:0]  idx_q;        // index of the current request
  logic              rd_pending_q; // address BRAM read in flight
  logic              addr_ready;
  logic [ADDR_W-1:0] addr_q;

  assign addr_ready  = rd_pending_q;
  assign abram_re    = (state == S_READ_ADDR) && !rd_pending_q;
  assign abram_raddr = AW'(idx_q);

  assign m_start          = (state == S_RD_REQ);
  assign m_cmd.addr       = addr_q;
  assign m_cmd.local_addr = local_addr;
  assign m_cmd.burst      = burst;
  assign m_cmd.nbytes     = xfer_len;

  assign busy      = (state != S_IDLE);
  assign clear     = (state == S_IDLE) && start_test;
  assign timing    = (state == S_WAIT_DATA);
  assign xact_done = (state == S_WAIT_DATA) && m_ack;
  assign xact_err  = m_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      idx_q        <= '0;
      rd_pending_q <= 1'b0;
      addr_q       <= '0;
    end else begin
      rd_pending_q <= abram_re;
      unique case (state)
        S_IDLE: if (start_test) begin
          idx_q <= '0;
          if (num_req != '0) state <= S_READ_ADDR;
        end
        S_READ_ADDR: if (addr_ready) begin
          addr_q <= abram_rdata;
          state  <= S_RD_REQ;
        end
        S_RD_REQ:    if (m_req_issued) state <= S_WAIT_DATA;
        S_WAIT_DATA: if (m_ack)        state <= S_CHECK;
        S_CHECK: begin
          if (idx_q + 1'b1 >= num_req) state <= S_IDLE;       // test complete
          else                         state <= S_READ_ADDR;  // next address
          idx_q <= idx_q + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_held: assert property (@(posedge clk) disable iff (!rst_n)
    m_start && !m_req_issued |=> m_start && $stable(m_cmd));

endmodule
