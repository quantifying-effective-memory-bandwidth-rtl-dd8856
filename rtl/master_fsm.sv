// master_fsm: the master side of a memory-bandwidth test core.
//
// It takes one read command from the core's slave FSM and turns it into
// bus read requests. A non-burst command becomes one single-beat request.
// A burst command of any length is cut into requests of at most
// BURST_BYTES (128 bytes, sixteen 64-bit words, on the 64-bit processor
// bus): after each burst the remaining length is checked and the FSM
// issues another full burst (remaining >= BURST_BYTES), a shorter last
// burst (BEAT_BYTES < remaining < BURST_BYTES), a single beat
// (remaining <= BEAT_BYTES) or finishes (remaining = 0). The state names
// and these branch conditions follow the document's master state diagram;
// the figure prints 8 as the single-beat threshold, which is BEAT_BYTES on
// the 64-bit bus. BURST_BYTES = 64 with BEAT_BYTES = 4 gives the 32-bit
// peripheral bus, whose bursts are at most 64 bytes.
//
// Interface:
//   start/cmd   from the slave FSM; accepted (req_issued pulses) in IDLE.
//   master_ack  one-cycle pulse when all data of the command has arrived;
//               master_err is valid with it and is set when any bus request
//               of the command ended with bus_err.
//   bus_req/bus_cmd/bus_req_ack  valid/ready request to the bus attachment;
//               bus_cmd is stable while bus_req is high.
//   bus_done/bus_err  one-cycle pulse from the bus when the last beat of
//               the outstanding request has been written into the core.
// Timing: one request outstanding at a time; the next request of a burst
// sequence is raised two cycles after bus_done (one cycle in the
// burst-check state). The data beats themselves do not pass through this
// module: the bus writes them straight into the core's data register.
// Choices of this design: a burst command shorter than BURST_BYTES is
// issued as one burst of its own length; the read/write request type is
// fixed to read, the only type the tests use.
module master_fsm
  import membw_pkg::*;
#(
  parameter int unsigned BURST_BYTES = 128,
  parameter int unsigned BEAT_BYTES  = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  // from / to the slave FSM
  input  logic     start,
  input  mst_cmd_t cmd,
  output logic     req_issued,
  output logic     master_ack,
  output logic     master_err,
  output logic     busy,
  // to / from the bus attachment
  output logic     bus_req,
  output mst_cmd_t bus_cmd,
  input  logic     bus_req_ack,
  input  logic     bus_done,
  input  logic     bus_err
);

  typedef enum logic [2:0] {
    S_IDLE, S_SINGLE_REQ, S_BURST_REQ, S_CHECK_BURST, S_LAST_BURST
  } state_t;

  state_t            state, state_n;
  logic [ADDR_W-1:0] addr_q;      // address of the next request
  logic [ADDR_W-1:0] local_q;
  logic [LEN_W-1:0]  remain_q;    // bytes still to request
  logic [LEN_W-1:0]  cur_len_q;   // bytes of the request in flight
  logic              issued_q;    // current request accepted by the bus
  logic              err_q;

  localparam logic [LEN_W-1:0] BURST_LEN = LEN_W'(BURST_BYTES);
  localparam logic [LEN_W-1:0] BEAT_LEN  = LEN_W'(BEAT_BYTES);

  // A beat must fit the data bundle and a full burst must be whole beats.
  if (BEAT_BYTES == 0 || BEAT_BYTES > MAX_BEAT_BYTES || BURST_BYTES % BEAT_BYTES != 0) begin : g_bad_beat
    $error("master_fsm: BEAT_BYTES=%0d does not suit BURST_BYTES=%0d", BEAT_BYTES, BURST_BYTES);
  end

  wire in_req = (state == S_SINGLE_REQ) || (state == S_BURST_REQ) ||
                (state == S_LAST_BURST);

  assign bus_req           = in_req && !issued_q;
  assign bus_cmd.addr       = addr_q;
  assign bus_cmd.local_addr = local_q;
  assign bus_cmd.burst      = (state != S_SINGLE_REQ);
  assign bus_cmd.nbytes     = cur_len_q;

  assign req_issued = (state == S_IDLE) && start;
  assign busy       = (state != S_IDLE);

  // data_ack of the state diagram: the outstanding request has completed
  wire data_ack = in_req && (issued_q || bus_req_ack) && bus_done;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:        if (start) state_n = cmd.burst ? S_BURST_REQ : S_SINGLE_REQ;
      S_SINGLE_REQ:  if (data_ack) state_n = S_IDLE;
      S_BURST_REQ:   if (data_ack) state_n = S_CHECK_BURST;
      S_LAST_BURST:  if (data_ack) state_n = S_CHECK_BURST;
      S_CHECK_BURST: begin
        if (remain_q == '0)             state_n = S_IDLE;
        else if (remain_q <= BEAT_LEN)  state_n = S_SINGLE_REQ;
        else if (remain_q >= BURST_LEN) state_n = S_BURST_REQ;
        else                            state_n = S_LAST_BURST;
      end
      default:       state_n = S_IDLE;
    endcase
  end

  // Length of the request that starts when entering state_n from CHECK.
  function automatic logic [LEN_W-1:0] req_len(state_t s, logic [LEN_W-1:0] rem);
    unique case (s)
      S_SINGLE_REQ: return BEAT_LEN;
      S_BURST_REQ:  return (rem >= BURST_LEN) ? BURST_LEN : rem;
      default:      return rem;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr_q    <= '0;
      local_q   <= '0;
      remain_q  <= '0;
      cur_len_q <= '0;
      issued_q  <= 1'b0;
      err_q     <= 1'b0;
    end else begin
      state <= state_n;
      if (bus_req && bus_req_ack) issued_q <= 1'b1;
      if (data_ack) begin
        issued_q <= 1'b0;
        addr_q   <= addr_q + ADDR_W'(cur_len_q);
        if (bus_err) err_q <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          local_q <= cmd.local_addr;
          addr_q  <= cmd.addr;
          err_q   <= 1'b0;
          if (cmd.burst) begin
            cur_len_q <= req_len(S_BURST_REQ, cmd.nbytes);
            remain_q  <= cmd.nbytes - req_len(S_BURST_REQ, cmd.nbytes);
          end else begin
            cur_len_q <= BEAT_LEN;
            remain_q  <= '0;
          end
        end
        S_CHECK_BURST: if (state_n != S_IDLE) begin
          cur_len_q <= req_len(state_n, remain_q);
          remain_q  <= remain_q - req_len(state_n, remain_q);
        end
        default: ;
      endcase
    end
  end

  // completion reported to the slave FSM
  assign master_ack = (state == S_SINGLE_REQ && data_ack) ||
                      (state == S_CHECK_BURST && remain_q == '0);
  assign master_err = err_q || (state == S_SINGLE_REQ && data_ack && bus_err);

  // the request must be held stable until the bus accepts it
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    bus_req && !bus_req_ack |=> bus_req && $stable(bus_cmd));
  // a burst never exceeds the bus burst length
  a_burst_len: assert property (@(posedge clk) disable iff (!rst_n)
    bus_req |-> bus_cmd.nbytes <= BURST_LEN && bus_cmd.nbytes != '0);

endmodule
