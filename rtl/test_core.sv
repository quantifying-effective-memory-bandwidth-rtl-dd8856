// test_core: single-core memory-bandwidth test core.
//
// The core measures how long a hardware core waits for data read from
// off-chip memory across the on-chip bus. Software first loads it through
// its register space: the list of off-chip addresses to read (this is how
// sequential, strided and random patterns are all produced without any
// address logic in the core), the number of requests, single or burst
// mode, the transfer length in bytes and the local address of the core's
// data register. A write of 1 to CTRL starts the test. The slave FSM then
// walks the address BRAM and the master FSM issues the bus reads; the bus
// delivers each data beat as a write to the local data register, and every
// beat is stored in the data BRAM for later checking. The timer counts only
// the cycles spent waiting for data. When the slave FSM is back in IDLE,
// software reads the timer, transaction and error counters and the data.
//
// Register space (32-bit words, word address reg.addr):
//   addr[15:14] = 0 : control registers, addr[3:0] as in membw_pkg
//                     (CTRL, MODE, XFER_LEN, NUM_REQ, LOCAL, TIMER, XACT,
//                     ERR, and DCOUNT = 0xB, the number of beats stored)
//   addr[15:14] = 1 : address BRAM, entry addr[AW-1:0] (write only)
//   addr[15:14] = 2 : data BRAM entry, low 32 bits (read only)
//   addr[15:14] = 3 : data BRAM entry, high 32 bits (read only)
// Reads return rdata one cycle after reg.rd. Data beats written by the bus
// to any other local address than LOCAL are ignored. The data BRAM index
// wraps after DATA_DEPTH beats.
// The partition into slave FSM, master FSM, address and data BRAMs and the
// three counters follows the document's test core; the register map and
// the memory depths are this design's own.
//
// BURST_BYTES and BEAT_BYTES choose the bus: 128 and 8 for the 64-bit
// processor bus (default), 64 and 4 for the 32-bit peripheral bus, whose
// beats arrive in the low half of the data field.
module test_core
  import membw_pkg::*;
#(
  parameter int unsigned ADDR_DEPTH  = 512,
  parameter int unsigned DATA_DEPTH  = 512,
  parameter int unsigned BURST_BYTES = 128,
  parameter int unsigned BEAT_BYTES  = 8,
  parameter int unsigned CNT_W       = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // software register access
  input  reg_req_t          reg_req,
  output logic [REG_DW-1:0] reg_rdata,
  // bus master request
  output logic              bus_req,
  output mst_cmd_t          bus_cmd,
  input  logic              bus_req_ack,
  input  logic              bus_done,
  input  logic              bus_err,
  // data written into the core by the bus
  input  bus_wr_t           bus_wr,
  output logic              busy
);

  localparam int unsigned AAW = (ADDR_DEPTH > 1) ? $clog2(ADDR_DEPTH) : 1;
  localparam int unsigned DAW = (DATA_DEPTH > 1) ? $clog2(DATA_DEPTH) : 1;
  localparam logic [3:0]  REG_DCOUNT = 4'hB;

  // ---------------- software registers
  logic              start_q;
  logic              burst_q;
  logic [LEN_W-1:0]  xfer_len_q;
  logic [CNT_W-1:0]  num_req_q;
  logic [ADDR_W-1:0] local_q;

  wire [1:0] region = reg_req.addr[REG_AW-1 -: 2];
  wire       reg_wr = reg_req.wr && region == 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q    <= 1'b0;
      burst_q    <= 1'b0;
      xfer_len_q <= LEN_W'(BEAT_BYTES);
      num_req_q  <= '0;
      local_q    <= '0;
    end else begin
      start_q <= reg_wr && reg_req.addr[3:0] == REG_CTRL && reg_req.wdata[0];
      if (reg_wr) begin
        unique case (reg_req.addr[3:0])
          REG_MODE:     burst_q    <= reg_req.wdata[0];
          REG_XFER_LEN: xfer_len_q <= reg_req.wdata[LEN_W-1:0];
          REG_NUM_REQ:  num_req_q  <= reg_req.wdata[CNT_W-1:0];
          REG_LOCAL:    local_q    <= reg_req.wdata;
          default: ;
        endcase
      end
    end
  end

  // ---------------- address BRAM (software writes, slave FSM reads)
  logic              abram_re;
  logic [AAW-1:0]    abram_raddr;
  logic [ADDR_W-1:0] abram_rdata;

  tc_bram #(.WIDTH(ADDR_W), .DEPTH(ADDR_DEPTH)) u_addr_bram (
    .clk   (clk),
    .we    (reg_req.wr && region == 2'd1),
    .waddr (reg_req.addr[AAW-1:0]),
    .wdata (reg_req.wdata),
    .re    (abram_re),
    .raddr (abram_raddr),
    .rdata (abram_rdata)
  );

  // ---------------- slave and master FSMs
  logic     m_start, m_req_issued, m_ack, m_err;
  mst_cmd_t m_cmd;
  logic     clear, timing, xact_done, xact_err;

  slave_fsm #(.ADDR_DEPTH(ADDR_DEPTH), .CNT_W(CNT_W)) u_slave (
    .clk, .rst_n,
    .start_test  (start_q),
    .num_req     (num_req_q),
    .burst       (burst_q),
    .xfer_len    (xfer_len_q),
    .local_addr  (local_q),
    .abram_re, .abram_raddr, .abram_rdata,
    .m_start, .m_cmd, .m_req_issued, .m_ack, .m_err,
    .busy, .clear, .timing, .xact_done, .xact_err
  );

  logic m_busy;

  master_fsm #(.BURST_BYTES(BURST_BYTES), .BEAT_BYTES(BEAT_BYTES)) u_master (
    .clk, .rst_n,
    .start       (m_start),
    .cmd         (m_cmd),
    .req_issued  (m_req_issued),
    .master_ack  (m_ack),
    .master_err  (m_err),
    .busy        (m_busy),
    .bus_req, .bus_cmd, .bus_req_ack, .bus_done, .bus_err
  );

  // ---------------- data capture into the data BRAM
  logic [DAW-1:0]    dptr_q;
  logic [CNT_W-1:0]  dcount_q;
  logic [DATA_W-1:0] dbram_rdata;
  wire               capture = bus_wr.en && bus_wr.addr == local_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dptr_q   <= '0;
      dcount_q <= '0;
    end else if (clear) begin
      dptr_q   <= '0;
      dcount_q <= '0;
    end else if (capture) begin
      dptr_q   <= (dptr_q == DAW'(DATA_DEPTH - 1)) ? '0 : dptr_q + 1'b1;
      dcount_q <= dcount_q + 1'b1;
    end
  end

  tc_bram #(.WIDTH(DATA_W), .DEPTH(DATA_DEPTH)) u_data_bram (
    .clk   (clk),
    .we    (capture),
    .waddr (dptr_q),
    .wdata (bus_wr.data),
    .re    (reg_req.rd && region[1]),
    .raddr (reg_req.addr[DAW-1:0]),
    .rdata (dbram_rdata)
  );

  // ---------------- counters
  logic [CNT_W-1:0] timer, xact, errors;

  result_counters #(.CNT_W(CNT_W)) u_counters (
    .clk, .rst_n, .clear, .timing, .xact_done, .xact_err,
    .timer, .xact, .errors
  );

  // ---------------- register read-back (one cycle latency)
  logic [REG_DW-1:0] reg_val_q;
  logic [1:0]        rd_region_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_val_q   <= '0;
      rd_region_q <= '0;
    end else if (reg_req.rd) begin
      rd_region_q <= region;
      unique case (reg_req.addr[3:0])
        REG_CTRL:     reg_val_q <= REG_DW'({m_busy, busy});
        REG_MODE:     reg_val_q <= REG_DW'(burst_q);
        REG_XFER_LEN: reg_val_q <= REG_DW'(xfer_len_q);
        REG_NUM_REQ:  reg_val_q <= REG_DW'(num_req_q);
        REG_LOCAL:    reg_val_q <= local_q;
        REG_TIMER:    reg_val_q <= REG_DW'(timer);
        REG_XACT:     reg_val_q <= REG_DW'(xact);
        REG_ERR:      reg_val_q <= REG_DW'(errors);
        REG_DCOUNT:   reg_val_q <= REG_DW'(dcount_q);
        default:      reg_val_q <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (rd_region_q)
      2'd2:    reg_rdata = dbram_rdata[31:0];
      2'd3:    reg_rdata = dbram_rdata[63:32];
      default: reg_rdata = (rd_region_q == 2'd0) ? reg_val_q : '0;
    endcase
  end

endmodule
