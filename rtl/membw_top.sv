// membw_top: the hardware of the memory-bandwidth test system.
//
// Two measurement set-ups share this top, each with its own ports:
//   * the single-core set-up: one full test_core (address BRAM, slave and
//     master FSMs, data BRAM, counters) that reads any software-supplied
//     address list - sequential, strided or random - in single or burst
//     transactions;
//   * the multi-core set-up: a controller_core and NUM_CORES (eight, the
//     most the document's FPGA held) seq_test_core instances doing
//     sequential reads, all started on the same edge by the controller.
// The on-chip buses with their arbiters and bridges, the processor, the
// vendor bus attachments and the DDR memory controller are bought-in
// parts, not designed here. Their connections are therefore ports:
//   sc_*  single core:  register access, bus read request (valid/ready),
//                       completion, and the data beats written back;
//   ctl_* controller core register access;
//   mc_*  one entry per multi-core test core, same bundle as sc_*.
// All bus-side signals are synchronous to clk (the 100 MHz bus clock in the
// document). The split into single-core and multi-core set-ups and the
// core count follow the document; how the ports are grouped is this
// design's choice.
//
// BURST_BYTES and BEAT_BYTES choose the bus: 128 and 8 for the 64-bit
// processor bus (default), 64 and 4 for the 32-bit peripheral bus, whose
// beats arrive in the low half of the data field.
module membw_top
  import membw_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 8,
  parameter int unsigned ADDR_DEPTH  = 512,
  parameter int unsigned DATA_DEPTH  = 512,
  parameter int unsigned BURST_BYTES = 128,
  parameter int unsigned BEAT_BYTES  = 8,
  parameter int unsigned CNT_W       = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // ---- single-core test core
  input  reg_req_t                          sc_reg_req,
  output logic [REG_DW-1:0]                 sc_reg_rdata,
  output logic                              sc_bus_req,
  output mst_cmd_t                          sc_bus_cmd,
  input  logic                              sc_bus_req_ack,
  input  logic                              sc_bus_done,
  input  logic                              sc_bus_err,
  input  bus_wr_t                           sc_bus_wr,
  output logic                              sc_busy,
  // ---- controller core
  input  reg_req_t                          ctl_reg_req,
  output logic [REG_DW-1:0]                 ctl_reg_rdata,
  // ---- multi-core sequential test cores
  input  reg_req_t [NUM_CORES-1:0]          mc_reg_req,
  output logic [NUM_CORES-1:0][REG_DW-1:0]  mc_reg_rdata,
  output logic [NUM_CORES-1:0]              mc_bus_req,
  output mst_cmd_t [NUM_CORES-1:0]          mc_bus_cmd,
  input  logic [NUM_CORES-1:0]              mc_bus_req_ack,
  input  logic [NUM_CORES-1:0]              mc_bus_done,
  input  logic [NUM_CORES-1:0]              mc_bus_err,
  input  bus_wr_t [NUM_CORES-1:0]           mc_bus_wr,
  output logic [NUM_CORES-1:0]              mc_busy
);

  test_core #(
    .ADDR_DEPTH(ADDR_DEPTH), .DATA_DEPTH(DATA_DEPTH),
    .BURST_BYTES(BURST_BYTES), .BEAT_BYTES(BEAT_BYTES), .CNT_W(CNT_W)
  ) u_single (
    .clk, .rst_n,
    .reg_req     (sc_reg_req),
    .reg_rdata   (sc_reg_rdata),
    .bus_req     (sc_bus_req),
    .bus_cmd     (sc_bus_cmd),
    .bus_req_ack (sc_bus_req_ack),
    .bus_done    (sc_bus_done),
    .bus_err     (sc_bus_err),
    .bus_wr      (sc_bus_wr),
    .busy        (sc_busy)
  );

  logic [NUM_CORES-1:0] start;

  controller_core #(.NUM_CORES(NUM_CORES)) u_ctrl (
    .clk, .rst_n,
    .reg_req   (ctl_reg_req),
    .reg_rdata (ctl_reg_rdata),
    .busy      (mc_busy),
    .start     (start)
  );

  for (genvar i = 0; i < NUM_CORES; i++) begin : g_core
    seq_test_core #(.BURST_BYTES(BURST_BYTES), .BEAT_BYTES(BEAT_BYTES), .CNT_W(CNT_W)) u_core (
      .clk, .rst_n,
      .start       (start[i]),
      .reg_req     (mc_reg_req[i]),
      .reg_rdata   (mc_reg_rdata[i]),
      .bus_req     (mc_bus_req[i]),
      .bus_cmd     (mc_bus_cmd[i]),
      .bus_req_ack (mc_bus_req_ack[i]),
      .bus_done    (mc_bus_done[i]),
      .bus_err     (mc_bus_err[i]),
      .bus_wr      (mc_bus_wr[i]),
      .busy        (mc_busy[i])
    );
  end

endmodule
