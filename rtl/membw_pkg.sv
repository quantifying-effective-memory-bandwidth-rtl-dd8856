// membw_pkg: types and constants shared by the memory-bandwidth test cores.
//
// The test cores sit behind a bus attachment (the vendor's IP interface)
// and see three bundles of plain signals, all defined here:
//   * mst_cmd_t   - a read command that the core's master side hands to the
//                   bus attachment: the off-chip address to read, the local
//                   address of the core register that the returned data is
//                   written to, the burst flag and the length in bytes.
//   * bus_wr_t    - one data beat written back into the core by the bus
//                   (the memory controller's reply, delivered as a write to
//                   the core's local data register).
//   * reg_req_t   - a software (processor) access to the core's registers.
// The 64-bit data path, the 32-bit addresses and the 128-byte burst follow
// the document's Processor Local Bus configuration; the register-bus width
// and the register map are this design's own choices.
package membw_pkg;

  localparam int unsigned ADDR_W     = 32;   // bus address width
  localparam int unsigned DATA_W     = 64;   // bus data width (64-bit PLB)
  localparam int unsigned LEN_W      = 16;   // byte-length field width
  localparam int unsigned REG_AW     = 16;   // register word-address width
  localparam int unsigned REG_DW     = 32;   // register data width

  // Read command from a core's master side to the bus attachment.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;        // off-chip address to read from
    logic [ADDR_W-1:0] local_addr;  // core register the data is written to
    logic              burst;       // 1: burst transaction, 0: single beat
    logic [LEN_W-1:0]  nbytes;      // bytes requested by this command
  } mst_cmd_t;

  // One data beat written by the bus into the core.
  typedef struct packed {
    logic              en;
    logic [ADDR_W-1:0] addr;        // local (core) address being written
    logic [DATA_W-1:0] data;
  } bus_wr_t;

  // Software access to a core's register space. rdata of a read is valid
  // on the cycle after rd is sampled.
  typedef struct packed {
    logic              wr;
    logic              rd;
    logic [REG_AW-1:0] addr;        // word address
    logic [REG_DW-1:0] wdata;
  } reg_req_t;

  // Register word addresses shared by both test cores.
  localparam logic [3:0] REG_CTRL     = 4'h0; // W: bit0 start / R: bit0 busy
  localparam logic [3:0] REG_MODE     = 4'h1; // bit0 burst
  localparam logic [3:0] REG_XFER_LEN = 4'h2; // transfer length in bytes
  localparam logic [3:0] REG_NUM_REQ  = 4'h3; // number of requests in a test
  localparam logic [3:0] REG_LOCAL    = 4'h4; // local data-register address
  localparam logic [3:0] REG_TIMER    = 4'h5; // R: wait-for-data cycles
  localparam logic [3:0] REG_XACT     = 4'h6; // R: completed requests
  localparam logic [3:0] REG_ERR      = 4'h7; // R: requests ending in error
  localparam logic [3:0] REG_BASE     = 4'h8; // sequential core: start address
  localparam logic [3:0] REG_LAST_LO  = 4'h9; // sequential core: last datum
  localparam logic [3:0] REG_LAST_HI  = 4'hA;

  // Bytes in the widest data beat the cores carry. Each core's BEAT_BYTES
  // parameter sets the beat of the bus it sits on: 8 for the 64-bit
  // processor bus, 4 for the 32-bit peripheral bus (low half of `data`).
  localparam int unsigned MAX_BEAT_BYTES = DATA_W / 8;

endpackage
