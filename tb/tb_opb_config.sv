// tb_opb_config: the single-core test core built for the 32-bit peripheral
// bus, with 4-byte beats (BEAT_BYTES = 4) and 64-byte bursts
// (BURST_BYTES = 64), against the bus/memory model set to the same beat.
//
// The model latencies give 10 cycles per single 4-byte read (40 MB/s) and
// 28 cycles per 64-byte burst (228.57 MB/s) at 100 MHz, the figures quoted
// for that bus. The testbench checks the timer, the bandwidth, the counters,
// the number of stored beats and each stored word, including bursts longer
// than 64 bytes that the master splits into a full burst plus a shorter
// burst or a single beat. A sequential core built the same way runs
// single reads 4 bytes apart and 64-byte bursts on its own model; its
// timer, read count and final datum are checked.
module tb_opb_config;
  import membw_pkg::*;

  localparam int unsigned SL = 9, BL = 11, BEAT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_req_t    rq;
  logic [31:0] rdata;
  logic        bus_req, busy;
  mst_cmd_t    bus_cmd;
  logic [0:0]  req_ack, done, err;
  bus_wr_t [0:0] wr;
  int unsigned grants, contention;
  int checks = 0, failures = 0;

  test_core #(.BURST_BYTES(64), .BEAT_BYTES(BEAT)) dut (
    .clk, .rst_n, .reg_req(rq), .reg_rdata(rdata), .bus_req, .bus_cmd,
    .bus_req_ack(req_ack[0]), .bus_done(done[0]), .bus_err(err[0]), .bus_wr(wr[0]), .busy
  );

  bus_mem_model #(.NPORTS(1), .SINGLE_LAT(SL), .BURST_LAT(BL), .BEAT(BEAT)) u_bus (
    .clk, .rst_n, .req(bus_req), .cmd(bus_cmd), .req_ack, .done, .err, .wr,
    .grants, .contention_cycles(contention)
  );

  // sequential core on the same kind of bus, with its own model
  reg_req_t    sq_rq;
  logic [31:0] sq_rdata;
  logic        sq_start, sq_bus_req, sq_busy;
  mst_cmd_t    sq_bus_cmd;
  logic [0:0]  sq_ack, sq_done, sq_err;
  bus_wr_t [0:0] sq_wr;
  int unsigned sq_grants, sq_cont;

  seq_test_core #(.BURST_BYTES(64), .BEAT_BYTES(BEAT)) u_seq (
    .clk, .rst_n, .start(sq_start), .reg_req(sq_rq), .reg_rdata(sq_rdata),
    .bus_req(sq_bus_req), .bus_cmd(sq_bus_cmd), .bus_req_ack(sq_ack[0]),
    .bus_done(sq_done[0]), .bus_err(sq_err[0]), .bus_wr(sq_wr[0]), .busy(sq_busy)
  );

  bus_mem_model #(.NPORTS(1), .SINGLE_LAT(SL), .BURST_LAT(BL), .BEAT(BEAT)) u_bus2 (
    .clk, .rst_n, .req(sq_bus_req), .cmd(sq_bus_cmd), .req_ack(sq_ack), .done(sq_done),
    .err(sq_err), .wr(sq_wr), .grants(sq_grants), .contention_cycles(sq_cont)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] expect_word(logic [31:0] a);
    return {{a[31:2], 2'b0} ^ 32'hA5A5_0000, {a[31:2], 2'b0}};
  endfunction

  task automatic wr_reg(input logic [15:0] a, input logic [31:0] d);
    rq = '{wr: 1'b1, rd: 1'b0, addr: a, wdata: d};
    @(posedge clk); #1 rq = '0;
  endtask

  task automatic rd_reg(input logic [15:0] a, output logic [31:0] d);
    rq = '{wr: 1'b0, rd: 1'b1, addr: a, wdata: '0};
    @(posedge clk); #1 rq = '0; d = rdata;
  endtask

  // one test: addresses, burst flag, bytes per request, expected wait
  // cycles per request and bandwidth (0 = not checked)
  task automatic run(string name, logic [31:0] addrs[$], bit burst, int len,
                     int exp_cycles_per_req, real exp_mbps);
    logic [31:0] d, lo, hi;
    int n, beats_per_req;
    real mbps;
    n = addrs.size();
    beats_per_req = burst ? (len + BEAT - 1) / BEAT : 1;
    foreach (addrs[i]) wr_reg(16'h4000 | 16'(i), addrs[i]);
    wr_reg(16'(REG_MODE), 32'(burst));
    wr_reg(16'(REG_XFER_LEN), 32'(len));
    wr_reg(16'(REG_NUM_REQ), 32'(n));
    wr_reg(16'(REG_LOCAL), 32'h0000_0200);
    wr_reg(16'(REG_CTRL), 32'h1);
    @(posedge clk); #1;
    check(busy, {name, ": started"});
    while (busy) @(posedge clk);
    #1;
    rd_reg(16'(REG_TIMER), d);
    check(d == 32'(n * exp_cycles_per_req),
          $sformatf("%s: timer %0d expected %0d", name, d, n * exp_cycles_per_req));
    mbps = (real'(n) * beats_per_req * BEAT) / (real'(d) * 10.0e-9) / 1.0e6;
    if (exp_mbps > 0.0)
      check(mbps > exp_mbps - 0.01 && mbps < exp_mbps + 0.01,
            $sformatf("%s: %0.2f MB/s expected %0.2f", name, mbps, exp_mbps));
    $display("%s: %0d requests, %0d wait cycles, %0.2f MB/s", name, n, d, mbps);
    rd_reg(16'(REG_XACT), d);
    check(d == 32'(n), $sformatf("%s: transactions %0d", name, d));
    rd_reg(16'(REG_ERR), d);
    check(d == 0, $sformatf("%s: errors %0d", name, d));
    rd_reg(16'hB, d);
    check(d == 32'(n * beats_per_req), $sformatf("%s: beats stored %0d", name, d));
    for (int i = 0; i < n; i++)
      for (int b = 0; b < beats_per_req; b++) begin
        rd_reg(16'h8000 | 16'(i * beats_per_req + b), lo);
        rd_reg(16'hC000 | 16'(i * beats_per_req + b), hi);
        check({hi, lo} == expect_word(addrs[i] + 32'(BEAT * b)),
              $sformatf("%s: word %0d.%0d = %h expected %h", name, i, b, {hi, lo},
                        expect_word(addrs[i] + 32'(BEAT * b))));
      end
  endtask

  task automatic sq_wr_reg(input logic [15:0] a, input logic [31:0] d);
    sq_rq = '{wr: 1'b1, rd: 1'b0, addr: a, wdata: d};
    @(posedge clk); #1 sq_rq = '0;
  endtask

  task automatic sq_rd_reg(input logic [15:0] a, output logic [31:0] d);
    sq_rq = '{wr: 1'b0, rd: 1'b1, addr: a, wdata: '0};
    @(posedge clk); #1 sq_rq = '0; d = sq_rdata;
  endtask

  // n sequential reads from base on the sequential core
  task automatic sq_run(int n, bit burst, logic [31:0] base);
    logic [31:0] d, t, lo, hi, last_addr;
    int per_req, bytes;
    real mbps;
    per_req = burst ? BL + 17 : SL + 1;
    bytes   = burst ? 64 : BEAT;
    sq_wr_reg(16'(REG_MODE), 32'(burst));
    sq_wr_reg(16'(REG_XFER_LEN), 32'(bytes));
    sq_wr_reg(16'(REG_NUM_REQ), 32'(n));
    sq_wr_reg(16'(REG_LOCAL), 32'h0000_0200);
    sq_wr_reg(16'(REG_BASE), base);
    sq_start = 1; @(posedge clk); #1 sq_start = 0;
    while (sq_busy) @(posedge clk);
    #1;
    sq_rd_reg(16'(REG_TIMER), t);
    check(t == 32'(n * per_req), $sformatf("seq n=%0d burst=%0d: timer %0d expected %0d",
          n, burst, t, n * per_req));
    mbps = real'(n) * bytes / (real'(t) * 10.0e-9) / 1.0e6;
    check(burst ? (mbps > 228.56 && mbps < 228.58) : (mbps > 39.99 && mbps < 40.01),
          $sformatf("seq: %0.2f MB/s", mbps));
    sq_rd_reg(16'(REG_XACT), d);
    check(d == 32'(n), $sformatf("seq: reads %0d expected %0d", d, n));
    last_addr = base + 32'(n * bytes - BEAT);
    sq_rd_reg(16'(REG_LAST_LO), lo);
    sq_rd_reg(16'(REG_LAST_HI), hi);
    check({hi, lo} == expect_word(last_addr),
          $sformatf("seq: final datum %h expected %h", {hi, lo}, expect_word(last_addr)));
    $display("seq burst=%0d: %0d reads, %0.2f MB/s", burst, n, mbps);
  endtask

  // each request must be accepted with the length the 64-byte splitting
  // rules give
  int unsigned req_lens[$];
  always @(posedge clk)
    if (rst_n && bus_req && req_ack[0]) req_lens.push_back(32'(bus_cmd.nbytes));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a[$];
    logic [31:0] d;
    rq = '0; sq_rq = '0; sq_start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    rd_reg(16'(REG_CTRL), d);
    check(d[0] == 1'b0, "idle after reset");
    // sequential single reads, 4 bytes apart
    a.delete(); for (int i = 0; i < 24; i++) a.push_back(32'h0010_0000 + 32'(4 * i));
    req_lens.delete();
    run("single", a, 0, 4, SL + 1, 40.0);
    check(req_lens.size() == 24 && req_lens[0] == 4, "single: 4-byte requests");
    // random single reads on 4-byte boundaries
    a.delete(); for (int i = 0; i < 16; i++) a.push_back($urandom & 32'h0fff_fffc);
    run("random", a, 0, 4, SL + 1, 40.0);
    // 64-byte bursts
    a.delete(); for (int i = 0; i < 8; i++) a.push_back(32'h0030_0000 + 32'(64 * i));
    req_lens.delete();
    run("burst64", a, 1, 64, BL + 17, 228.57);
    check(req_lens.size() == 8 && req_lens[0] == 64, "burst64: one 64-byte burst each");
    // 256 bytes: four full 64-byte bursts
    a.delete(); for (int i = 0; i < 3; i++) a.push_back(32'h0040_0000 + 32'(256 * i));
    req_lens.delete();
    run("burst256", a, 1, 256, 4 * (BL + 17), 228.57);
    check(req_lens.size() == 12 && req_lens[3] == 64, "burst256: split into 64-byte bursts");
    // 100 bytes: 64-byte burst then a 36-byte last burst
    a.delete(); a.push_back(32'h0050_0000); a.push_back(32'h0050_1000);
    req_lens.delete();
    run("burst100", a, 1, 100, (BL + 17) + (BL + 10), 0.0);
    check(req_lens.size() == 4 && req_lens[0] == 64 && req_lens[1] == 36,
          "burst100: 64 + 36");
    // 68 bytes: 64-byte burst then one 4-byte single read
    a.delete(); a.push_back(32'h0060_0000);
    req_lens.delete();
    run("burst68", a, 1, 68, (BL + 17) + (SL + 1), 0.0);
    check(req_lens.size() == 2 && req_lens[0] == 64 && req_lens[1] == 4,
          "burst68: 64 + single 4-byte beat");
    // sequential core: 4-byte steps for single reads, 64-byte steps for bursts
    sq_run(1, 0, 32'h0100_0000);
    sq_run(37, 0, 32'h0100_0000);
    sq_run(1, 1, 32'h0200_0000);
    sq_run(16, 1, 32'h0200_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
