// tb_membw_top: end-to-end test of membw_top at its default parameters
// (eight multi-core test cores, 512-entry BRAMs, 128-byte bursts).
//
// Two behavioural bus/memory models stand in for the bought-in parts: one
// serves the single-core test core, one is shared by the eight sequential
// cores through a round-robin arbiter, so those cores contend for it.
// Part 1 runs the single core through sequential, strided and random
// single reads, 128-byte bursts, a transfer split into bursts with a
// shorter last burst and a single-beat tail, bus errors, and a test long
// enough to wrap the data BRAM, checking timer, counters and data.
// Part 2 programs the sequential cores, starts a subset and then all eight
// through the controller core, and checks every core's read count, final
// datum, the cores left out, and the slow-down caused by sharing the bus.
// Each mechanism is counted and a failure is counted for any that never
// occurred.
module tb_membw_top;
  import membw_pkg::*;

  localparam int unsigned N = 8, SL = 17, BL = 31;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_req_t                sc_rq, ctl_rq;
  logic [31:0]             sc_rdata, ctl_rdata;
  logic                    sc_bus_req, sc_busy;
  mst_cmd_t                sc_bus_cmd;
  logic [0:0]              sc_ack, sc_done, sc_err;
  bus_wr_t [0:0]           sc_wr;
  reg_req_t [N-1:0]        mc_rq;
  logic [N-1:0][31:0]      mc_rdata;
  logic [N-1:0]            mc_bus_req, mc_ack, mc_done, mc_err, mc_busy;
  mst_cmd_t [N-1:0]        mc_bus_cmd;
  bus_wr_t [N-1:0]         mc_wr;
  int unsigned sc_grants, sc_cont, mc_grants, mc_cont;
  int checks = 0, failures = 0;

  membw_top dut (
    .clk, .rst_n,
    .sc_reg_req(sc_rq), .sc_reg_rdata(sc_rdata), .sc_bus_req, .sc_bus_cmd,
    .sc_bus_req_ack(sc_ack[0]), .sc_bus_done(sc_done[0]), .sc_bus_err(sc_err[0]),
    .sc_bus_wr(sc_wr[0]), .sc_busy,
    .ctl_reg_req(ctl_rq), .ctl_reg_rdata(ctl_rdata),
    .mc_reg_req(mc_rq), .mc_reg_rdata(mc_rdata), .mc_bus_req, .mc_bus_cmd,
    .mc_bus_req_ack(mc_ack), .mc_bus_done(mc_done), .mc_bus_err(mc_err),
    .mc_bus_wr(mc_wr), .mc_busy
  );

  bus_mem_model #(.NPORTS(1), .SINGLE_LAT(SL), .BURST_LAT(BL)) u_sc_bus (
    .clk, .rst_n, .req(sc_bus_req), .cmd(sc_bus_cmd), .req_ack(sc_ack),
    .done(sc_done), .err(sc_err), .wr(sc_wr), .grants(sc_grants),
    .contention_cycles(sc_cont)
  );

  bus_mem_model #(.NPORTS(N), .SINGLE_LAT(SL), .BURST_LAT(BL)) u_mc_bus (
    .clk, .rst_n, .req(mc_bus_req), .cmd(mc_bus_cmd), .req_ack(mc_ack),
    .done(mc_done), .err(mc_err), .wr(mc_wr), .grants(mc_grants),
    .contention_cycles(mc_cont)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] expect_word(logic [31:0] a);
    return {{a[31:3], 3'b0} ^ 32'hA5A5_0000, {a[31:3], 3'b0}};
  endfunction

  // ---- mechanism counters
  int n_single, n_full_burst, n_last_burst, n_bus_err, n_bram_wrap,
      n_subset_start, n_contention, n_mc_burst;

  always @(posedge clk) if (rst_n) begin
    if (sc_bus_req && sc_ack[0]) begin
      if (!sc_bus_cmd.burst)              n_single++;
      else if (sc_bus_cmd.nbytes == 128)  n_full_burst++;
      else                                n_last_burst++;
    end
    if (sc_done[0] && sc_err[0]) n_bus_err++;
    for (int i = 0; i < int'(N); i++)
      if (mc_bus_req[i] && mc_ack[i] && mc_bus_cmd[i].burst) n_mc_burst++;
  end

  // ---- register access helpers
  task automatic sc_wr_reg(input logic [15:0] a, input logic [31:0] d);
    sc_rq = '{wr: 1'b1, rd: 1'b0, addr: a, wdata: d};
    @(posedge clk); #1 sc_rq = '0;
  endtask
  task automatic sc_rd_reg(input logic [15:0] a, output logic [31:0] d);
    sc_rq = '{wr: 1'b0, rd: 1'b1, addr: a, wdata: '0};
    @(posedge clk); #1 sc_rq = '0; d = sc_rdata;
  endtask
  task automatic ctl_wr_reg(input logic [15:0] a, input logic [31:0] d);
    ctl_rq = '{wr: 1'b1, rd: 1'b0, addr: a, wdata: d};
    @(posedge clk); #1 ctl_rq = '0;
  endtask
  task automatic mc_wr_reg(input int c, input logic [15:0] a, input logic [31:0] d);
    mc_rq[c] = '{wr: 1'b1, rd: 1'b0, addr: a, wdata: d};
    @(posedge clk); #1 mc_rq[c] = '0;
  endtask
  task automatic mc_rd_reg(input int c, input logic [15:0] a, output logic [31:0] d);
    mc_rq[c] = '{wr: 1'b0, rd: 1'b1, addr: a, wdata: '0};
    @(posedge clk); #1 mc_rq[c] = '0; d = mc_rdata[c];
  endtask

  // expected wait cycles of one request of `len` bytes (burst) or one beat
  function automatic int req_cycles(bit burst, int len);
    int c, rem, l;
    if (!burst) return SL + 1;
    c = 0; rem = len;
    l = rem >= 128 ? 128 : rem;
    while (1) begin
      c += BL + (l / 8) - 1 + 1;
      rem -= l;
      if (rem == 0) break;
      c += 1;
      if (rem <= 8) begin c += SL; break; end
      l = rem >= 128 ? 128 : rem;
    end
    return c + 1;
  endfunction

  // ---- part 1: single-core test core
  task automatic sc_run(string name, logic [31:0] addrs[$], bit burst, int len);
    logic [31:0] d, lo, hi;
    int n, bpr, nerr, total, first;
    n = addrs.size();
    bpr = burst ? (len + 7) / 8 : 1;
    foreach (addrs[i]) sc_wr_reg(16'h4000 | 16'(i), addrs[i]);
    sc_wr_reg(16'(REG_MODE), 32'(burst));
    sc_wr_reg(16'(REG_XFER_LEN), 32'(len));
    sc_wr_reg(16'(REG_NUM_REQ), 32'(n));
    sc_wr_reg(16'(REG_LOCAL), 32'h0000_0100);
    sc_wr_reg(16'(REG_CTRL), 32'h1);
    @(posedge clk); #1;
    while (sc_busy) @(posedge clk);
    #1;
    sc_rd_reg(16'(REG_TIMER), d);
    check(d == 32'(n * req_cycles(burst, len)),
          $sformatf("%s: timer %0d expected %0d", name, d, n * req_cycles(burst, len)));
    sc_rd_reg(16'(REG_XACT), d);
    check(d == 32'(n), $sformatf("%s: transactions %0d", name, d));
    nerr = 0;
    foreach (addrs[i]) nerr += addrs[i][31];
    sc_rd_reg(16'(REG_ERR), d);
    check(d == 32'(nerr), $sformatf("%s: errors %0d expected %0d", name, d, nerr));
    total = n * bpr;
    sc_rd_reg(16'hB, d);
    check(d == 32'(total), $sformatf("%s: beats %0d expected %0d", name, d, total));
    if (total > 512) n_bram_wrap++;
    // check the last min(total, 512) stored beats
    first = total > 512 ? total - 512 : 0;
    for (int k = first; k < total; k++) begin
      sc_rd_reg(16'h8000 | 16'(k % 512), lo);
      sc_rd_reg(16'hC000 | 16'(k % 512), hi);
      check({hi, lo} == expect_word(addrs[k / bpr] + 32'(8 * (k % bpr))),
            $sformatf("%s: beat %0d = %h", name, k, {hi, lo}));
    end
  endtask

  // ---- part 2: multi-core
  task automatic mc_run(logic [N-1:0] sel, int n, bit burst);
    logic [31:0] d, lo, hi;
    int bytes;
    int unsigned cont0;
    logic [31:0] prev [N];
    bytes = burst ? 128 : 8;
    for (int c = 0; c < int'(N); c++) begin
      mc_wr_reg(c, 16'(REG_MODE), 32'(burst));
      mc_wr_reg(c, 16'(REG_XFER_LEN), 32'(bytes));
      mc_wr_reg(c, 16'(REG_NUM_REQ), 32'(n));
      mc_wr_reg(c, 16'(REG_LOCAL), 32'h0000_0200);
      mc_wr_reg(c, 16'(REG_BASE), 32'h0100_0000 + 32'(c) * 32'h0010_0000);
    end
    for (int c = 0; c < int'(N); c++) mc_rd_reg(c, 16'(REG_XACT), prev[c]);
    cont0 = mc_cont;
    ctl_wr_reg(16'd0, 32'(sel));
    ctl_wr_reg(16'd1, 32'h1);
    @(posedge clk); #1;
    check(mc_busy == sel, $sformatf("started %b expected %b", mc_busy, sel));
    if (sel != '1 && sel != '0) n_subset_start++;
    while (mc_busy != '0) @(posedge clk);
    #1;
    if (mc_cont != cont0) n_contention++;
    for (int c = 0; c < int'(N); c++) begin
      mc_rd_reg(c, 16'(REG_XACT), d);
      if (sel[c]) begin
        check(d == 32'(n), $sformatf("core %0d reads %0d expected %0d", c, d, n));
        mc_rd_reg(c, 16'(REG_TIMER), d);
        // alone a core waits exactly n * per-request cycles; sharing the
        // bus can only add to that, and with k cores each waits for the
        // others' transfers too
        check(d >= 32'(n * req_cycles(burst, bytes)), $sformatf("core %0d timer %0d", c, d));
        if ($countones(sel) == 1)
          check(d == 32'(n * req_cycles(burst, bytes)), "lone core exact timer");
        else
          check(d > 32'(n * req_cycles(burst, bytes)), $sformatf("core %0d slowed by sharing", c));
        $display("mc sel=%b burst=%0d core %0d: %0d reads, %0d wait cycles, %0.2f MB/s",
                 sel, burst, c, n, d, real'(n * bytes) / (real'(d) * 10.0e-9) / 1.0e6);
        mc_rd_reg(c, 16'(REG_LAST_LO), lo);
        mc_rd_reg(c, 16'(REG_LAST_HI), hi);
        check({hi, lo} == expect_word(32'h0100_0000 + 32'(c) * 32'h0010_0000 + 32'(n * bytes - 8)),
              $sformatf("core %0d final datum %h", c, {hi, lo}));
      end else
        check(d == prev[c], $sformatf("core %0d not selected but its count changed to %0d", c, d));
      mc_rd_reg(c, 16'(REG_ERR), d);
      check(d == 0, "no errors");
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a[$];
    sc_rq = '0; ctl_rq = '0; mc_rq = '0;
    n_single = 0; n_full_burst = 0; n_last_burst = 0; n_bus_err = 0; n_bram_wrap = 0;
    n_subset_start = 0; n_contention = 0; n_mc_burst = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    a.delete(); for (int i = 0; i < 16; i++) a.push_back(32'h0010_0000 + 32'(8 * i));
    sc_run("sequential", a, 0, 8);
    a.delete(); for (int i = 0; i < 16; i++) a.push_back(32'h0020_0000 + 32'(1024 * i));
    sc_run("strided", a, 0, 8);
    a.delete(); for (int i = 0; i < 16; i++) a.push_back($urandom & 32'h0fff_fff8);
    sc_run("random", a, 0, 8);
    a.delete(); for (int i = 0; i < 4; i++) a.push_back(32'h0030_0000 + 32'(128 * i));
    sc_run("burst", a, 1, 128);
    a.delete(); for (int i = 0; i < 3; i++) a.push_back(32'h0040_0000 + 32'(1024 * i));
    sc_run("burst-split", a, 1, 336);        // 128 + 128 + 80 (last burst)
    a.delete(); for (int i = 0; i < 2; i++) a.push_back(32'h0050_0000 + 32'(1024 * i));
    sc_run("burst-tail", a, 1, 264);         // 128 + 128 + 8 (single)
    a.delete(); for (int i = 0; i < 8; i++) a.push_back(32'h8000_0000 + 32'(8 * i) * (i % 2));
    sc_run("errors", a, 0, 8);
    a.delete(); for (int i = 0; i < 5; i++) a.push_back(32'h0060_0000 + 32'(2048 * i));
    sc_run("bram-wrap", a, 1, 1024);         // 640 beats into 512 entries

    mc_run(8'b0000_0101, 32, 0);             // two cores, single reads
    mc_run(8'b0000_1000, 32, 0);             // one core alone
    mc_run(8'b1111_1111, 64, 0);             // all eight, single reads
    mc_run(8'b1111_1111, 16, 1);             // all eight, bursts

    $display("mechanisms: single=%0d full_burst=%0d last_burst=%0d bus_err=%0d bram_wrap=%0d subset_start=%0d contention=%0d mc_burst=%0d",
             n_single, n_full_burst, n_last_burst, n_bus_err, n_bram_wrap, n_subset_start,
             n_contention, n_mc_burst);
    check(n_single > 0, "single reads happened");
    check(n_full_burst > 0, "full bursts happened");
    check(n_last_burst > 0, "short last bursts happened");
    check(n_bus_err > 0, "bus errors happened");
    check(n_bram_wrap > 0, "data BRAM wrapped");
    check(n_subset_start > 0, "subset of cores started");
    check(n_contention > 0, "cores contended for the bus");
    check(n_mc_burst > 0, "multi-core bursts happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
