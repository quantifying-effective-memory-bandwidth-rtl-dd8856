// tb_multicore_sweep: the multi-core workload on membw_top at its default
// parameters. 1, 2, 4 and 8 sequential cores are started together by the
// controller core and read 1, 4, 16, 64, 256, 1024, 4096, 16384 and 65536
// contiguous addresses each, as single reads and as 128-byte bursts. The
// shared behavioural bus model serves one transfer
// at a time. For every run the testbench checks each core's read count and
// final datum, that a lone core waits exactly the uncontended time, that
// per-core bandwidth does not rise as cores are added, and that the
// bytes delivered per wall-clock cycle stay within what the model's bus can
// move. It prints per-core bandwidth, their sum (the aggregate), and the
// delivered rate in MB/s at 100 MHz.
module tb_multicore_sweep;
  import membw_pkg::*;

  localparam int unsigned N = 8, SL = 17, BL = 31;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_req_t                sc_rq, ctl_rq;
  logic [31:0]             sc_rdata, ctl_rdata;
  logic                    sc_bus_req, sc_busy;
  mst_cmd_t                sc_bus_cmd;
  reg_req_t [N-1:0]        mc_rq;
  logic [N-1:0][31:0]      mc_rdata;
  logic [N-1:0]            mc_bus_req, mc_ack, mc_done, mc_err, mc_busy;
  mst_cmd_t [N-1:0]        mc_bus_cmd;
  bus_wr_t [N-1:0]         mc_wr;
  int unsigned mc_grants, mc_cont;
  int checks = 0, failures = 0;

  membw_top dut (
    .clk, .rst_n,
    .sc_reg_req(sc_rq), .sc_reg_rdata(sc_rdata), .sc_bus_req, .sc_bus_cmd,
    .sc_bus_req_ack(1'b0), .sc_bus_done(1'b0), .sc_bus_err(1'b0),
    .sc_bus_wr('0), .sc_busy,
    .ctl_reg_req(ctl_rq), .ctl_reg_rdata(ctl_rdata),
    .mc_reg_req(mc_rq), .mc_reg_rdata(mc_rdata), .mc_bus_req, .mc_bus_cmd,
    .mc_bus_req_ack(mc_ack), .mc_bus_done(mc_done), .mc_bus_err(mc_err),
    .mc_bus_wr(mc_wr), .mc_busy
  );

  bus_mem_model #(.NPORTS(N), .SINGLE_LAT(SL), .BURST_LAT(BL)) u_bus (
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

  real prev_avg;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // returns the average per-core bandwidth in MB/s
  task automatic run(int k, int n, bit burst, output real avg);
    logic [31:0] d, lo, hi;
    int bytes, per_req;
    longint t_sum, t_max, t0, elapsed;
    real agg, wall, limit;
    bytes   = burst ? 128 : 8;
    per_req = burst ? BL + 17 : SL + 1;
    for (int c = 0; c < k; c++) begin
      mc_wr_reg(c, 16'(REG_MODE), 32'(burst));
      mc_wr_reg(c, 16'(REG_XFER_LEN), 32'(bytes));
      mc_wr_reg(c, 16'(REG_NUM_REQ), 32'(n));
      mc_wr_reg(c, 16'(REG_LOCAL), 32'h0000_0200);
      mc_wr_reg(c, 16'(REG_BASE), 32'h0100_0000 + 32'(c) * 32'h0100_0000);
    end
    ctl_wr_reg(16'd0, 32'((1 << k) - 1));
    ctl_wr_reg(16'd1, 32'h1);
    t0 = cycle;
    @(posedge clk); #1;
    while (mc_busy != '0) @(posedge clk);
    #1;
    elapsed = cycle - t0;
    t_sum = 0; t_max = 0;
    for (int c = 0; c < k; c++) begin
      mc_rd_reg(c, 16'(REG_XACT), d);
      check(d == 32'(n), $sformatf("k=%0d n=%0d core %0d reads %0d", k, n, c, d));
      mc_rd_reg(c, 16'(REG_TIMER), d);
      if (k == 1) check(d == 32'(n * per_req), $sformatf("lone core timer %0d", d));
      else        check(d >= 32'(n * per_req), $sformatf("core %0d timer %0d", c, d));
      t_sum += d;
      if (d > t_max) t_max = d;
      mc_rd_reg(c, 16'(REG_LAST_LO), lo);
      mc_rd_reg(c, 16'(REG_LAST_HI), hi);
      check({hi, lo} == expect_word(32'h0100_0000 + 32'(c) * 32'h0100_0000 + 32'(n * bytes - 8)),
            $sformatf("k=%0d core %0d final datum %h", k, c, {hi, lo}));
    end
    avg = real'(n) * bytes / (real'(t_sum) / k * 10.0e-9) / 1.0e6;
    // aggregate as the sum of the cores' own bandwidths
    agg = avg * k;
    // delivered bytes over wall-clock time cannot exceed what the model's
    // bus moves: one transfer at a time, L cycles plus one per extra beat
    wall  = real'(n) * bytes * k / (real'(elapsed) * 10.0e-9) / 1.0e6;
    limit = real'(bytes) / (real'(burst ? BL + 15 : SL) * 10.0e-9) / 1.0e6;
    check(wall <= limit + 0.01, $sformatf("delivered %0.2f MB/s above bus limit %0.2f", wall, limit));
    $display("cores=%0d reads=%0d burst=%0d: per-core %0.2f MB/s, sum of cores %0.2f MB/s, delivered %0.2f MB/s",
             k, n, burst, avg, agg, wall);
  endtask

  int counts[9] = '{1, 4, 16, 64, 256, 1024, 4096, 16384, 65536};
  int cores[4]  = '{1, 2, 4, 8};

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real avg;
    sc_rq = '0; ctl_rq = '0; mc_rq = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 2; b++)
      foreach (counts[j]) begin
        prev_avg = 1.0e9;
        foreach (cores[i]) begin
          run(cores[i], counts[j], b[0], avg);
          check(avg <= prev_avg + 0.01, $sformatf("per-core bandwidth rose with %0d cores", cores[i]));
          prev_avg = avg;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
