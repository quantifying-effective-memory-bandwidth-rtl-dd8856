// tb_test_core: end-to-end test of the single-core test core through its
// register interface, against the behavioural bus/memory model.
//
// The model's latencies are set so that one non-burst read keeps the core
// waiting 18 bus cycles and one 128-byte burst 48 cycles, which at 100 MHz
// are 44.44 MB/s and 266.67 MB/s, the simulated processor-bus figures the
// design was characterised with. Software-style set-up loads the address
// BRAM with sequential, strided and random address lists; for each test the
// testbench checks the timer (exact cycle count), the resulting bandwidth,
// the transaction and error counters, the number of stored beats and every
// stored data word against the memory contents.
module tb_test_core;
  import membw_pkg::*;

  localparam int unsigned SL = 17, BL = 31;

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

  test_core dut (
    .clk, .rst_n, .reg_req(rq), .reg_rdata(rdata), .bus_req, .bus_cmd,
    .bus_req_ack(req_ack[0]), .bus_done(done[0]), .bus_err(err[0]), .bus_wr(wr[0]), .busy
  );

  bus_mem_model #(.NPORTS(1), .SINGLE_LAT(SL), .BURST_LAT(BL)) u_bus (
    .clk, .rst_n, .req(bus_req), .cmd(bus_cmd), .req_ack, .done, .err, .wr,
    .grants, .contention_cycles(contention)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] expect_word(logic [31:0] a);
    return {{a[31:3], 3'b0} ^ 32'hA5A5_0000, {a[31:3], 3'b0}};
  endfunction

  task automatic wr_reg(input logic [15:0] a, input logic [31:0] d);
    rq = '{wr: 1'b1, rd: 1'b0, addr: a, wdata: d};
    @(posedge clk); #1 rq = '0;
  endtask

  task automatic rd_reg(input logic [15:0] a, output logic [31:0] d);
    rq = '{wr: 1'b0, rd: 1'b1, addr: a, wdata: '0};
    @(posedge clk); #1 rq = '0; d = rdata;
  endtask

  // run one test: addresses in addrs, burst flag, bytes per request
  task automatic run(string name, logic [31:0] addrs[$], bit burst, int len,
                     int exp_cycles_per_req, real exp_mbps);
    logic [31:0] d, lo, hi;
    int n, beats_per_req, nerr;
    real mbps;
    n = addrs.size();
    beats_per_req = burst ? len / 8 : 1;
    foreach (addrs[i]) wr_reg(16'h4000 | 16'(i), addrs[i]);
    wr_reg(16'(REG_MODE), 32'(burst));
    wr_reg(16'(REG_XFER_LEN), 32'(len));
    wr_reg(16'(REG_NUM_REQ), 32'(n));
    wr_reg(16'(REG_LOCAL), 32'h0000_0100);
    wr_reg(16'(REG_CTRL), 32'h1);
    @(posedge clk); #1;
    check(busy, {name, ": started"});
    while (busy) @(posedge clk);
    #1;
    rd_reg(16'(REG_TIMER), d);
    check(d == 32'(n * exp_cycles_per_req),
          $sformatf("%s: timer %0d expected %0d", name, d, n * exp_cycles_per_req));
    mbps = (real'(n) * beats_per_req * 8.0) / (real'(d) * 10.0e-9) / 1.0e6;
    if (exp_mbps > 0.0)
      check(mbps > exp_mbps - 0.01 && mbps < exp_mbps + 0.01,
            $sformatf("%s: %0.2f MB/s expected %0.2f", name, mbps, exp_mbps));
    $display("%s: %0d requests, %0d wait cycles, %0.2f MB/s", name, n, d, mbps);
    rd_reg(16'(REG_XACT), d);
    check(d == 32'(n), $sformatf("%s: transactions %0d", name, d));
    nerr = 0;
    foreach (addrs[i]) nerr += addrs[i][31];
    rd_reg(16'(REG_ERR), d);
    check(d == 32'(nerr), $sformatf("%s: errors %0d expected %0d", name, d, nerr));
    rd_reg(16'hB, d);
    check(d == 32'(n * beats_per_req), $sformatf("%s: beats stored %0d", name, d));
    for (int i = 0; i < n; i++)
      for (int b = 0; b < beats_per_req; b++) begin
        rd_reg(16'h8000 | 16'(i * beats_per_req + b), lo);
        rd_reg(16'hC000 | 16'(i * beats_per_req + b), hi);
        check({hi, lo} == expect_word(addrs[i] + 32'(8 * b)),
              $sformatf("%s: word %0d.%0d = %h expected %h", name, i, b, {hi, lo},
                        expect_word(addrs[i] + 32'(8 * b))));
      end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a[$];
    logic [31:0] d;
    rq = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    rd_reg(16'(REG_CTRL), d);
    check(d[0] == 1'b0, "idle after reset");
    // sequential, non-burst
    a.delete(); for (int i = 0; i < 32; i++) a.push_back(32'h0010_0000 + 32'(8 * i));
    run("sequential", a, 0, 8, SL + 1, 44.44);
    // strided, 256-byte stride
    a.delete(); for (int i = 0; i < 32; i++) a.push_back(32'h0020_0000 + 32'(256 * i));
    run("strided", a, 0, 8, SL + 1, 44.44);
    // random
    a.delete(); for (int i = 0; i < 32; i++) a.push_back($urandom & 32'h0fff_fff8);
    run("random", a, 0, 8, SL + 1, 44.44);
    // sequential burst, 128 bytes per request
    a.delete(); for (int i = 0; i < 8; i++) a.push_back(32'h0030_0000 + 32'(128 * i));
    run("burst", a, 1, 128, BL + 17, 266.67);
    // longer transfer length split into 128-byte bursts by the master
    a.delete(); for (int i = 0; i < 4; i++) a.push_back(32'h0040_0000 + 32'(512 * i));
    run("burst512", a, 1, 512, 4 * (BL + 17), 266.67);
    // reads that the bus ends with an error
    a.delete(); for (int i = 0; i < 6; i++) a.push_back((i % 2 == 1 ? 32'h8000_0000 : 0) + 32'(8 * i));
    run("errors", a, 0, 8, SL + 1, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
