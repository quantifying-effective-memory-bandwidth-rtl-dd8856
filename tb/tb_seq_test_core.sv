// tb_seq_test_core: end-to-end test of one simplified sequential test core
// through its register interface and start line, against the behavioural
// bus/memory model (18 wait cycles per single read, 48 per 128-byte
// burst). For the document's request counts it checks the timer, the read
// and error counters, the bandwidth and the final datum against memory.
module tb_seq_test_core;
  import membw_pkg::*;

  localparam int unsigned SL = 17, BL = 31;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_req_t    rq;
  logic [31:0] rdata;
  logic        start, bus_req, busy;
  mst_cmd_t    bus_cmd;
  logic [0:0]  req_ack, done, err;
  bus_wr_t [0:0] wr;
  int unsigned grants, contention;
  int checks = 0, failures = 0;

  seq_test_core dut (
    .clk, .rst_n, .start, .reg_req(rq), .reg_rdata(rdata), .bus_req, .bus_cmd,
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

  task automatic run(int n, bit burst, logic [31:0] base);
    logic [31:0] d, lo, hi, last_addr;
    int per_req, bytes;
    real mbps, exp_mbps;
    per_req  = burst ? BL + 17 : SL + 1;
    bytes    = burst ? 128 : 8;
    exp_mbps = burst ? 266.67 : 44.44;
    wr_reg(16'(REG_MODE), 32'(burst));
    wr_reg(16'(REG_XFER_LEN), 32'(bytes));
    wr_reg(16'(REG_NUM_REQ), 32'(n));
    wr_reg(16'(REG_LOCAL), 32'h0000_0200);
    wr_reg(16'(REG_BASE), base);
    start = 1; @(posedge clk); #1 start = 0;
    while (busy) @(posedge clk);
    #1;
    rd_reg(16'(REG_TIMER), d);
    check(d == 32'(n * per_req), $sformatf("n=%0d burst=%0d: timer %0d expected %0d",
          n, burst, d, n * per_req));
    mbps = real'(n) * bytes / (real'(d) * 10.0e-9) / 1.0e6;
    check(mbps > exp_mbps - 0.01 && mbps < exp_mbps + 0.01, $sformatf("bandwidth %0.2f", mbps));
    rd_reg(16'(REG_XACT), d);
    check(d == 32'(n), $sformatf("reads %0d expected %0d", d, n));
    rd_reg(16'(REG_ERR), d);
    check(d == (base[31] ? 32'(n) : 0), $sformatf("errors %0d", d));
    last_addr = base + 32'(n * bytes - 8);
    rd_reg(16'(REG_LAST_LO), lo);
    rd_reg(16'(REG_LAST_HI), hi);
    check({hi, lo} == expect_word(last_addr),
          $sformatf("final datum %h expected %h", {hi, lo}, expect_word(last_addr)));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int counts[6] = '{1, 4, 16, 64, 256, 1024};

  initial begin
    rq = '0; start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (counts[i]) begin
      run(counts[i], 0, 32'h0100_0000);
      run(counts[i], 1, 32'h0200_0000);
    end
    run(3, 0, 32'h8000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
