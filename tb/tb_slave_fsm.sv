// tb_slave_fsm: self-checking test of slave_fsm. The testbench models the
// address BRAM (one-cycle synchronous read) and a master FSM that accepts
// each command after a random delay and completes it a random number of
// cycles later. It checks that the commands carry the BRAM addresses in
// order with the configured burst/length/local fields, that the timer
// enable is high for exactly the cycles between issue and completion,
// the completion and error pulses, and the return to IDLE after num_req.
module tb_slave_fsm;
  import membw_pkg::*;
  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start_test, burst;
  logic [31:0] num_req;
  logic [15:0] xfer_len;
  logic [31:0] local_addr;
  logic        abram_re;
  logic [5:0]  abram_raddr;
  logic [31:0] abram_rdata;
  logic        m_start, m_req_issued, m_ack, m_err;
  mst_cmd_t    m_cmd;
  logic        busy, clear, timing, xact_done, xact_err;
  logic [31:0] amem [DEPTH];
  int checks = 0, failures = 0;

  slave_fsm #(.ADDR_DEPTH(DEPTH)) dut (.*);

  always_ff @(posedge clk) if (abram_re) abram_rdata <= amem[abram_raddr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_cmd, exp_wait, n_timing, n_done, n_err, exp_err;

  always @(posedge clk) begin
    if (rst_n && timing) n_timing++;
    if (rst_n && xact_done) begin
      n_done++;
      if (xact_err) n_err++;
    end
  end

  // master model
  initial begin
    int d, r;
    m_req_issued = 0; m_ack = 0; m_err = 0;
    forever begin
      @(negedge clk);
      if (m_start) begin
        r = $urandom_range(0, 3);
        repeat (r) begin
          @(negedge clk);
          check(m_start, "command held until issued");
        end
        check(m_cmd.addr == amem[n_cmd] && m_cmd.burst == burst &&
              m_cmd.nbytes == xfer_len && m_cmd.local_addr == local_addr,
              $sformatf("command %0d addr %h expected %h", n_cmd, m_cmd.addr, amem[n_cmd]));
        n_cmd++;
        m_req_issued = 1;
        @(negedge clk);
        m_req_issued = 0;
        d = $urandom_range(1, 12);
        exp_wait += d;
        repeat (d - 1) @(negedge clk);
        m_ack = 1; m_err = $urandom_range(0, 1);
        exp_err += m_err;
        @(negedge clk);
        m_ack = 0; m_err = 0;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_test(int n);
    foreach (amem[i]) amem[i] = $urandom & 32'h7fff_fff8;
    num_req = n; burst = $urandom_range(0, 1); xfer_len = 16'(8 * $urandom_range(1, 64));
    local_addr = $urandom;
    n_cmd = 0; exp_wait = 0; n_timing = 0; n_done = 0; n_err = 0; exp_err = 0;
    @(negedge clk);
    start_test = 1;
    #1 check(clear, "counter clear with start");
    @(negedge clk);
    start_test = 0;
    while (busy) @(negedge clk);
    check(n_cmd == n, $sformatf("%0d commands, expected %0d", n_cmd, n));
    check(n_done == n, "completion pulses");
    check(n_timing == exp_wait, $sformatf("timer cycles %0d expected %0d", n_timing, exp_wait));
    check(n_err == exp_err, "error pulses");
  endtask

  initial begin
    start_test = 0; num_req = 0; burst = 0; xfer_len = 8; local_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_test(1);
    run_test(5);
    run_test(DEPTH);
    run_test(0);
    for (int i = 0; i < 10; i++) run_test($urandom_range(1, DEPTH));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
