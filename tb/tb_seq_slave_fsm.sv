// tb_seq_slave_fsm: self-checking test of seq_slave_fsm. A testbench
// master model accepts commands after random delays and completes them
// after random waits. Checks that the commands walk contiguous addresses
// from the base (8 bytes apart for single reads, xfer_len apart for
// bursts), that the timer enable covers exactly the waits, and the
// completion count and return to IDLE.
module tb_seq_slave_fsm;
  import membw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, burst;
  logic [31:0] num_req, base_addr, local_addr;
  logic [15:0] xfer_len;
  logic        m_start, m_req_issued, m_ack, m_err;
  mst_cmd_t    m_cmd;
  logic        busy, clear, timing, xact_done, xact_err;
  int checks = 0, failures = 0;

  seq_slave_fsm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_cmd, exp_wait, n_timing, n_done;
  logic [31:0] exp_addr;

  always @(posedge clk) begin
    if (rst_n && timing) n_timing++;
    if (rst_n && xact_done) n_done++;
  end

  initial begin
    int d;
    m_req_issued = 0; m_ack = 0; m_err = 0;
    forever begin
      @(negedge clk);
      if (m_start) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        check(m_cmd.addr == exp_addr && m_cmd.burst == burst && m_cmd.nbytes == xfer_len
              && m_cmd.local_addr == local_addr,
              $sformatf("command %0d addr %h expected %h", n_cmd, m_cmd.addr, exp_addr));
        exp_addr += burst ? 32'(xfer_len) : 32'd8;
        n_cmd++;
        m_req_issued = 1;
        @(negedge clk);
        m_req_issued = 0;
        d = $urandom_range(1, 10);
        exp_wait += d;
        repeat (d - 1) @(negedge clk);
        m_ack = 1;
        @(negedge clk);
        m_ack = 0;
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

  task automatic run_test(int n, bit b);
    num_req = n; burst = b; xfer_len = b ? 16'd128 : 16'd8;
    base_addr = $urandom & 32'h0fff_fff8; local_addr = $urandom;
    exp_addr = base_addr;
    n_cmd = 0; exp_wait = 0; n_timing = 0; n_done = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    check(n_cmd == n, $sformatf("%0d commands, expected %0d", n_cmd, n));
    check(n_done == n, "completion pulses");
    check(n_timing == exp_wait, $sformatf("timer cycles %0d expected %0d", n_timing, exp_wait));
  endtask

  int counts[5] = '{1, 4, 16, 64, 256};

  initial begin
    start = 0; num_req = 0; burst = 0; xfer_len = 8; base_addr = 0; local_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // request counts of the document's multi-core tests, up to 256
    foreach (counts[i]) begin
      run_test(counts[i], 0);
      run_test(counts[i], 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
