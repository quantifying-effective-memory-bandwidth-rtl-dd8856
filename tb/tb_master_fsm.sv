// tb_master_fsm: self-checking test of master_fsm against the behavioural
// bus/memory model. For single reads and burst reads of many lengths it
// checks the exact sequence of bus requests (address, length, burst flag:
// full 128-byte bursts, then a shorter last burst or a single beat), the
// cycle count from command acceptance to master_ack, the data beats that
// reach the core, and the error flag for a read the bus fails.
module tb_master_fsm;
  import membw_pkg::*;

  localparam int unsigned SL = 5, BL = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     start, req_issued, master_ack, master_err, busy;
  mst_cmd_t cmd, bus_cmd;
  logic     bus_req;
  logic [0:0] bus_req_ack, bus_done, bus_err;
  bus_wr_t  [0:0] wr;
  int unsigned grants, contention;
  int checks = 0, failures = 0;

  master_fsm dut (
    .clk, .rst_n, .start, .cmd, .req_issued, .master_ack, .master_err, .busy,
    .bus_req, .bus_cmd, .bus_req_ack(bus_req_ack[0]), .bus_done(bus_done[0]),
    .bus_err(bus_err[0])
  );

  bus_mem_model #(.NPORTS(1), .SINGLE_LAT(SL), .BURST_LAT(BL)) u_bus (
    .clk, .rst_n, .req(bus_req), .cmd(bus_cmd), .req_ack(bus_req_ack),
    .done(bus_done), .err(bus_err), .wr, .grants,
    .contention_cycles(contention)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected requests, filled by plan()
  logic [31:0] exp_addr[$];
  int          exp_len[$];
  bit          exp_burst[$];
  int          exp_cycles;

  function automatic void plan(logic [31:0] a, bit burst, int len);
    int rem, l;
    exp_addr.delete(); exp_len.delete(); exp_burst.delete();
    exp_cycles = 1;
    if (!burst) begin
      exp_addr.push_back(a); exp_len.push_back(8); exp_burst.push_back(0);
      exp_cycles += SL;
      return;
    end
    l = (len >= 128) ? 128 : len;
    rem = len;
    while (1) begin
      exp_addr.push_back(a); exp_len.push_back(l); exp_burst.push_back(1);
      exp_cycles += BL + (l + 7) / 8 - 1 + 1;   // beats, then burst check
      rem -= l; a += l;
      if (rem == 0) break;
      exp_cycles += 1;                           // check -> next request
      if (rem <= 8) begin
        exp_addr.push_back(a); exp_len.push_back(8); exp_burst.push_back(0);
        exp_cycles += SL;
        break;
      end
      l = (rem >= 128) ? 128 : rem;
    end
  endfunction

  // monitor accepted requests and delivered beats
  int          seen;
  int          beats;
  logic [31:0] next_beat;
  always @(posedge clk) begin
    if (rst_n && bus_req && bus_req_ack[0]) begin
      if (seen < exp_addr.size()) begin
        check(bus_cmd.addr == exp_addr[seen] && int'(bus_cmd.nbytes) == exp_len[seen]
              && bus_cmd.burst == exp_burst[seen],
              $sformatf("request %0d: addr %h len %0d burst %0d", seen,
                        bus_cmd.addr, bus_cmd.nbytes, bus_cmd.burst));
        check(bus_cmd.local_addr == 32'h0000_0040, "local address");
      end else check(0, "unexpected extra request");
      seen++;
    end
    if (rst_n && wr[0].en) begin
      check(wr[0].data[31:0] == next_beat, $sformatf("beat addr %h", wr[0].data[31:0]));
      next_beat += 8;
      beats++;
    end
  end

  task automatic run(logic [31:0] a, bit burst, int len);
    int t;
    plan(a, burst, len);
    seen = 0; beats = 0; next_beat = a;
    cmd = '{addr: a, local_addr: 32'h40, burst: burst, nbytes: LEN_W'(len)};
    start = 1'b1;
    #1;
    while (!req_issued) begin @(posedge clk); #1; end
    @(posedge clk); #1 start = 1'b0;
    t = 1;
    while (!master_ack) begin @(posedge clk); #1 t++; end
    check(seen == exp_addr.size(), $sformatf("len %0d: %0d requests, expected %0d",
          len, seen, exp_addr.size()));
    check(t == exp_cycles, $sformatf("len %0d burst %0d: %0d cycles, expected %0d",
          len, burst, t, exp_cycles));
    check(master_err == a[31], "error flag");
    @(posedge clk); #1;
    check(!busy, "back in IDLE");
    check(beats == (burst ? (len + 7) / 8 : 1) || (burst && len % 8 != 0),
          $sformatf("beats %0d", beats));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(32'h0000_1000, 0, 8);      // single
    run(32'h0000_2000, 1, 128);    // one full burst
    run(32'h0000_3000, 1, 512);    // four bursts
    run(32'h0000_4000, 1, 200);    // burst + last burst
    run(32'h0000_5000, 1, 136);    // burst + single
    run(32'h0000_6000, 1, 64);     // short burst alone
    run(32'h8000_0000, 0, 8);      // bus error
    run(32'h8000_0100, 1, 256);    // bus error in a burst
    for (int i = 0; i < 20; i++)
      run({16'h0001, $urandom_range(0, 4095) * 8}[31:0] & 32'h7fff_fff8,
          1, 8 * $urandom_range(1, 80));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
