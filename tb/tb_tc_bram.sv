// tb_tc_bram: self-checking test of tc_bram. Writes random words to random
// locations while keeping a reference copy, then reads every written
// location back and checks the one-cycle read latency and that a read
// without re holds the previous output.
module tb_tc_bram;
  localparam int unsigned W = 64, D = 512;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         we, re;
  logic [8:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] ref_mem [D];
  bit           valid [D];
  int checks = 0, failures = 0;

  tc_bram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    foreach (valid[i]) valid[i] = 0;
    @(negedge clk);
    for (int i = 0; i < 1500; i++) begin
      we = 1; waddr = 9'($urandom_range(0, D - 1)); wdata = {$urandom, $urandom};
      ref_mem[waddr] = wdata; valid[waddr] = 1;
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < int'(D); a++) begin
      if (!valid[a]) continue;
      re = 1; raddr = 9'(a);
      @(negedge clk);
      check(rdata == ref_mem[a], $sformatf("addr %0d read %h expected %h", a, rdata, ref_mem[a]));
      re = 0; raddr = 9'(a + 1);
      @(negedge clk);
      check(rdata == ref_mem[a], "output held without re");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
