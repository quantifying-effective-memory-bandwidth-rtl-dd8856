// tb_result_counters: self-checking test of result_counters. Drives random
// timing / completion / error pulses, keeps reference counts, checks all
// three counters every cycle, checks clear, and checks saturation with a
// narrow counter instance.
module tb_result_counters;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear, timing, xact_done, xact_err;
  logic [31:0] timer, xact, errors;
  logic [3:0]  t4, x4, e4;
  int unsigned rt, rx, re;
  int checks = 0, failures = 0;

  result_counters #(.CNT_W(32)) dut (.clk, .rst_n, .clear, .timing, .xact_done,
    .xact_err, .timer, .xact, .errors);
  result_counters #(.CNT_W(4)) dut4 (.clk, .rst_n, .clear, .timing, .xact_done,
    .xact_err, .timer(t4), .xact(x4), .errors(e4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned sat4(int unsigned v);
    return v > 15 ? 15 : v;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; timing = 0; xact_done = 0; xact_err = 0;
    rt = 0; rx = 0; re = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      clear     = ($urandom_range(0, 199) == 0);
      timing    = $urandom_range(0, 1);
      xact_done = ($urandom_range(0, 3) == 0);
      xact_err  = $urandom_range(0, 1);
      @(posedge clk);
      if (clear) begin rt = 0; rx = 0; re = 0; end
      else begin
        rt += timing; rx += xact_done; re += (xact_done && xact_err);
      end
      #1;
      check(timer == rt && xact == rx && errors == re,
            $sformatf("cycle %0d: %0d/%0d/%0d expected %0d/%0d/%0d", i, timer, xact, errors, rt, rx, re));
      check(t4 == sat4(rt) && x4 == sat4(rx) && e4 == sat4(re), "4-bit saturating copy");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
