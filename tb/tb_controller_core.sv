// tb_controller_core: self-checking test of controller_core. Writes random
// select masks, fires GO and checks that exactly the selected start lines
// pulse for one cycle, one cycle after the write; checks the select and
// busy read-back and that start never pulses without GO.
module tb_controller_core;
  import membw_pkg::*;
  localparam int unsigned N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_req_t     rq;
  logic [31:0]  rdata;
  logic [N-1:0] busy, start;
  int checks = 0, failures = 0;

  controller_core #(.NUM_CORES(N)) dut (.clk, .rst_n, .reg_req(rq), .reg_rdata(rdata),
    .busy, .start);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    rq = '{wr: 1'b1, rd: 1'b0, addr: a, wdata: d};
    @(posedge clk); #1 rq = '0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    rq = '{wr: 1'b0, rd: 1'b1, addr: a, wdata: '0};
    @(posedge clk); #1 rq = '0; d = rdata;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [N-1:0] m;
    rq = '0; busy = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      m = N'($urandom);
      wr(16'd0, 32'(m));
      check(start == '0, "no start on select write");
      rd(16'd0, d);
      check(d[N-1:0] == m, "select read-back");
      busy = N'($urandom);
      rd(16'd1, d);
      check(d[N-1:0] == busy, "busy read-back");
      wr(16'd1, 32'h1);
      check(start == m, $sformatf("start %b expected %b", start, m));
      @(posedge clk); #1;
      check(start == '0, "start lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
