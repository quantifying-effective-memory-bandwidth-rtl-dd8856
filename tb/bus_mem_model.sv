// bus_mem_model: behavioural stand-in for the on-chip bus, its arbiter, the
// bus attachment and the DDR memory controller with its memory, as seen
// from the test cores. Not synthesizable logic of the design; used only by
// the testbenches.
//
// NPORTS masters share one memory. The arbiter grants one request at a
// time, round robin, and the granted transfer occupies the bus until its
// last beat. A request is accepted (req_ack) in the cycle the model is idle
// and picks the port. SINGLE_LAT (non-burst) or BURST_LAT (burst, >= 2) cycles
// later the first data beat is written to the requesting core's local
// address, then one beat per cycle; done (and err) pulse with the last
// beat. Reads with address bit 31 set end with err. A beat carries BEAT
// bytes. The word at a byte address a is mem_word(a) (see below), so every
// read can be checked.
// Counters report how many transfers were granted and how many cycles some
// request waited while another port held the bus (contention).
module bus_mem_model
  import membw_pkg::*;
#(
  parameter int unsigned NPORTS     = 1,
  parameter int unsigned SINGLE_LAT = 17,
  parameter int unsigned BURST_LAT  = 31,
  parameter int unsigned BEAT       = 8     // bytes per data beat
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic     [NPORTS-1:0] req,
  input  mst_cmd_t [NPORTS-1:0] cmd,
  output logic     [NPORTS-1:0] req_ack,
  output logic     [NPORTS-1:0] done,
  output logic     [NPORTS-1:0] err,
  output bus_wr_t  [NPORTS-1:0] wr,
  output int unsigned           grants,
  output int unsigned           contention_cycles
);

  function automatic logic [63:0] mem_word(logic [31:0] a);
    logic [31:0] w;
    w = {a[31:2], 2'b00};
    return {w ^ 32'hA5A5_0000, w};
  endfunction

  logic        active;
  int unsigned owner, rr, wait_cnt, beats_left;
  mst_cmd_t    cur;
  logic [31:0] beat_addr;
  int          pick;

  always_comb begin
    pick    = -1;
    req_ack = '0;
    if (!active) begin
      for (int k = 0; k < int'(NPORTS); k++) begin
        if (pick < 0 && req[(int'(rr) + k) % int'(NPORTS)])
          pick = (int'(rr) + k) % int'(NPORTS);
      end
      if (pick >= 0) req_ack[pick] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; owner <= 0; rr <= 0; wait_cnt <= 0; beats_left <= 0;
      cur <= '0; beat_addr <= '0; done <= '0; err <= '0; wr <= '0;
      grants <= 0; contention_cycles <= 0;
    end else begin
      done <= '0; err <= '0; wr <= '0;
      if (active && ((req & ~(NPORTS'(1) << owner)) != '0))
        contention_cycles <= contention_cycles + 1;
      if (!active && pick >= 0) begin
        active     <= 1'b1;
        owner      <= pick;
        rr         <= (pick + 1) % NPORTS;
        cur        <= cmd[pick];
        beat_addr  <= cmd[pick].addr;
        beats_left <= cmd[pick].burst ? (int'(cmd[pick].nbytes) + int'(BEAT) - 1) / int'(BEAT) : 1;
        wait_cnt   <= (cmd[pick].burst ? BURST_LAT : SINGLE_LAT) - 2;
        grants     <= grants + 1;
      end else if (active) begin
        if (wait_cnt != 0) wait_cnt <= wait_cnt - 1;
        else begin
          wr[owner].en   <= 1'b1;
          wr[owner].addr <= cur.local_addr;
          wr[owner].data <= mem_word(beat_addr);
          beat_addr      <= beat_addr + BEAT;
          beats_left     <= beats_left - 1;
          if (beats_left == 1) begin
            done[owner] <= 1'b1;
            err[owner]  <= cur.addr[31];
            active      <= 1'b0;
          end
        end
      end
    end
  end

endmodule
