// result_counters: the measurement counters of a test core.
//
// timer   counts every clock cycle in which the core is waiting for data
//         (the slave FSM's wait-for-data state), so time spent fetching
//         addresses from the address BRAM or storing returned data is not
//         measured. At the 100 MHz bus clock one count is 10 ns.
// xact    counts completed requests (one per address read).
// errors  counts completed requests that the bus ended with an error.
// All three clear on `clear` (pulsed when a test starts) and saturate at
// their maximum instead of wrapping. The three counters and what the timer
// counts follow the document; the error criterion (a bus error reported
// with the completion) and the saturation are this design's choices.
module result_counters #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             timing,     // high while waiting for data
  input  logic             xact_done,  // one-cycle pulse per completed request
  input  logic             xact_err,   // valid with xact_done
  output logic [CNT_W-1:0] timer,
  output logic [CNT_W-1:0] xact,
  output logic [CNT_W-1:0] errors
);

  function automatic logic [CNT_W-1:0] sat_inc(logic [CNT_W-1:0] v);
    return (&v) ? v : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer  <= '0;
      xact   <= '0;
      errors <= '0;
    end else if (clear) begin
      timer  <= '0;
      xact   <= '0;
      errors <= '0;
    end else begin
      if (timing)               timer  <= sat_inc(timer);
      if (xact_done)            xact   <= sat_inc(xact);
      if (xact_done && xact_err) errors <= sat_inc(errors);
    end
  end

endmodule
