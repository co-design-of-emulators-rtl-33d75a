// clock_gen -- clock-generator behaviour that paces one child behaviour.
//
// Every behaviour of the emulator runs on its own computing step: a clock
// generator raises a one-cycle clock event `tick` once every PERIOD counted
// cycles.  A cycle is counted when `en` is high, so the same block serves as a
// divider of the system clock (en tied high, e.g. the 1 us computing step) and
// as a divider of another generator's events (en = that tick, e.g. the storage
// period Ts = XS computing steps).  `clr` restarts the count synchronously, so
// the first tick after a clear comes PERIOD counted cycles later.
//
// Timing: `tick` is registered; it is high in the cycle after the PERIOD-th
// counted cycle.  Reset is active-low and synchronous to clk.
// The idea of one generator per behaviour follows the design; the counter
// implementation and the en/clr interface are this design's choice.
module clock_gen #(
  parameter int unsigned PERIOD = 100  // counted cycles between clock events
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,   // restart the period (synchronous)
  input  logic en,    // count this cycle
  output logic tick   // one-cycle clock event
);

  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] cnt;
  logic          last;

  assign last = (cnt == CW'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= en && last;
      if (en) cnt <= last ? '0 : cnt + 1'b1;
    end
  end

  initial assert (PERIOD >= 1) else $error("clock_gen: PERIOD must be at least 1");

endmodule
