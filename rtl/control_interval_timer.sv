// control_interval_timer: divides time into control intervals.
//
// The frequencies and voltages of the islands are held constant during a
// control interval of length T and recomputed at its start. T is a power of
// two cycles of the controller clock, 2**INTERVAL_LOG2, so the timer is a
// free-running binary counter: tick is high for one cycle each time it
// wraps, and k counts completed intervals (wrapping at 2**16).
//
// Interface: en starts and holds the count; tick (one-cycle pulse), k.
// The first tick comes 2**INTERVAL_LOG2 cycles after en rises.
//
// From the source: T about 100 us, a power of two times the slowest clock
// of the system. This design clocks the timer with a fixed controller clock
// (nominally the 32 MHz of the slowest island), so 2**12 cycles = 128 us.
module control_interval_timer #(
  parameter int unsigned INTERVAL_LOG2 = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic        tick,
  output logic [15:0] k
);
  logic [INTERVAL_LOG2-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
      k    <= '0;
    end else begin
      tick <= 1'b0;
      if (en) begin
        cnt <= cnt + 1'b1;
        if (&cnt) begin
          tick <= 1'b1;
          k    <= k + 16'd1;
        end
      end
    end
  end
endmodule
