// prn_clock: chip-rate clock divider.
//
// Produces a one-cycle enable pulse, prn_tick, once every DIV system clocks.
// With the 200.508 MHz system clock and DIV = 196 this is the 1.023 MHz chip
// clock of the C/A code; all code and message logic runs on the system clock
// and is enabled by this pulse.
//
// As in the original firmware the counter runs from 1 to DIV and the full
// count is recognised by testing only the bits that are set in DIV (for 196,
// binary 11000100, bits 8, 7 and 3 in 1-based numbering). Because the count
// starts at 1, the first value that has all those bits set is DIV itself, so
// no full comparator is needed. On the full count the counter reloads 1.
//
// Timing: after reset the first pulse comes DIV-1 cycles later (the counter
// leaves reset at 1), then every DIV cycles.
module prn_clock #(
  parameter int DIV = 196,
  parameter int W   = $clog2(DIV + 1)
) (
  input  logic clk,
  input  logic rst,
  output logic prn_tick
);

  localparam logic [W-1:0] FULL = W'(DIV);

  logic [W-1:0] cnt;

  assign prn_tick = (cnt & FULL) == FULL;

  always_ff @(posedge clk) begin
    if (rst)           cnt <= W'(1);
    else if (prn_tick) cnt <= W'(1);
    else               cnt <= cnt + W'(1);
  end

  initial assert (DIV >= 2) else $error("prn_clock: DIV must be at least 2");

endmodule
