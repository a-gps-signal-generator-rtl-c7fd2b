// message_clock: derives the 1 kHz code-epoch tick and the 50 Hz data-bit tick
// from the 1.023 MHz chip tick.
//
// Stage 1 counts chip ticks through CODE_LEN (1023) values ending at a power
// of two: 2..1024 in an 11-bit counter, as in the original firmware, so that
// its top bit alone is the "full" flag. That level stays
// high from the chip tick that completes the count until the next chip tick,
// i.e. for a whole chip time, so a rising-edge detector (a one-cycle delay,
// an inverter and an AND, as in the original firmware) turns it into a
// one-cycle ms_tick. Stage 2 counts ms_tick from 1 to BIT_DIV (20) and, like
// the original, finds its full count by testing only the bits that are set in
// BIT_DIV (bits 5 and 3, counting from 1, for 20); no count below BIT_DIV has
// all of them. That level, again edge-detected, gives the one-cycle data-bit
// tick. The edge
// detectors are what make the data advance by exactly one bit per 20 ms
// rather than on every system clock while a level is high.
//
// msg_fast is the message clock switch, a test mode: the data bit then
// advances on every chip tick. In that mode the chip tick is delayed by two
// cycles so that msg_tick keeps the same position relative to the chip
// boundaries as in normal mode.
//
// Timing: ms_tick is high in the cycle after the chip tick that ends a code
// period, which is the first cycle in which the code generator is back in its
// all-ones starting state. The data-bit tick comes one cycle after every
// BIT_DIV-th ms_tick (the stage-2 counter must first reach its full count),
// i.e. two cycles after the chip tick that ends the bit period. Counters reset
// to one below their first value, so the first ms_tick follows CODE_LEN chip ticks after reset and
// the first data-bit tick follows CODE_LEN * BIT_DIV chip ticks.
module message_clock #(
  parameter int CODE_LEN = 1023,
  parameter int BIT_DIV  = 20
) (
  input  logic clk,
  input  logic rst,
  input  logic prn_tick,
  input  logic msg_fast,
  output logic ms_tick,
  output logic msg_tick
);

  // Stage 1 runs from MS_FIRST up to 2**W1; bit W1 is set only at the top.
  localparam int W1       = $clog2(CODE_LEN + 1);
  localparam int MS_FIRST = (1 << W1) - CODE_LEN + 1;
  localparam int WM       = W1 + 1;
  localparam int W2       = $clog2(BIT_DIV + 1);

  logic [W1:0]   cnt_ms;
  logic [W2-1:0] cnt_bit;
  logic          ms_full, ms_full_q;
  logic          bit_full, bit_full_q;
  logic          bit_tick;
  logic [1:0]    prn_tick_d;

  // Stage 1: divide the chip tick by CODE_LEN.
  always_ff @(posedge clk) begin
    if (rst)
      cnt_ms <= WM'(MS_FIRST - 1);
    else if (prn_tick)
      cnt_ms <= ms_full ? WM'(MS_FIRST) : cnt_ms + 1'b1;
  end

  assign ms_full = cnt_ms[W1];

  // Stage 2: divide the edge-detected 1 kHz tick by BIT_DIV.
  always_ff @(posedge clk) begin
    if (rst)
      cnt_bit <= '0;
    else if (ms_tick)
      cnt_bit <= bit_full ? W2'(1) : cnt_bit + W2'(1);
  end

  assign bit_full = (cnt_bit & W2'(BIT_DIV)) == W2'(BIT_DIV);

  // Rising-edge detectors.
  always_ff @(posedge clk) begin
    if (rst) begin
      ms_full_q  <= 1'b0;
      bit_full_q <= 1'b0;
      prn_tick_d <= '0;
    end else begin
      ms_full_q  <= ms_full;
      bit_full_q <= bit_full;
      prn_tick_d <= {prn_tick_d[0], prn_tick};
    end
  end

  assign ms_tick  = ms_full & ~ms_full_q;
  assign bit_tick = bit_full & ~bit_full_q;
  assign msg_tick = msg_fast ? prn_tick_d[1] : bit_tick;

endmodule
