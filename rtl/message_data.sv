// message_data: serialises the navigation message held in the message BRAM.
//
// A bit counter runs 0..BITS_PER_WORD-1 (0..29) and selects bits of the
// current 32-bit BRAM word, most significant bit first; the two least
// significant bits of every word are never sent. When the bit counter wraps,
// the address counter moves to the next word; after word WORDS-1 (1022) it
// returns to word 0 and the message repeats indefinitely. Both counters move
// only on msg_tick, the 50 Hz data-bit tick.
//
// Timing: the BRAM has one cycle of read latency, so the bit counter is also
// delayed one cycle to line up with the read data. data_bit therefore changes
// two cycles after msg_tick (one for the counters, one for the read). After
// reset the word at address 0, bit 31, is on the output. word_wrap marks the
// msg_tick that ends the last bit of word WORDS-1 (one pass of the message).
module message_data
  import gps_pkg::*;
#(
  parameter int WORDS = 1023,
  parameter int BPW   = 30
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  msg_tick,
  output logic [MSG_ADDR_W-1:0] raddr,
  input  logic [MSG_WORD_W-1:0] rdata,
  output logic                  data_bit,
  output logic                  word_wrap    // pulse: last bit of the last word left
);

  logic [MSG_ADDR_W-1:0] addr;
  logic [4:0]            bit_cnt, bit_cnt_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr    <= '0;
      bit_cnt <= '0;
    end else if (msg_tick) begin
      if (bit_cnt == 5'(BPW - 1)) begin
        bit_cnt <= '0;
        addr    <= (addr == MSG_ADDR_W'(WORDS - 1)) ? '0 : addr + 1'b1;
      end else begin
        bit_cnt <= bit_cnt + 5'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) bit_cnt_q <= '0;
    else     bit_cnt_q <= bit_cnt;
  end

  assign raddr      = addr;
  assign data_bit   = rdata[5'(MSG_WORD_W - 1) - bit_cnt_q];
  assign word_wrap  = msg_tick && bit_cnt == 5'(BPW - 1) && addr == MSG_ADDR_W'(WORDS - 1);

  initial assert (BPW <= MSG_WORD_W && WORDS <= 2 ** MSG_ADDR_W)
    else $error("message_data: bad WORDS/BPW");

endmodule
