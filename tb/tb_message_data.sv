// tb_message_data: checks the message serialiser with the bit patterns used
// to validate the original hardware:
//   vector 1: 270 ones followed by 330 zeros (20 words);
//   vector 2: alternating runs of 30 ones and 30 zeros (20 words);
//   vector 3: word pairs 000111 0 111111111 00000000000000 and 16 ones,
//             14 zeros, which pin the MSB-first order and the word edges;
//   vector 4: a single one walking one place per word, 30 words.
// The patterns are built as bit streams, packed 30 bits per word MSB first
// with random filler in the two unused low bits, and served by a one-cycle
// latency memory model. Each stream must come out bit for bit, twice over
// (the address counter wraps), with word_wrap once per pass, and each bit
// must appear exactly two cycles after its msg_tick.
module tb_message_data;
  import gps_pkg::*;
  localparam int WORDS = 30;
  localparam int TICK  = 5;   // msg_tick every TICK cycles

  logic clk = 1'b0, rst = 1'b1, msg_tick = 1'b0;
  logic [MSG_ADDR_W-1:0] raddr;
  logic [MSG_WORD_W-1:0] rdata;
  logic data_bit, word_wrap;
  logic [31:0] mem [WORDS];
  bit stream [WORDS * 30];
  int checks = 0, failures = 0;

  message_data #(.WORDS(WORDS), .BPW(30)) dut (
    .clk, .rst, .msg_tick, .raddr, .rdata, .data_bit, .word_wrap);

  always #5 clk = ~clk;
  always_ff @(posedge clk) rdata <= mem[raddr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pack();
    for (int w = 0; w < WORDS; w++) begin
      mem[w] = {30'b0, 2'($urandom)};
      for (int b = 0; b < 30; b++) mem[w][31 - b] = stream[w * 30 + b];
    end
  endtask

  task automatic run(input int nbits, input string name);
    int wraps = 0;
    rst <= 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 2 * nbits; n++) begin
      // Bit n is on the output before its tick.
      @(negedge clk);
      check(data_bit == stream[n % nbits], $sformatf("%s bit %0d", name, n));
      msg_tick <= 1'b1;
      @(negedge clk);
      if (word_wrap) wraps++;
      msg_tick <= 1'b0;
      check(data_bit == stream[n % nbits], $sformatf("%s bit %0d changed after 1 cycle", name, n));
      repeat (TICK - 2) @(negedge clk);
    end
    check(wraps == 2, $sformatf("%s: %0d wraps", name, wraps));
  endtask

  initial begin
    // Vector 1 over 20 words, the rest of the 30-word buffer repeats it.
    for (int i = 0; i < WORDS * 30; i++) stream[i] = (i % 600) < 270;
    pack();
    run(WORDS * 30, "vector1");
    // Vector 2: 30 ones, 30 zeros.
    for (int i = 0; i < WORDS * 30; i++) stream[i] = ((i / 30) % 2) == 0;
    pack();
    run(WORDS * 30, "vector2");
    // Vector 3: even words 3 zeros, 3 ones, 1 zero, 9 ones, 14 zeros;
    // odd words 16 ones, 14 zeros.
    for (int i = 0; i < WORDS * 30; i++) begin
      automatic int b = i % 30;
      if ((i / 30) % 2 == 0) stream[i] = (b >= 3 && b < 6) || (b >= 7 && b < 16);
      else                   stream[i] = b < 16;
    end
    pack();
    run(WORDS * 30, "vector3");
    // Vector 4: word k holds a single one at position 29-k.
    for (int i = 0; i < WORDS * 30; i++) stream[i] = (i % 30) == 29 - (i / 30);
    pack();
    run(WORDS * 30, "vector4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 2 * WORDS * 30 * TICK + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
