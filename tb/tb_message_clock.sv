// tb_message_clock: checks the 1 kHz and 50 Hz ticks derived from the chip
// tick, with the default 1023 and 20 dividers. The chip tick is driven every
// TICK cycles, so a code period is 1023*TICK cycles and a data bit
// 20*1023*TICK cycles. Checked: ms_tick and msg_tick are single-cycle pulses,
// ms_tick comes one cycle after every 1023rd chip tick, msg_tick one cycle
// after every 20th ms_tick, and with the message clock switch set msg_tick
// follows each chip tick by two cycles.
module tb_message_clock;
  localparam int CODE_LEN = 1023;
  localparam int BIT_DIV  = 20;
  localparam int TICK     = 2;
  localparam int N_BITS   = 5;

  logic clk = 1'b0, rst = 1'b1, prn_tick = 1'b0, msg_fast = 1'b0;
  logic ms_tick, msg_tick;
  int checks = 0, failures = 0;
  int cycle = 0, n_chip = 0, n_ms = 0, n_bit = 0;
  int last_chip = -100, last_ms = -100, prev_chip = -100;
  logic ms_q = 1'b0, bit_q = 1'b0;

  message_clock #(.CODE_LEN(CODE_LEN), .BIT_DIV(BIT_DIV)) dut (
    .clk, .rst, .prn_tick, .msg_fast, .ms_tick, .msg_tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Chip tick generator.
  always_ff @(posedge clk) prn_tick <= !rst && (cycle % TICK == 0);

  always @(posedge clk) begin
    if (!rst) begin
      if (ms_tick) begin
        check(!ms_q, "ms_tick longer than one cycle");
        check(cycle == last_chip + 1, $sformatf("ms_tick at %0d, chip tick at %0d", cycle, last_chip));
        check(n_chip % CODE_LEN == 0, $sformatf("ms_tick after %0d chips", n_chip));
        n_ms++;
        last_ms = cycle;
      end
      if (msg_tick && !msg_fast) begin
        check(!bit_q, "msg_tick longer than one cycle");
        check(cycle == last_ms + 1, "msg_tick not one cycle after ms_tick");
        check(n_ms % BIT_DIV == 0 && n_ms > 0, $sformatf("msg_tick after %0d ms ticks", n_ms));
        n_bit++;
      end
      if (msg_fast && cycle > 10) begin
        check(msg_tick == (cycle == prev_chip + 2 || cycle == last_chip + 2), "fast msg_tick");
      end
      if (prn_tick) begin n_chip++; prev_chip = last_chip; last_chip = cycle; end
      ms_q  <= ms_tick;
      bit_q <= msg_tick;
    end
    cycle++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (n_bit == N_BITS);
    check(n_ms == N_BITS * BIT_DIV, $sformatf("%0d ms ticks for %0d bits", n_ms, n_bit));
    // Message clock switch: data bit at chip rate.
    @(posedge clk);
    msg_fast <= 1'b1;
    repeat (50 * TICK) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((N_BITS + 1) * BIT_DIV * CODE_LEN * TICK + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
