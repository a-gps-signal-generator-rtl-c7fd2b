// tb_prn_clock: checks that the chip-rate divider pulses for exactly one
// cycle every DIV system clocks (196 by default: 200.508 MHz / 196 =
// 1.023 MHz), the first pulse DIV-1 cycles after reset.
module tb_prn_clock;
  localparam int DIV = 196;
  localparam int N_TICKS = 60;

  logic clk = 1'b0, rst = 1'b1, prn_tick;
  int checks = 0, failures = 0;
  int cycle = 0, last = -1, nticks = 0;

  prn_clock #(.DIV(DIV)) dut (.clk, .rst, .prn_tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // The divide ratio gives the C/A chip rate from the system clock.
    check(200_508_000 / DIV == 1_023_000 && 200_508_000 % DIV == 0, "ratio");
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    forever begin
      @(posedge clk);
      if (prn_tick) begin
        if (last < 0) check(cycle == DIV - 1, $sformatf("first tick at %0d", cycle));
        else          check(cycle - last == DIV, $sformatf("period %0d", cycle - last));
        last = cycle;
        nticks++;
        if (nticks == N_TICKS) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
      cycle++;
    end
  end

  initial begin
    repeat (DIV * (N_TICKS + 5)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
