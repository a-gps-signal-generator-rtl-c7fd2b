// tb_carrier_dds: checks the carrier synthesiser.
//  * default tuning (f_sys/4): the samples after reset are 0, +A, 0, -A
//    repeating, A = 8191, i.e. 50.127 MHz at 200.508 MHz, 49 cycles per chip;
//  * a second instance tuned to 3/1024 of f_sys: every sample within one LSB
//    of A*sin(2*pi*3*n/1024), computed here with real arithmetic.
module tb_carrier_dds;
  localparam int A = 8191;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [13:0] s4, s3;
  int checks = 0, failures = 0;

  carrier_dds dut_q (.clk, .rst, .sample(s4));
  carrier_dds #(.PHASE_INC(64'd3 << 22)) dut_f (.clk, .rst, .sample(s3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int pat [4] = '{0, A, 0, -A};
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);  // phase 0 is being looked up
    for (int n = 0; n < 2048; n++) begin
      automatic real e = A * $sin(2.0 * 3.14159265358979 * 3.0 * n / 1024.0);
      @(negedge clk);
      check(int'(s4) == pat[n % 4], $sformatf("quarter-rate sample %0d = %0d", n, s4));
      check(real'(s3) - e < 1.0 && e - real'(s3) < 1.0, $sformatf("sample %0d = %0d, expected %f", n, s3, e));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
