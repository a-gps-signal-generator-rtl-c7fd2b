// tb_sv_adder: random samples and SV on/off switches; the sum two cycles
// later must equal the sum of the enabled inputs computed here. Also checks
// the extreme case of four full-scale samples of equal sign (no overflow)
// and the zero / half / full amplitude levels of four equal-magnitude BPSK
// signals.
module tb_sv_adder;
  localparam int W = 14;
  localparam int A = 8191;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] sv_en = '1;
  logic signed [W-1:0] sv_sample [4];
  logic signed [W+1:0] sum;
  int checks = 0, failures = 0;
  int exp_q [$];
  int levels [3];

  sv_adder #(.SAMPLE_W(W)) dut (.clk, .rst, .sv_en, .sv_sample, .sum);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (sv_sample[i]) sv_sample[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      automatic int e = 0;
      if (t < 1000) begin
        sv_en = 4'($urandom);
        foreach (sv_sample[i]) sv_sample[i] = W'($signed($urandom_range(2 * A)) - A);
      end else begin
        // Four BPSK signals of amplitude A with random signs, all enabled.
        sv_en = 4'hf;
        foreach (sv_sample[i]) sv_sample[i] = ($urandom_range(1) == 1) ? W'(A) : W'(-A);
        if (t == 1000) foreach (sv_sample[i]) sv_sample[i] = W'(-A);
      end
      foreach (sv_sample[i]) if (sv_en[i]) e += int'(sv_sample[i]);
      exp_q.push_back(e);
      @(posedge clk);
      @(negedge clk);
      if (t >= 1) begin
        automatic int x = exp_q[t - 1];
        check(int'(sum) == x, $sformatf("t=%0d sum %0d expected %0d", t, sum, x));
        if (t > 1001) begin
          if (x == 0) levels[0]++;
          else if (x == 2 * A || x == -2 * A) levels[1]++;
          else if (x == 4 * A || x == -4 * A) levels[2]++;
        end
      end
    end
    foreach (levels[i]) check(levels[i] > 0, $sformatf("amplitude level %0d never seen", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
