// tb_bpsk_modulator: drives random chips, data bits, switch settings and
// carrier samples and compares the output with a reference computed here:
// sample(t) = (sym(t-8) ? -1 : +1) * carrier(t-4), sym = (chip & !prn_off)
// ^ (data & !msg_off), for the two 4-cycle multiplexers. Counts that each of
// the four switch combinations was exercised.
module tb_bpsk_modulator;
  localparam int LAT = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic chip = 0, data_bit = 0, prn_off = 0, msg_off = 0;
  logic signed [13:0] carrier = '0, sample;
  int checks = 0, failures = 0;
  int combos [4];
  bit sym_h [$];
  int car_h [$];

  bpsk_modulator dut (.clk, .rst, .chip, .data_bit, .prn_off, .msg_off, .carrier, .sample);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 4000; t++) begin
      // Drive at negedge, compare after the posedge.
      chip = 1'($urandom); data_bit = 1'($urandom);
      {prn_off, msg_off} = 2'(t / 500);
      carrier = 14'($signed($urandom_range(16382)) - 8191);
      combos[{prn_off, msg_off}]++;
      sym_h.push_back((chip & ~prn_off) ^ (data_bit & ~msg_off));
      car_h.push_back(int'(carrier));
      @(posedge clk);
      @(negedge clk);
      if (t >= 2 * LAT) begin
        automatic int c = car_h[t - LAT + 1];
        automatic int e = sym_h[t - 2 * LAT + 1] ? -c : c;
        check(int'(sample) == e, $sformatf("t=%0d sample %0d expected %0d", t, sample, e));
      end
    end
    foreach (combos[i]) check(combos[i] > 0, $sformatf("switch setting %0d never used", i));
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
