// tb_prn_generator: checks the C/A code generator for every PRN 1..37.
//  * the first 10 chips against the octal values of the GPS interface
//    specification (the published table, independent of any model);
//  * all 1023 chips of a period against a separate software model of the
//    two LFSRs, and the period itself (chip 1023 equals chip 0, epoch
//    flag high exactly on chip 0);
//  * for PRN 1 the periodic autocorrelation, whose off-peak values of a
//    Gold code may only be -65, -1 or 63.
// The chip tick is driven every second cycle.
module tb_prn_generator;
  logic clk = 1'b0, rst = 1'b1, prn_tick = 1'b0;
  logic [3:0] sel1, sel2;
  logic chip, epoch;
  int checks = 0, failures = 0;

  prn_generator dut (.clk, .rst, .prn_tick, .sel1, .sel2, .chip, .epoch);

  always #5 clk = ~clk;

  // G2 tap pairs per PRN 1..37 (IS-GPS-200 Table 3-Ia) and first ten chips in octal.
  int tap_a [37] = '{2,3,4,5,1,2,1,2,3,2,3,5,6,7,8,9,1,2,3,4,5,6,1,4,5,6,7,8,1,2,3,4,5,4,1,2,4};
  int tap_b [37] = '{6,7,8,9,9,10,8,9,10,3,4,6,7,8,9,10,4,5,6,7,8,9,3,6,7,8,9,10,6,7,8,9,10,10,7,8,10};
  int first10 [37] = '{'o1440,'o1620,'o1710,'o1744,'o1133,'o1455,'o1131,'o1454,'o1626,'o1504,
                       'o1642,'o1750,'o1764,'o1772,'o1775,'o1776,'o1156,'o1467,'o1633,'o1715,
                       'o1746,'o1763,'o1063,'o1706,'o1743,'o1761,'o1770,'o1774,'o1127,'o1453,
                       'o1625,'o1712,'o1745,'o1713,'o1134,'o1456,'o1713};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Software model: arrays indexed 1..10.
  function automatic void model(input int a, input int b, output bit seq [1024]);
    bit r1 [11], r2 [11];
    bit f1, f2;
    for (int i = 1; i <= 10; i++) begin r1[i] = 1; r2[i] = 1; end
    for (int n = 0; n < 1024; n++) begin
      seq[n] = r1[10] ^ r2[a] ^ r2[b];
      f1 = r1[3] ^ r1[10];
      f2 = r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10];
      for (int i = 10; i > 1; i--) begin r1[i] = r1[i-1]; r2[i] = r2[i-1]; end
      r1[1] = f1; r2[1] = f2;
    end
  endfunction

  bit got [1024];
  bit exp_seq [1024];
  int epochs;

  initial begin
    for (int p = 0; p < 37; p++) begin
      automatic int f;
      rst <= 1'b1;
      sel1 <= 4'(tap_a[p] - 1);
      sel2 <= 4'(tap_b[p] - 1);
      @(posedge clk);
      rst <= 1'b0;
      epochs = 0;
      for (int n = 0; n < 1024; n++) begin
        @(negedge clk);
        got[n] = chip;
        if (epoch) begin
          epochs++;
          if (n != 0 && n != 1023) check(0, $sformatf("PRN %0d epoch at chip %0d", p + 1, n));
        end
        prn_tick <= 1'b1;
        @(posedge clk);
        @(negedge clk);
        prn_tick <= 1'b0;
        @(posedge clk);
      end
      f = 0;
      for (int n = 0; n < 10; n++) f = (f << 1) | int'(got[n]);
      check(f == first10[p], $sformatf("PRN %0d first chips %o, expected %o", p + 1, f, first10[p]));
      model(tap_a[p], tap_b[p], exp_seq);
      for (int n = 0; n < 1024; n++)
        if (got[n] != exp_seq[n]) begin
          check(0, $sformatf("PRN %0d chip %0d", p + 1, n));
          break;
        end
      checks++;
      check(got[1023] == got[0], $sformatf("PRN %0d period", p + 1));
      check(epochs == 2, $sformatf("PRN %0d epochs %0d", p + 1, epochs));
      if (p == 0) begin
        for (int k = 1; k < 1023; k++) begin
          automatic int acc = 0;
          for (int n = 0; n < 1023; n++) acc += (got[n] == got[(n + k) % 1023]) ? 1 : -1;
          if (!(acc == -65 || acc == -1 || acc == 63)) begin
            check(0, $sformatf("autocorrelation lag %0d = %0d", k, acc));
            break;
          end
        end
        checks++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (37 * 1024 * 3 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
