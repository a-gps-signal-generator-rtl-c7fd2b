// tb_gps_correlation: the code-correlation test of the four-satellite
// generator, run on the DAC samples at the default parameters (200.508 MHz
// system clock, 196 clocks per chip, 1023-chip codes).
//
// The host bus selects PRNs 9, 15, 23 and 30 for SV1..SV4 and switches the
// navigation data off (message shutdown), so that only the spread carrier is
// sent. Five captures follow: each SV alone (SV on/off register one-hot), then
// all four together. Each capture starts at the rising edge of the aligned
// code-epoch flag of the first enabled SV and takes one whole code period,
// 1023 chips of 196 samples of dac_data.
//
// The testbench acts as a simple receiver. It mixes the samples down with
// the f_sys/4 carrier in I and Q (the reference is 1, 0, -1, 0 and 0, 1, 0,
// -1 by cycle index modulo 4) and sums each chip interval to one complex
// value. It then correlates the 1023 values circularly, at every code phase,
// against a software C/A model of each of the 37 PRNs and normalises the
// peak magnitude by that of a single SV at full amplitude (98 x 8191 per
// chip). Expected:
//   - each present PRN peaks at code phase 0 with a normalised value near 1,
//     in the single captures and in the sum of four;
//   - every absent PRN (PRN 28 and all others) stays low at every phase:
//     Gold codes cross-correlate to at most 65/1023 per signal.
// The chip intervals are not aligned to the DAC pipeline latency, which costs
// a few percent of the peak. The thresholds allow for that.
module tb_gps_correlation;
  import gps_pkg::*;
  localparam int DIV = 196, LEN = 1023, A = 8191;
  localparam real FULL = 98.0 * A;        // |I + jQ| of one chip of one SV
  localparam real PEAK_MIN = 0.90;        // a present PRN, alone
  localparam real PEAK_MIN_SUM = 0.85;    // a present PRN, in the sum of four
  localparam real ABSENT_MAX = 0.25;      // any absent PRN, any phase

  logic clk = 1'b0, rst = 1'b1, host_we = 1'b0;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic signed [15:0] dac_data;
  logic [3:0] sv_chip, sv_data, sv_epoch, sv_prn_tick, sv_msg_tick, sv_msg_wrap;

  gps_signal_generator dut (
    .clk, .rst, .host_we, .host_addr, .host_wdata, .dac_data,
    .sv_chip, .sv_data, .sv_epoch, .sv_prn_tick, .sv_msg_tick, .sv_msg_wrap);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int prns [4] = '{9, 15, 23, 30};
  // G2 tap pairs per PRN 1..37 (IS-GPS-200 Table 3-Ia).
  int tap_a [37] = '{2,3,4,5,1,2,1,2,3,2,3,5,6,7,8,9,1,2,3,4,5,6,1,4,5,6,7,8,1,2,3,4,5,4,1,2,4};
  int tap_b [37] = '{6,7,8,9,9,10,8,9,10,3,4,6,7,8,9,10,4,5,6,7,8,9,3,6,7,8,9,10,6,7,8,9,10,10,7,8,10};
  byte code [37][LEN];                     // +1 / -1 per chip
  longint ci [LEN], cq [LEN];              // chip-integrated I and Q
  longint cyc = 0;
  int n_single = 0, n_sum = 0, n_absent = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void ca_model(input int p);
    bit r1 [11], r2 [11];
    bit f1, f2;
    for (int i = 1; i <= 10; i++) begin r1[i] = 1; r2[i] = 1; end
    for (int n = 0; n < LEN; n++) begin
      code[p][n] = (r1[10] ^ r2[tap_a[p]] ^ r2[tap_b[p]]) ? -1 : 1;
      f1 = r1[3] ^ r1[10];
      f2 = r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10];
      for (int i = 10; i > 1; i--) begin r1[i] = r1[i-1]; r2[i] = r2[i-1]; end
      r1[1] = f1; r2[1] = f2;
    end
  endfunction

  task automatic host_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // One code period of chip-integrated I/Q, starting at the rising edge of
  // the epoch flag of SV `s`.
  task automatic capture(input int s);
    @(posedge sv_epoch[s]);
    for (int n = 0; n < LEN; n++) begin
      ci[n] = 0; cq[n] = 0;
      for (int k = 0; k < DIV; k++) begin
        @(posedge clk);
        case (cyc % 4)
          0: ci[n] += dac_data;
          1: cq[n] += dac_data;
          2: ci[n] -= dac_data;
          default: cq[n] -= dac_data;
        endcase
      end
    end
  endtask

  // Normalised correlation magnitude of the capture with PRN p at phase k.
  function automatic real corr(input int p, input int k);
    longint si = 0, sq = 0;
    for (int n = 0; n < LEN; n++) begin
      si += code[p][(n + k) % LEN] * ci[n];
      sq += code[p][(n + k) % LEN] * cq[n];
    end
    return $sqrt(real'(si) * real'(si) + real'(sq) * real'(sq)) / (FULL * LEN);
  endfunction

  // Correlate against all 37 PRNs; `present` marks those being sent.
  task automatic judge(input bit present [37], input real peak_min, input string name);
    for (int p = 0; p < 37; p++) begin
      real best = 0.0;
      int best_k = 0;
      for (int k = 0; k < LEN; k++) begin
        automatic real v = corr(p, k);
        if (v > best) begin best = v; best_k = k; end
      end
      if (present[p]) begin
        $display("%s: PRN %0d peak %0.3f at phase %0d", name, p + 1, best, best_k);
        check(best >= peak_min, $sformatf("%s: PRN %0d peak %0.3f too low", name, p + 1, best));
        check(best_k == 0, $sformatf("%s: PRN %0d peak at phase %0d", name, p + 1, best_k));
        if (name == "all four") n_sum++; else n_single++;
      end else begin
        if (p == 27) $display("%s: PRN 28 (absent) max %0.3f", name, best);
        check(best <= ABSENT_MAX, $sformatf("%s: absent PRN %0d reaches %0.3f", name, p + 1, best));
        n_absent++;
      end
    end
  endtask

  initial begin
    bit present [37];
    for (int p = 0; p < 37; p++) ca_model(p);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int s = 0; s < 4; s++) begin
      host_write(16'((s << 4) | REG_G2_SEL1), 32'(tap_a[prns[s] - 1] - 1));
      host_write(16'((s << 4) | REG_G2_SEL2), 32'(tap_b[prns[s] - 1] - 1));
      host_write(16'((s << 4) | REG_MSG_OFF), 32'd1);
    end
    // Each SV alone.
    for (int s = 0; s < 4; s++) begin
      host_write(16'h0040, 32'(((1 << s) >> 0) & 3));
      host_write(16'h0041, 32'(((1 << s) >> 2) & 3));
      for (int p = 0; p < 37; p++) present[p] = (p == prns[s] - 1);
      capture(s);
      judge(present, PEAK_MIN, $sformatf("SV%0d alone", s + 1));
    end
    // All four together.
    host_write(16'h0040, 32'd3);
    host_write(16'h0041, 32'd3);
    for (int p = 0; p < 37; p++) present[p] = 0;
    for (int s = 0; s < 4; s++) present[prns[s] - 1] = 1;
    capture(0);
    judge(present, PEAK_MIN_SUM, "all four");
    $display("mechanisms: single-SV peaks=%0d sum peaks=%0d absent PRNs tested=%0d",
             n_single, n_sum, n_absent);
    check(n_single == 4, "single-SV captures incomplete");
    check(n_sum == 4, "sum capture incomplete");
    check(n_absent == 4 * 36 + 33, "absent-PRN checks incomplete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12 * LEN * DIV) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
