// tb_gps_signal_generator: end-to-end test of the four-satellite generator.
//
// The host bus loads each SV's message BRAM with its own random bit stream
// (30 bits per word, MSB first) and selects PRNs 9, 15, 23 and 30 through
// the G2 selector registers. Every cycle the testbench then compares, with
// references computed here (software C/A model, the loaded bit streams, the
// f_sys/4 carrier 0, A, 0, -A and the pipeline latencies):
//   each SV's chip, data bit and code-epoch flag,
//   dac_data = sum over enabled SVs of (+/-) carrier, the sign being
//              chip XOR data (after the PRN and message shutdown switches)
//              ten cycles earlier and the carrier six.
// Phase A runs at the 50 Hz-equivalent data rate over PASSES passes of the
// message while the test switches are exercised; phase B resets, turns on
// the message clock switch and runs whole passes at the chip rate.
// Mechanisms counted, each must occur: message wrap, data edges on code
// epochs, PRN shutdown, message shutdown, SV switched off, message clock
// switch, and the zero / half / full amplitude of the four-signal sum.
module tb_gps_signal_generator;
  import gps_pkg::*;
  localparam int DIV = 4, LEN = 1023, BDIV = 2, WORDS = 2, A = 8191;
  localparam int BITS = WORDS * 30;
  localparam int BIT_CYC = LEN * BDIV * DIV;
  localparam int SW = BIT_CYC;                        // spacing of the switch script
  localparam int RUN_A = 2 * BITS * BIT_CYC + 200;    // two passes of the message
  localparam int RUN_B = 3 * BITS * DIV + 200;        // three passes at the chip rate
  localparam int MIN_WRAPS = 4 * (2 + 3);

  logic clk = 1'b0, rst = 1'b1, host_we = 1'b0;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic signed [15:0] dac_data;
  logic [3:0] sv_chip, sv_data, sv_epoch, sv_prn_tick, sv_msg_tick, sv_msg_wrap;

  gps_signal_generator #(.PRN_DIV(DIV), .CODE_LEN(LEN), .BIT_DIV(BDIV), .MSG_WORDS(WORDS)) dut (
    .clk, .rst, .host_we, .host_addr, .host_wdata, .dac_data,
    .sv_chip, .sv_data, .sv_epoch, .sv_prn_tick, .sv_msg_tick, .sv_msg_wrap);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int prns [4] = '{9, 15, 23, 30};
  int tap_a [4] = '{3, 8, 1, 2};
  int tap_b [4] = '{10, 9, 3, 7};
  bit seq [4][LEN];
  bit stream [4][BITS];
  // Mechanism counters.
  int n_wrap = 0, n_epoch_edge = 0, n_prn_off = 0, n_msg_off = 0, n_sv_off = 0, n_fast = 0;
  int n_level [3];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic void ca_model(input int s, input int a, input int b);
    bit r1 [11], r2 [11];
    bit f1, f2;
    for (int i = 1; i <= 10; i++) begin r1[i] = 1; r2[i] = 1; end
    for (int n = 0; n < LEN; n++) begin
      seq[s][n] = r1[10] ^ r2[a] ^ r2[b];
      f1 = r1[3] ^ r1[10];
      f2 = r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10];
      for (int i = 10; i > 1; i--) begin r1[i] = r1[i-1]; r2[i] = r2[i-1]; end
      r1[1] = f1; r2[1] = f2;
    end
  endfunction

  function automatic int carrier_at(input int c);
    int pat [4] = '{0, A, 0, -A};
    return (c < 1) ? 0 : pat[(c - 1) % 4];
  endfunction

  // Switch state as seen by the datapath and expected chips and data, per
  // cycle, kept for the last 16 cycles (writes act one cycle later).
  localparam int H = 16;
  bit prn_off_h [4][H], msg_off_h [4][H], en_h [4][H];
  bit cur_prn_off [4], cur_msg_off [4], cur_en [4];
  bit exp_chip [4][H], exp_data [4][H];

  // Host write issued in the current cycle (call right after a negedge).
  task automatic host_write(input logic [15:0] a, input logic [31:0] d);
    host_we = 1'b1; host_addr = a; host_wdata = d;
  endtask

  task automatic apply_write();
    // Mirror a register write into the expected switch state.
    if (host_we && !host_addr[15]) begin
      if (host_addr[6]) begin
        if (host_addr[0]) begin cur_en[2] = host_wdata[0]; cur_en[3] = host_wdata[1]; end
        else              begin cur_en[0] = host_wdata[0]; cur_en[1] = host_wdata[1]; end
      end else if (host_addr[2:0] == 3'd3) cur_prn_off[host_addr[5:4]] = host_wdata[0];
      else if (host_addr[2:0] == 3'd4)     cur_msg_off[host_addr[5:4]] = host_wdata[0];
    end
  endtask

  // One phase: reset, then per cycle optional host write from the script,
  // and from cycle C0 on the full comparison.
  task automatic run_phase(input int ncycles, input bit fast, input string name);
    localparam int C0 = 64;
    int chips_per_bit = fast ? 1 : LEN * BDIV;
    bit prev_data [4];
    int wi = 0;
    @(negedge clk) rst = 1'b1;
    repeat (2) @(negedge clk);
    for (int s = 0; s < 4; s++) begin
      cur_prn_off[s] = 0; cur_msg_off[s] = 0; cur_en[s] = 1;
      prev_data[s] = 0;
    end
    rst = 1'b0;
    for (int c = 0; c < ncycles; c++) begin
      automatic int dsum = 0;
      // Script of host writes: message clock switch first, then PRN selection.
      host_we = 1'b0;
      if (c < 4 && fast) begin host_write(16'((c << 4) | 2), 32'd1); n_fast++; end
      else if (c >= 4 && c < 12) begin
        automatic int s = (c - 4) / 2;
        host_write(16'((s << 4) | ((c - 4) % 2)), 32'(((c - 4) % 2) ? tap_b[s] - 1 : tap_a[s] - 1));
      end else if (!fast) begin
        // Test switches during phase A.
        case (c)
          SW * 3 + 100:    host_write(16'h0013, 32'd1);          // SV2 PRN off
          SW * 4 + 100:    host_write(16'h0013, 32'd0);
          SW * 5 + 100:    host_write(16'h0024, 32'd1);          // SV3 message off
          SW * 6 + 100:    host_write(16'h0024, 32'd0);
          SW * 7 + 100:    host_write(16'h0040, 32'd2);          // SV1 off
          SW * 8 + 100:    host_write(16'h0040, 32'd3);
          SW * 9 + 100:    host_write(16'h0041, 32'd1);          // SV4 off
          SW * 10 + 100:   host_write(16'h0041, 32'd3);
          default: ;
        endcase
      end
      // Switch state seen in cycle c (written in an earlier cycle).
      for (int s = 0; s < 4; s++) begin
        prn_off_h[s][c % H] = cur_prn_off[s];
        msg_off_h[s][c % H] = cur_msg_off[s];
        en_h[s][c % H]      = cur_en[s];
      end
      apply_write();
      for (int s = 0; s < 4; s++) begin
        automatic int k = (c >= 3) ? (c - 3) / DIV : 0;
        automatic bit ec = (c >= 3) ? seq[s][k % LEN] : 1'b0;
        automatic bit ed = stream[s][(k / chips_per_bit) % BITS];
        exp_chip[s][c % H] = ec;
        exp_data[s][c % H] = ed;
        if (c >= C0) begin
          check(sv_chip[s] == ec, $sformatf("%s c=%0d SV%0d chip", name, c, s + 1));
          check(sv_data[s] == ed, $sformatf("%s c=%0d SV%0d data", name, c, s + 1));
          check(sv_epoch[s] == (k % LEN == 0), $sformatf("%s c=%0d SV%0d epoch", name, c, s + 1));
          if (!fast && sv_data[s] != prev_data[s]) begin
            check(sv_epoch[s] && (c - 3) % DIV == 0, $sformatf("%s c=%0d SV%0d data edge off epoch", name, c, s + 1));
            n_epoch_edge++;
          end
          if (sv_msg_wrap[s]) n_wrap++;
        end
        prev_data[s] = sv_data[s];
        if (c >= C0) begin
          automatic int t = c - 2;  // adder input cycle
          automatic int u = (t - 8) % H;
          automatic bit sym = (exp_chip[s][u] & ~prn_off_h[s][u]) ^
                              (exp_data[s][u] & ~msg_off_h[s][u]);
          automatic int v = sym ? -carrier_at(t - 4) : carrier_at(t - 4);
          if (en_h[s][t % H]) dsum += v;
          if (s == 0) begin
            if (prn_off_h[1][u]) n_prn_off++;
            if (msg_off_h[2][u]) n_msg_off++;
            if (!en_h[0][t % H] || !en_h[3][t % H]) n_sv_off++;
          end
        end
      end
      if (c >= C0) begin
        check(int'(dac_data) == dsum, $sformatf("%s c=%0d dac %0d expected %0d", name, c, dac_data, dsum));
        if (en_h[0][(c-2) % H] && en_h[1][(c-2) % H] && en_h[2][(c-2) % H] && en_h[3][(c-2) % H] &&
            carrier_at(c - 6) != 0) begin
          if (dsum == 0) n_level[0]++;
          else if (dsum == 2 * A || dsum == -2 * A) n_level[1]++;
          else if (dsum == 4 * A || dsum == -4 * A) n_level[2]++;
        end
      end
      @(negedge clk);
    end
    host_we = 1'b0;
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      ca_model(s, tap_a[s], tap_b[s]);
      for (int i = 0; i < BITS; i++) stream[s][i] = 1'($urandom);
      stream[s][0] = 1'b1; stream[s][1] = 1'b0;
    end
    // Load the message BRAMs through the host bus (BRAM space, addr[15] = 1).
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int s = 0; s < 4; s++)
      for (int w = 0; w < WORDS; w++) begin
        automatic logic [31:0] d = {30'b0, 2'($urandom)};
        for (int b = 0; b < 30; b++) d[31 - b] = stream[s][w * 30 + b];
        host_write(16'h8000 | 16'(s << 13) | 16'(w), d);
        @(negedge clk);
      end
    host_we = 1'b0;
    run_phase(RUN_A, 1'b0, "normal");
    run_phase(RUN_B, 1'b1, "fast");
    check(n_wrap >= MIN_WRAPS, $sformatf("message wraps %0d", n_wrap));
    check(n_epoch_edge > 0, "no data edge on a code epoch");
    check(n_prn_off > 0, "PRN shutdown never active");
    check(n_msg_off > 0, "message shutdown never active");
    check(n_sv_off > 0, "no SV ever switched off");
    check(n_fast > 0, "message clock switch never used");
    foreach (n_level[i]) check(n_level[i] > 0, $sformatf("sum amplitude level %0d never seen", i));
    $display("mechanisms: wraps=%0d epoch_edges=%0d prn_off=%0d msg_off=%0d sv_off=%0d fast=%0d levels=%0d/%0d/%0d",
             n_wrap, n_epoch_edge, n_prn_off, n_msg_off, n_sv_off, n_fast, n_level[0], n_level[1], n_level[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_A + RUN_B + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
