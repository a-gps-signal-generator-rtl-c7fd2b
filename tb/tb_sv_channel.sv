// tb_sv_channel: end-to-end check of one satellite channel at reduced clock
// ratios (chip tick every 4 cycles, 2 code periods per data bit, 2 message
// words) so that two full passes through the message fit in a short run.
// Every cycle it compares, against references computed here:
//   chip_out  with a software C/A model of PRN 9 (G2 stages 3 and 10),
//   data_out  with the 30-bit-per-word bit stream loaded into the BRAM,
//   epoch_out with the start of each 1023-chip code period,
//   sample    with (+/-) the f_sys/4 carrier 0, A, 0, -A, the sign being
//             chip XOR data eight cycles earlier and the carrier four.
// Data-bit edges must fall on code epochs. Runs are repeated with the PRN
// shutdown switch, the message shutdown switch and the message clock switch.
module tb_sv_channel;
  import gps_pkg::*;
  localparam int DIV = 4, LEN = 1023, BDIV = 2, WORDS = 2, A = 8191;

  logic clk = 1'b0, rst = 1'b1;
  sv_cfg_t cfg;
  bram_wr_t bram_wr;
  logic signed [13:0] sample;
  logic chip_out, data_out, epoch_out, prn_tick, msg_tick, msg_wrap;
  int checks = 0, failures = 0;
  bit seq [LEN];
  bit stream [WORDS * 30];
  int edges_on_epoch = 0, wraps = 0;

  sv_channel #(.PRN_DIV(DIV), .CODE_LEN(LEN), .BIT_DIV(BDIV), .MSG_WORDS(WORDS)) dut (
    .clk, .rst, .cfg, .bram_wr, .sample, .chip_out, .data_out, .epoch_out,
    .prn_tick, .msg_tick, .msg_wrap);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void ca_model(input int a, input int b);
    bit r1 [11], r2 [11];
    bit f1, f2;
    for (int i = 1; i <= 10; i++) begin r1[i] = 1; r2[i] = 1; end
    for (int n = 0; n < LEN; n++) begin
      seq[n] = r1[10] ^ r2[a] ^ r2[b];
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

  // Run for ncycles after reset, checking every cycle.
  task automatic run(input int ncycles, input bit fast, input bit prn_off, input bit msg_off,
                     input string name);
    bit exp_chip [$], exp_data [$];
    int chips_per_bit = fast ? 1 : LEN * BDIV;
    bit prev_data = 0;
    cfg.msg_fast = fast; cfg.prn_off = prn_off; cfg.msg_off = msg_off;
    @(negedge clk) rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < ncycles; c++) begin
      automatic int k = (c >= 3) ? (c - 3) / DIV : 0;
      automatic bit ec = (c >= 3) ? seq[k % LEN] : 1'b0;
      automatic bit ed = stream[(k / chips_per_bit) % (WORDS * 30)];
      exp_chip.push_back(ec);
      exp_data.push_back(ed);
      check(chip_out == ec, $sformatf("%s c=%0d chip %0d", name, c, k));
      check(data_out == ed, $sformatf("%s c=%0d data", name, c));
      check(epoch_out == (c >= 3 && k % LEN == 0), $sformatf("%s c=%0d epoch", name, c));
      if (c > 3 && data_out != prev_data && !fast) begin
        check(epoch_out && (c - 3) % DIV == 0, $sformatf("%s c=%0d data edge off epoch", name, c));
        edges_on_epoch++;
      end
      prev_data = data_out;
      if (c >= 12) begin
        automatic bit sym = (exp_chip[c - 8] & ~prn_off) ^ (exp_data[c - 8] & ~msg_off);
        automatic int e = sym ? -carrier_at(c - 4) : carrier_at(c - 4);
        check(int'(sample) == e, $sformatf("%s c=%0d sample %0d expected %0d", name, c, sample, e));
      end
      if (msg_wrap) wraps++;
      @(negedge clk);
    end
  endtask

  initial begin
    cfg = SV_CFG_RESET;
    cfg.g2_sel1 = 4'd2;  // PRN 9: G2 stages 3 and 10
    cfg.g2_sel2 = 4'd9;
    ca_model(3, 10);
    bram_wr = '0;
    // Load two words with a random 60-bit stream (filler in bits 1:0).
    for (int i = 0; i < WORDS * 30; i++) stream[i] = 1'($urandom);
    stream[0] = 1; stream[1] = 0;  // guarantee an edge after the first bit
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      bram_wr.we = 1'b1;
      bram_wr.addr = 10'(w);
      bram_wr.data = {30'b0, 2'($urandom)};
      for (int b = 0; b < 30; b++) bram_wr.data[31 - b] = stream[w * 30 + b];
    end
    @(negedge clk) bram_wr.we = 1'b0;

    // Two full passes of the 60-bit message, plus a little.
    run(2 * WORDS * 30 * LEN * BDIV * DIV + 100, 1'b0, 1'b0, 1'b0, "normal");
    check(wraps == 2, $sformatf("%0d message passes", wraps));
    check(edges_on_epoch > 10, $sformatf("only %0d data edges", edges_on_epoch));
    run(3 * LEN * DIV, 1'b0, 1'b1, 1'b0, "prn_off");
    run(3 * LEN * DIV, 1'b0, 1'b0, 1'b1, "msg_off");
    run(3 * WORDS * 30 * DIV, 1'b1, 1'b0, 1'b0, "fast");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * WORDS * 30 * LEN * BDIV * DIV + 7 * LEN * DIV + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
