// tb_control_registers: writes every register of every SV and the adder
// switches through the host bus, in random order, and checks the decoded
// configuration against a reference kept here; checks that BRAM-space writes
// reach exactly the addressed SV's BRAM port one cycle later and leave the
// registers alone, and that reset restores PRN 1 with all switches off.
module tb_control_registers;
  import gps_pkg::*;
  logic clk = 1'b0, rst = 1'b1, host_we = 1'b0;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  sv_cfg_t  sv_cfg [NUM_SV];
  logic [3:0] sv_en;
  bram_wr_t bram_wr [NUM_SV];
  sv_cfg_t  ref_cfg [NUM_SV];
  logic [3:0] ref_en;
  int checks = 0, failures = 0;

  control_registers dut (.clk, .rst, .host_we, .host_addr, .host_wdata, .sv_cfg, .sv_en, .bram_wr);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(input string when);
    for (int s = 0; s < NUM_SV; s++)
      check(sv_cfg[s] == ref_cfg[s], $sformatf("%s: SV%0d cfg %h expected %h", when, s, sv_cfg[s], ref_cfg[s]));
    check(sv_en == ref_en, $sformatf("%s: sv_en %b expected %b", when, sv_en, ref_en));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int s = 0; s < NUM_SV; s++) ref_cfg[s] = '{4'd1, 4'd5, 1'b0, 1'b0, 1'b0};
    ref_en = 4'hf;
    compare("reset");
    for (int i = 0; i < 400; i++) begin
      automatic int kind = $urandom_range(6);
      automatic int s = $urandom_range(3);
      automatic logic [31:0] d = $urandom;
      if (kind <= 4) begin
        host_addr = 16'((s << 4) | kind);
        case (kind)
          0: ref_cfg[s].g2_sel1  = d[3:0];
          1: ref_cfg[s].g2_sel2  = d[3:0];
          2: ref_cfg[s].msg_fast = d[0];
          3: ref_cfg[s].prn_off  = d[0];
          default: ref_cfg[s].msg_off = d[0];
        endcase
      end else if (kind == 5) begin
        host_addr = 16'h0040 | 16'(s & 1);
        if (s & 1) ref_en[3:2] = d[1:0]; else ref_en[1:0] = d[1:0];
      end else begin
        host_addr = 16'h8000 | 16'(s << 13) | 16'($urandom_range(1022));
      end
      host_we = 1'b1; host_wdata = d;
      @(negedge clk);
      host_we = 1'b0;
      compare($sformatf("write %0d", i));
      for (int k = 0; k < NUM_SV; k++) begin
        automatic bit hit = (kind == 6) && (k == s);
        check(bram_wr[k].we == hit, $sformatf("BRAM %0d we", k));
        if (hit) check(bram_wr[k].addr == host_addr[9:0] && bram_wr[k].data == d,
                       $sformatf("BRAM %0d addr/data", k));
      end
      @(negedge clk);
      foreach (bram_wr[k]) check(!bram_wr[k].we, "BRAM write held");
    end
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    for (int s = 0; s < NUM_SV; s++) ref_cfg[s] = '{4'd1, 4'd5, 1'b0, 1'b0, 1'b0};
    ref_en = 4'hf;
    compare("second reset");
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
