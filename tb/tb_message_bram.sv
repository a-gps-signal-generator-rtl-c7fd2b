// tb_message_bram: writes random words to random addresses of the 1023 x 32
// message RAM and reads them back, comparing with a reference array; checks
// the one-cycle read latency and that a write does not disturb other words.
module tb_message_bram;
  localparam int DEPTH = 1023;
  logic clk = 1'b0, we = 1'b0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  message_bram #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // Fill every word.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'(a); wdata = $urandom; ref_mem[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // Random overwrites interleaved with reads.
    for (int i = 0; i < 3000; i++) begin
      automatic int ra = $urandom_range(DEPTH - 1);
      @(negedge clk);
      raddr = 10'(ra);
      we = ($urandom_range(1) == 1);
      waddr = 10'($urandom_range(DEPTH - 1));
      wdata = $urandom;
      @(posedge clk);
      // Read returns the contents before this cycle's write.
      #1 check(rdata == ref_mem[ra], $sformatf("read %0d: %h vs %h", ra, rdata, ref_mem[ra]));
      if (we) ref_mem[waddr] = wdata;
    end
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
