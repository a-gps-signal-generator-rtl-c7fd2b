// prn_generator: C/A (Gold) code generator of one SV.
//
// Two 10-stage shift registers, G1 and G2, numbered 1 (leftmost, most
// significant) to 10, both start at all ones and shift right on every chip
// tick. The new stage 1 of G1 is G1[3] ^ G1[10] (polynomial 1 + x^3 + x^10);
// the new stage 1 of G2 is G2[2] ^ G2[3] ^ G2[6] ^ G2[8] ^ G2[9] ^ G2[10]
// (polynomial 1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10). The chip is
// G1[10] ^ G2[a] ^ G2[b], where the two G2 stages a and b are picked by two
// 10-input multiplexers whose selects come from software registers REG1 and
// REG2 holding a-1 and b-1 (the per-PRN pairs of the GPS interface
// specification, e.g. 2 and 6 for PRN 1, 3 and 10 for PRN 9). A select value
// above 9 contributes 0 (this design's choice).
//
// The code repeats every 1023 chips. epoch is high while G1 is all ones,
// i.e. while the first chip of a code period is on the output.
//
// Timing: chip changes in the cycle after prn_tick. Changing sel1/sel2 takes
// effect at once; the registers are not restarted.
module prn_generator (
  input  logic       clk,
  input  logic       rst,
  input  logic       prn_tick,
  input  logic [3:0] sel1,
  input  logic [3:0] sel2,
  output logic       chip,
  output logic       epoch
);

  logic [1:10] g1, g2;
  logic        g2_a, g2_b;

  function automatic logic pick(input logic [1:10] r, input logic [3:0] sel);
    logic v;
    v = 1'b0;
    for (int i = 0; i < 10; i++)
      if (sel == 4'(i)) v = r[i+1];
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      g1 <= '1;
      g2 <= '1;
    end else if (prn_tick) begin
      g1 <= {g1[3] ^ g1[10], g1[1:9]};
      g2 <= {g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10], g2[1:9]};
    end
  end

  assign g2_a  = pick(g2, sel1);
  assign g2_b  = pick(g2, sel2);
  assign chip  = g1[10] ^ g2_a ^ g2_b;
  assign epoch = &g1;

endmodule
