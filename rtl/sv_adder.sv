// sv_adder: combines the four SV signals into one DAC sample.
//
// A two-stage registered adder tree, as in the original firmware: SV1 + SV2
// and SV3 + SV4 are added in the first stage, the two partial sums in the
// second. Each SV passes through an on/off switch in the first stage, so any
// subset of the four signals can be sent. Equal-amplitude BPSK signals add to
// 0, 2A or 4A in magnitude depending on their signs; the output is two bits
// wider than an input so the sum never overflows.
//
// Timing: two cycles from sv_sample to sum.
module sv_adder #(
  parameter int SAMPLE_W = 14
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [3:0]                   sv_en,
  input  logic signed [SAMPLE_W-1:0]   sv_sample [4],
  output logic signed [SAMPLE_W+1:0]   sum
);

  logic signed [SAMPLE_W-1:0] gated [4];
  logic signed [SAMPLE_W:0]   sum_a, sum_b;

  always_comb begin
    for (int i = 0; i < 4; i++)
      gated[i] = sv_en[i] ? sv_sample[i] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_a <= '0;
      sum_b <= '0;
      sum   <= '0;
    end else begin
      sum_a <= (SAMPLE_W+1)'(gated[0]) + (SAMPLE_W+1)'(gated[1]);
      sum_b <= (SAMPLE_W+1)'(gated[2]) + (SAMPLE_W+1)'(gated[3]);
      sum   <= (SAMPLE_W+2)'(sum_a) + (SAMPLE_W+2)'(sum_b);
    end
  end

endmodule
