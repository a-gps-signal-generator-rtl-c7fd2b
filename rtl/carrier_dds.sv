// carrier_dds: direct digital synthesiser for the carrier.
//
// A PHASE_W-bit phase accumulator advances by PHASE_INC every system clock;
// its top LUT_AW bits address a full-period sine table of 2**LUT_AW signed
// SAMPLE_W-bit entries, round(A * sin(2*pi*k / 2**LUT_AW)) with
// A = 2**(SAMPLE_W-1) - 1. The table is computed at elaboration, so it is a
// ROM in hardware. The output frequency is f_sys * PHASE_INC / 2**PHASE_W.
//
// The default PHASE_INC = 2**(PHASE_W-2) gives f_sys / 4: 50.127 MHz from the
// 200.508 MHz system clock, four samples per carrier cycle (0, +A, 0, -A),
// and exactly 49 carrier cycles per C/A chip. The original firmware used a
// vendor DDS core of which only the frequency is known; the accumulator width,
// table size, amplitude and one-sample-per-clock output are this design's own.
//
// Timing: one cycle from phase to sample. After reset the phase is zero and
// the first sample is 0.
module carrier_dds #(
  parameter int          PHASE_W   = 32,
  parameter int          LUT_AW    = 10,
  parameter int          SAMPLE_W  = 14,
  parameter logic [63:0] PHASE_INC = 64'(1) << (PHASE_W - 2)
) (
  input  logic                       clk,
  input  logic                       rst,
  output logic signed [SAMPLE_W-1:0] sample
);

  localparam real PI  = 3.14159265358979323846;
  localparam real AMP = real'((2 ** (SAMPLE_W - 1)) - 1);

  logic [PHASE_W-1:0]        phase;
  logic signed [SAMPLE_W-1:0] lut [2 ** LUT_AW];

  for (genvar k = 0; k < 2 ** LUT_AW; k++) begin : g_lut
    localparam real ANGLE = 2.0 * PI * real'(k) / real'(2 ** LUT_AW);
    localparam int  VAL   = $rtoi($floor(AMP * $sin(ANGLE) + 0.5));
    assign lut[k] = SAMPLE_W'(VAL);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= '0;
      sample <= '0;
    end else begin
      phase  <= phase + PHASE_W'(PHASE_INC);
      sample <= lut[phase[PHASE_W-1 -: LUT_AW]];
    end
  end

endmodule
