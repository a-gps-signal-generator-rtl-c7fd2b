// bpsk_modulator: spreads and modulates the carrier of one SV.
//
// The symbol is chip XOR data_bit, where the PRN shutdown switch forces the
// chip to 0 and the message shutdown switch forces the data bit to 0, so that
// either part of the signal can be tested alone. A symbol of 0 sends the
// carrier unchanged and a symbol of 1 sends its negation (a 180 degree phase
// shift); this 0 -> +1, 1 -> -1 mapping is this design's choice.
//
// As in the original firmware two multiplexers do the work, each with a
// pipeline latency of MUX_LAT (4) system clocks: the first turns the XOR
// result into the constant select of the second, the second picks the carrier
// or its negation. The carrier is taken at the input of the second mux.
//
// Timing: sample(t) = (sym(t - 2*MUX_LAT) ? -1 : +1) * carrier(t - MUX_LAT).
// The carrier amplitude must be symmetric (no most-negative value), which the
// DDS table guarantees.
module bpsk_modulator #(
  parameter int SAMPLE_W = 14,
  parameter int MUX_LAT  = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       chip,
  input  logic                       data_bit,
  input  logic                       prn_off,
  input  logic                       msg_off,
  input  logic signed [SAMPLE_W-1:0] carrier,
  output logic signed [SAMPLE_W-1:0] sample
);

  logic                       sym;
  logic [MUX_LAT-1:0]         sel_pipe;
  logic signed [SAMPLE_W-1:0] out_pipe [MUX_LAT];
  logic signed [SAMPLE_W-1:0] mux_out;

  assign sym = (chip & ~prn_off) ^ (data_bit & ~msg_off);

  // First mux: symbol -> select, MUX_LAT cycles.
  always_ff @(posedge clk) begin
    if (rst) sel_pipe <= '0;
    else     sel_pipe <= {sel_pipe[MUX_LAT-2:0], sym};
  end

  // Second mux: carrier or its negation, MUX_LAT cycles.
  assign mux_out = sel_pipe[MUX_LAT-1] ? -carrier : carrier;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < MUX_LAT; i++) out_pipe[i] <= '0;
    end else begin
      out_pipe[0] <= mux_out;
      for (int i = 1; i < MUX_LAT; i++) out_pipe[i] <= out_pipe[i-1];
    end
  end

  assign sample = out_pipe[MUX_LAT-1];

  initial assert (MUX_LAT >= 2) else $error("bpsk_modulator: MUX_LAT must be at least 2");

endmodule
