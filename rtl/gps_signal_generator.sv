// gps_signal_generator: four-satellite GPS L1 C/A signal generator (top level).
//
// Four copies of sv_channel each produce one satellite's BPSK signal: a
// carrier at f_sys/4 (50.127 MHz with the 200.508 MHz system clock) whose sign
// follows the XOR of a 1.023 Mchip/s C/A code and the 50 bit/s navigation
// data from that SV's message BRAM. sv_adder sums the four signals, with an
// on/off switch per SV, into the sample sent to the DAC. control_registers
// decodes a simple host write bus into the per-SV configuration (PRN
// selection, test switches) and the BRAM writes. Every channel has its own
// clock dividers; all are reset together, so their chips and data bits stay
// in step.
//
// Interface: clk is the system clock (the DAC interface clock; deriving it
// from the board's input clock is outside this design); rst is synchronous
// and active high. host_we/host_addr/host_wdata form a write-only bus (map in
// gps_pkg). dac_data is the signed sum, SAMPLE_W + 2 bits, sign-extended to
// DAC_W (16) bits for the DAC. The sv_* outputs expose each channel's aligned
// chip and data bit, code epoch, ticks and message wrap for test equipment.
//
// Timing: dac_data is 2 * MUX_LAT + 3 + 2 cycles behind the code generators.
module gps_signal_generator
  import gps_pkg::*;
#(
  parameter int PRN_DIV   = PRN_DIV_DEFAULT,
  parameter int CODE_LEN  = CODE_LEN_DEFAULT,
  parameter int BIT_DIV   = BIT_DIV_DEFAULT,
  parameter int MSG_WORDS = MSG_WORDS_DEFAULT,
  parameter int SAMPLE_W  = 14,
  parameter int MUX_LAT   = 4,
  parameter int DAC_W     = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   host_we,
  input  logic [HOST_ADDR_W-1:0] host_addr,
  input  logic [HOST_DATA_W-1:0] host_wdata,
  output logic signed [DAC_W-1:0] dac_data,
  output logic [NUM_SV-1:0]      sv_chip,
  output logic [NUM_SV-1:0]      sv_data,
  output logic [NUM_SV-1:0]      sv_epoch,
  output logic [NUM_SV-1:0]      sv_prn_tick,
  output logic [NUM_SV-1:0]      sv_msg_tick,
  output logic [NUM_SV-1:0]      sv_msg_wrap
);

  sv_cfg_t                    sv_cfg  [NUM_SV];
  bram_wr_t                   bram_wr [NUM_SV];
  logic [NUM_SV-1:0]          sv_en;
  logic signed [SAMPLE_W-1:0] sv_sample [NUM_SV];
  logic signed [SAMPLE_W+1:0] sum;

  control_registers u_regs (
    .clk, .rst, .host_we, .host_addr, .host_wdata,
    .sv_cfg, .sv_en, .bram_wr
  );

  for (genvar s = 0; s < NUM_SV; s++) begin : g_sv
    sv_channel #(
      .PRN_DIV   (PRN_DIV),
      .CODE_LEN  (CODE_LEN),
      .BIT_DIV   (BIT_DIV),
      .MSG_WORDS (MSG_WORDS),
      .SAMPLE_W  (SAMPLE_W),
      .MUX_LAT   (MUX_LAT)
    ) u_sv (
      .clk, .rst,
      .cfg       (sv_cfg[s]),
      .bram_wr   (bram_wr[s]),
      .sample    (sv_sample[s]),
      .chip_out  (sv_chip[s]),
      .data_out  (sv_data[s]),
      .epoch_out (sv_epoch[s]),
      .prn_tick  (sv_prn_tick[s]),
      .msg_tick  (sv_msg_tick[s]),
      .msg_wrap  (sv_msg_wrap[s])
    );
  end

  sv_adder #(.SAMPLE_W(SAMPLE_W)) u_adder (
    .clk, .rst, .sv_en, .sv_sample, .sum
  );

  assign dac_data = DAC_W'(sum);

  initial assert (SAMPLE_W + 2 <= DAC_W) else $error("gps_signal_generator: sum wider than DAC");

endmodule
