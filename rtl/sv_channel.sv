// sv_channel: the complete signal of one satellite (the "single signal model").
//
// Chain: prn_clock divides the system clock to the 1.023 MHz chip tick;
// prn_generator produces the C/A code selected by the G2 selector registers;
// message_clock divides the chip tick to 1 kHz and 50 Hz; message_data reads
// the navigation message from message_bram one bit per 50 Hz tick; the chip
// and the data bit are XORed in bpsk_modulator, which flips the sign of the
// carrier from carrier_dds.
//
// Alignment: the data bit appears three system clocks after the chip tick that
// ends its 20 ms period (two for the message clock, see message_clock, and
// two for the BRAM read, minus the one the chip itself takes). The chip is
// therefore delayed by DATA_ALIGN = 3 cycles before the modulator, so that
// data-bit transitions fall exactly on C/A code epochs, as GPS requires. The
// original firmware inserted such delays by trial and error; this value is
// derived from this design's pipeline.
//
// Outputs chip_out, data_out and epoch_out are the aligned modulator inputs
// and code-epoch flag, for observation; prn_tick and msg_tick are the chip and
// data-bit ticks; msg_wrap marks the end of one pass through the message BRAM;
// sample is the modulated carrier, 2 * MUX_LAT + DATA_ALIGN cycles behind the
// code generator.
module sv_channel
  import gps_pkg::*;
#(
  parameter int PRN_DIV   = PRN_DIV_DEFAULT,
  parameter int CODE_LEN  = CODE_LEN_DEFAULT,
  parameter int BIT_DIV   = BIT_DIV_DEFAULT,
  parameter int MSG_WORDS = MSG_WORDS_DEFAULT,
  parameter int SAMPLE_W  = 14,
  parameter int MUX_LAT   = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  sv_cfg_t                    cfg,
  input  bram_wr_t                   bram_wr,
  output logic signed [SAMPLE_W-1:0] sample,
  output logic                       chip_out,
  output logic                       data_out,
  output logic                       epoch_out,
  output logic                       prn_tick,
  output logic                       msg_tick,
  output logic                       msg_wrap
);

  localparam int DATA_ALIGN = 3;

  logic                         ms_tick;
  logic                         chip, epoch;
  logic [DATA_ALIGN-1:0]        chip_d, epoch_d;
  logic [MSG_ADDR_W-1:0]        raddr;
  logic [MSG_WORD_W-1:0]        rdata;
  logic                         data_bit;
  logic signed [SAMPLE_W-1:0]   carrier;

  prn_clock #(.DIV(PRN_DIV)) u_prn_clock (
    .clk, .rst, .prn_tick
  );

  prn_generator u_prn (
    .clk, .rst, .prn_tick,
    .sel1 (cfg.g2_sel1),
    .sel2 (cfg.g2_sel2),
    .chip, .epoch
  );

  message_clock #(.CODE_LEN(CODE_LEN), .BIT_DIV(BIT_DIV)) u_msg_clock (
    .clk, .rst, .prn_tick,
    .msg_fast (cfg.msg_fast),
    .ms_tick, .msg_tick
  );

  message_bram #(.DEPTH(MSG_WORDS), .WIDTH(MSG_WORD_W), .ADDR_W(MSG_ADDR_W)) u_bram (
    .clk,
    .we    (bram_wr.we),
    .waddr (bram_wr.addr),
    .wdata (bram_wr.data),
    .raddr, .rdata
  );

  message_data #(.WORDS(MSG_WORDS), .BPW(BITS_PER_WORD)) u_msg_data (
    .clk, .rst, .msg_tick, .raddr, .rdata, .data_bit, .word_wrap (msg_wrap)
  );

  carrier_dds #(.SAMPLE_W(SAMPLE_W)) u_dds (
    .clk, .rst, .sample (carrier)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      chip_d  <= '0;
      epoch_d <= '0;
    end else begin
      chip_d  <= {chip_d[DATA_ALIGN-2:0], chip};
      epoch_d <= {epoch_d[DATA_ALIGN-2:0], epoch};
    end
  end

  assign chip_out  = chip_d[DATA_ALIGN-1];
  assign epoch_out = epoch_d[DATA_ALIGN-1];
  assign data_out  = data_bit;

  bpsk_modulator #(.SAMPLE_W(SAMPLE_W), .MUX_LAT(MUX_LAT)) u_mod (
    .clk, .rst,
    .chip     (chip_out),
    .data_bit (data_bit),
    .prn_off  (cfg.prn_off),
    .msg_off  (cfg.msg_off),
    .carrier,
    .sample
  );

endmodule
