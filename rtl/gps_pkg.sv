// gps_pkg: constants and types shared by the GPS L1 C/A signal generator.
//
// The generator builds four satellite (SV) signals, each a carrier that is
// BPSK-modulated by the XOR of a 1.023 Mchip/s C/A code and a 50 bit/s
// navigation data stream, and sums them for one DAC. This package holds the
// per-SV configuration written by the host (the software registers of the
// original firmware), the host address map, and the default clock ratios.
//
// Host address map (16-bit word address, write only):
//   addr[15] = 1 : message BRAM of SV addr[14:13], word addr[9:0]
//   addr[15] = 0, addr[6] = 0 : per-SV register, SV addr[5:4], register addr[2:0]
//       0 G2 selector REG1 (G2 stage number minus one, bits [3:0])
//       1 G2 selector REG2 (G2 stage number minus one, bits [3:0])
//       2 message clock switch (bit 0: data bit advances at chip rate)
//       3 PRN shutdown switch  (bit 0: chip forced to 0)
//       4 message shutdown switch (bit 0: data bit forced to 0)
//   addr[15] = 0, addr[6] = 1 : adder switches, register addr[0]
//       0 SV enable for SV1/SV2 (bits [1:0]), 1 SV enable for SV3/SV4 (bits [1:0])
// The map and the reset values are this design's choice; the register set
// itself follows the firmware description.
package gps_pkg;

  localparam int NUM_SV = 4;

  // 200.508 MHz system clock / 196 = 1.023 MHz chip clock.
  localparam int PRN_DIV_DEFAULT  = 196;
  // Chips per C/A code period (1 ms) and code periods per data bit (20 ms).
  localparam int CODE_LEN_DEFAULT = 1023;
  localparam int BIT_DIV_DEFAULT  = 20;
  // Message BRAM: 1023 words of 32 bits, 30 bits of each sent.
  localparam int MSG_WORDS_DEFAULT = 1023;
  localparam int MSG_ADDR_W        = 10;
  localparam int MSG_WORD_W        = 32;
  localparam int BITS_PER_WORD     = 30;

  localparam int HOST_ADDR_W = 16;
  localparam int HOST_DATA_W = 32;

  typedef enum logic [2:0] {
    REG_G2_SEL1   = 3'd0,
    REG_G2_SEL2   = 3'd1,
    REG_MSG_FAST  = 3'd2,
    REG_PRN_OFF   = 3'd3,
    REG_MSG_OFF   = 3'd4
  } sv_reg_e;

  // Configuration of one SV channel.
  typedef struct packed {
    logic [3:0] g2_sel1;   // G2 stage (0-based) fed to the upper selector mux
    logic [3:0] g2_sel2;   // G2 stage (0-based) fed to the lower selector mux
    logic       msg_fast;  // message clock switch
    logic       prn_off;   // PRN shutdown switch
    logic       msg_off;   // message shutdown switch
  } sv_cfg_t;

  // Reset configuration: PRN 1 (G2 stages 2 and 6), all switches off.
  localparam sv_cfg_t SV_CFG_RESET = '{g2_sel1: 4'd1, g2_sel2: 4'd5,
                                       msg_fast: 1'b0, prn_off: 1'b0, msg_off: 1'b0};

  // A host write into one message BRAM.
  typedef struct packed {
    logic                  we;
    logic [MSG_ADDR_W-1:0] addr;
    logic [MSG_WORD_W-1:0] data;
  } bram_wr_t;

endpackage
