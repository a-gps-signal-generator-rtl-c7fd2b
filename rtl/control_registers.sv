// control_registers: software registers of the generator and routing of host
// writes into the message BRAMs.
//
// The host (an embedded processor in the original system, driven over the
// network) writes 32-bit words at 16-bit word addresses; the map is given in
// gps_pkg. Per SV there are the two G2 selector registers (REG1, REG2) that
// pick the PRN, the message clock switch, the PRN shutdown switch and the
// message shutdown switch. Two further registers hold the SV on/off switches
// of the adder, two SVs each. Writes with addr[15] set are passed, one cycle
// later, to the message BRAM of the addressed SV.
//
// Registers are write-only and take only the low bits they need. Reset puts
// every SV on PRN 1 with all switches off, and all four SVs on. Register
// writes take effect in the cycle after the write.
module control_registers
  import gps_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   host_we,
  input  logic [HOST_ADDR_W-1:0] host_addr,
  input  logic [HOST_DATA_W-1:0] host_wdata,
  output sv_cfg_t                sv_cfg [NUM_SV],
  output logic [NUM_SV-1:0]      sv_en,
  output bram_wr_t               bram_wr [NUM_SV]
);

  logic       is_bram, is_global;
  logic [1:0] sv_idx;
  logic [1:0] bram_sv;

  assign is_bram   = host_addr[15];
  assign is_global = ~host_addr[15] & host_addr[6];
  assign sv_idx    = host_addr[5:4];
  assign bram_sv   = host_addr[14:13];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NUM_SV; s++) sv_cfg[s] <= SV_CFG_RESET;
      sv_en <= '1;
    end else if (host_we && !is_bram) begin
      if (is_global) begin
        if (host_addr[0]) sv_en[3:2] <= host_wdata[1:0];
        else              sv_en[1:0] <= host_wdata[1:0];
      end else begin
        case (sv_reg_e'(host_addr[2:0]))
          REG_G2_SEL1:  sv_cfg[sv_idx].g2_sel1  <= host_wdata[3:0];
          REG_G2_SEL2:  sv_cfg[sv_idx].g2_sel2  <= host_wdata[3:0];
          REG_MSG_FAST: sv_cfg[sv_idx].msg_fast <= host_wdata[0];
          REG_PRN_OFF:  sv_cfg[sv_idx].prn_off  <= host_wdata[0];
          REG_MSG_OFF:  sv_cfg[sv_idx].msg_off  <= host_wdata[0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < NUM_SV; s++) begin
      if (rst) begin
        bram_wr[s].we <= 1'b0;
      end else begin
        bram_wr[s].we <= host_we && is_bram && bram_sv == 2'(s);
      end
      bram_wr[s].addr <= host_addr[MSG_ADDR_W-1:0];
      bram_wr[s].data <= host_wdata;
    end
  end

endmodule
