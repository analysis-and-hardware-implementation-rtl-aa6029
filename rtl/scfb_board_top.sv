// SCFB system with host interface, as placed on the FPGA board.
//
// The host interface's register file supplies the 128-bit key (registers
// 0-15), the 96-bit initial IV of KSG1 (registers 16-27), the 128-bit IV of
// the plaintext generator (registers 28-43) and the flag (register 44) to the
// encryption-to-decryption system. Within each group register r holds
// vector bits 8r..8r+7 with its MSB as the lowest index, so a key or IV
// written as a hex string, first byte to the lowest register, loads bit 0
// from the leftmost hex digit's MSB. The register counts follow the document;
// the address map is this design's choice. The line between the encryption
// and decryption systems is brought out as tx_o / rx_i; the board ties them.
module scfb_board_top
  import grain128_pkg::*;
  import scfb_pkg::*;
(
  input  logic       mclk,
  input  logic       btn_reset,      // BtnReset
  input  logic       astb,
  input  logic       dstb,
  input  logic       pwr,
  input  logic [7:0] pdb_i,
  output logic [7:0] pdb_o,
  output logic       pdb_oe,
  output logic       pwait,
  output logic       led_comp,       // LedComp
  output logic       init_led_tr,    // INITLed_tr
  output logic       init_led_re,    // INITLed_re
  output logic       tx_o,
  input  logic       rx_i,
  output logic       pltout_o,
  output logic       dout_re_o
);

  localparam int unsigned KEY_BASE = 0;
  localparam int unsigned IV_BASE  = 16;
  localparam int unsigned PLT_BASE = 28;
  localparam int unsigned FLAG_REG = 44;
  localparam int unsigned NREGS    = 45;

  logic [7:0] regs [NREGS];
  fsr_t       key, iv_plt;
  iv_t        iv_ksg1;

  host_interface #(.NUM_REGS(NREGS)) u_if (
    .clk_i(mclk), .rst_i(btn_reset), .astb_n_i(astb), .dstb_n_i(dstb), .pwr_i(pwr),
    .pdb_i, .pdb_o, .pdb_oe_o(pdb_oe), .pwait_o(pwait), .regs_o(regs)
  );

  always_comb begin
    for (int unsigned i = 0; i < 128; i++) begin
      key[i]    = regs[KEY_BASE + i/8][7 - i%8];
      iv_plt[i] = regs[PLT_BASE + i/8][7 - i%8];
    end
    for (int unsigned i = 0; i < 96; i++)
      iv_ksg1[i] = regs[IV_BASE + i/8][7 - i%8];
  end

  scfb_enc_dec_system u_sys (
    .clk_i(mclk), .reset_i(btn_reset), .flag_i(regs[FLAG_REG]), .key_i(key),
    .iv_ksg1_i(iv_ksg1), .iv_plt_i(iv_plt), .tx_o, .rx_i,
    .led_idle_tr_o(init_led_tr), .led_idle_re_o(init_led_re), .led_comp_o(led_comp),
    .pltout_o, .dout_re_o, .state_tr_o(), .state_re_o(), .sync_tr_o(), .sync_re_o()
  );

endmodule
