// Marker-based system with host interface, as placed on the FPGA board.
//
// The host interface holds the keystream IV (registers 0-15), the plaintext
// IV (16-31), the marker (32) and the flag (33). Registers map to vector bits
// MSB first: register r of a group holds bits 8r..8r+7, its MSB at bit 8r,
// and the marker register's MSB is the first marker bit sent, so writing
// 8'h80 selects the marker "10000000". Two buttons reset and start the
// system. The register contents follow the document; the address map is
// this design's choice. The line is brought out as tx_o / rx_i.
module marker_board_top
  import marker_pkg::*;
(
  input  logic       mclk,
  input  logic       btn_reset,
  input  logic       btn_start,
  input  logic       astb,
  input  logic       dstb,
  input  logic       pwr,
  input  logic [7:0] pdb_i,
  output logic [7:0] pdb_o,
  output logic       pdb_oe,
  output logic       pwait,
  output logic       led_comp,
  output logic       tx_o,
  input  logic       rx_i,
  output logic       dpt_o,
  output logic       dpt_valid_o
);

  localparam int unsigned KSG_BASE   = 0;
  localparam int unsigned PLT_BASE   = 16;
  localparam int unsigned MARKER_REG = 32;
  localparam int unsigned FLAG_REG   = 33;
  localparam int unsigned NREGS      = 34;

  logic [7:0]   regs [NREGS];
  logic [127:0] iv_ksg, iv_plt;
  logic [7:0]   marker;

  host_interface #(.NUM_REGS(NREGS)) u_if (
    .clk_i(mclk), .rst_i(btn_reset), .astb_n_i(astb), .dstb_n_i(dstb), .pwr_i(pwr),
    .pdb_i, .pdb_o, .pdb_oe_o(pdb_oe), .pwait_o(pwait), .regs_o(regs)
  );

  always_comb begin
    for (int unsigned i = 0; i < 128; i++) begin
      iv_ksg[i] = regs[KSG_BASE + i/8][7 - i%8];
      iv_plt[i] = regs[PLT_BASE + i/8][7 - i%8];
    end
    for (int unsigned i = 0; i < 8; i++) marker[i] = regs[MARKER_REG][7 - i];
  end

  marker_enc_dec_system u_sys (
    .clk_i(mclk), .rst_i(btn_reset), .start_i(btn_start), .flag_i(regs[FLAG_REG]),
    .marker_i(marker), .iv_ksg_i(iv_ksg), .iv_plt_i(iv_plt), .tx_o, .rx_i,
    .led_comp_o(led_comp), .pt_o(), .pt_valid_o(), .dpt_o, .dpt_valid_o,
    .enc_state_o(), .dec_state_o(), .decided_o(), .window_o()
  );

endmodule
