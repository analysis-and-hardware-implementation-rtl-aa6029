// Top level: the two synchronization schemes side by side.
//
// scfb_*  : statistical cipher feedback (SCFB) mode with two Grain-128
//           keystream generators, a self-synchronizing stream cipher that
//           resynchronizes on a sync pattern in the ciphertext.
// mk_*    : marker-based synchronous stream cipher, an LFSR keystream with an
//           8-bit marker before every 128 ciphertext bits and a receiver that
//           re-locks onto the marker after slips or insertions of up to 4 bits.
// Each has its own host register port, buttons, LEDs and line pair
// (tx out, rx in); connect tx to rx for the loopback test of the document, or
// put a channel between them. The two share only the clock.
module sync_ciphers_top (
  input  logic       clk,
  // SCFB system
  input  logic       scfb_btn_reset,
  input  logic       scfb_astb,
  input  logic       scfb_dstb,
  input  logic       scfb_pwr,
  input  logic [7:0] scfb_pdb_i,
  output logic [7:0] scfb_pdb_o,
  output logic       scfb_pdb_oe,
  output logic       scfb_pwait,
  output logic       scfb_led_comp,
  output logic       scfb_init_led_tr,
  output logic       scfb_init_led_re,
  output logic       scfb_tx,
  input  logic       scfb_rx,
  output logic       scfb_pltout,
  output logic       scfb_dout_re,
  // marker-based system
  input  logic       mk_btn_reset,
  input  logic       mk_btn_start,
  input  logic       mk_astb,
  input  logic       mk_dstb,
  input  logic       mk_pwr,
  input  logic [7:0] mk_pdb_i,
  output logic [7:0] mk_pdb_o,
  output logic       mk_pdb_oe,
  output logic       mk_pwait,
  output logic       mk_led_comp,
  output logic       mk_tx,
  input  logic       mk_rx,
  output logic       mk_dpt,
  output logic       mk_dpt_valid
);

  scfb_board_top u_scfb (
    .mclk(clk), .btn_reset(scfb_btn_reset), .astb(scfb_astb), .dstb(scfb_dstb),
    .pwr(scfb_pwr), .pdb_i(scfb_pdb_i), .pdb_o(scfb_pdb_o), .pdb_oe(scfb_pdb_oe),
    .pwait(scfb_pwait), .led_comp(scfb_led_comp), .init_led_tr(scfb_init_led_tr),
    .init_led_re(scfb_init_led_re), .tx_o(scfb_tx), .rx_i(scfb_rx),
    .pltout_o(scfb_pltout), .dout_re_o(scfb_dout_re)
  );

  marker_board_top u_marker (
    .mclk(clk), .btn_reset(mk_btn_reset), .btn_start(mk_btn_start), .astb(mk_astb),
    .dstb(mk_dstb), .pwr(mk_pwr), .pdb_i(mk_pdb_i), .pdb_o(mk_pdb_o),
    .pdb_oe(mk_pdb_oe), .pwait(mk_pwait), .led_comp(mk_led_comp), .tx_o(mk_tx),
    .rx_i(mk_rx), .dpt_o(mk_dpt), .dpt_valid_o(mk_dpt_valid)
  );

endmodule
