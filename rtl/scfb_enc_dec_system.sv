// SCFB encryption-to-decryption test system.
//
// The plaintext generator (a 128-bit LFSR with the Grain-128 LFSR
// polynomial, loaded with iv_plt_i) feeds the encryption system; the line bit
// leaves on tx_o and the decryption system takes its input from rx_i. On the
// board the two are simply tied together; bringing them out lets a channel be
// inserted. The comparator lights led_comp_o when the plaintext bit (forced to
// '1' while the encryption system initializes) equals the decrypted bit of the
// same clock, which holds for a zero-delay loopback. Both systems share the
// clock, reset, key, IV and flag, so they leave INIT in the same clock.
module scfb_enc_dec_system
  import grain128_pkg::*;
  import scfb_pkg::*;
(
  input  logic        clk_i,         // Clk_ttr
  input  logic        reset_i,       // reset_ttr
  input  logic [7:0]  flag_i,        // flag_ttr
  input  fsr_t        key_i,         // KeyIn_ttr
  input  iv_t         iv_ksg1_i,     // IVKSG1_ttr
  input  fsr_t        iv_plt_i,      // IVPltGen_ttr
  output logic        tx_o,          // line bit out of the encryption system
  input  logic        rx_i,          // line bit into the decryption system
  output logic        led_idle_tr_o, // ledIDLE_tr
  output logic        led_idle_re_o, // ledIDLE_re
  output logic        led_comp_o,    // ledComp_ttr
  output logic        pltout_o,      // pltout_tr
  output logic        dout_re_o,     // dout_re
  output scfb_state_e state_tr_o,
  output scfb_state_e state_re_o,
  output logic        sync_tr_o,
  output logic        sync_re_o
);

  logic [1:0]   plt_sel;
  logic         plt_hold;
  logic [127:0] plt_q;

  lfsr128 u_pltgen (
    .clk_i, .clr_i(1'b0), .sel_i(plt_sel),
    .reg_in_i(plt_hold ? plt_q : iv_plt_i), .reg_out_o(plt_q)
  );

  scfb_encryptor u_enc (
    .clk_i, .reset_i, .flag_i, .key_i, .iv_i(iv_ksg1_i), .plaintext_i(plt_q[0]),
    .dout_o(tx_o), .led_init_o(led_idle_tr_o), .plt_sel_o(plt_sel),
    .plt_hold_o(plt_hold), .state_o(state_tr_o), .sync_found_o(sync_tr_o)
  );

  scfb_decryptor u_dec (
    .clk_i, .reset_i, .flag_i, .key_i, .iv_i(iv_ksg1_i), .datain_i(rx_i),
    .dout_o(dout_re_o), .led_init_o(led_idle_re_o), .state_o(state_re_o),
    .sync_found_o(sync_re_o)
  );

  assign pltout_o   = led_idle_tr_o ? 1'b1 : plt_q[0];
  assign led_comp_o = (pltout_o == dout_re_o);

endmodule
