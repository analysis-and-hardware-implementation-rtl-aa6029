// Marker-based encryption-to-decryption test system.
//
// The encryption system sends markers and ciphertext on tx_o; the decryption
// system receives rx_i (tied to tx_o on the board, or through a channel).
// Both share clock, reset, flag and keystream IV; start_i starts the
// transmitter. The comparator checks each decrypted plaintext bit against a
// receiver-side copy of the plaintext LFSR (loaded with the same plaintext IV
// and stepped once per decrypted bit), because decrypted bits leave the
// 140-bit data register long after the transmitter produced them.
// led_comp_o is registered: it shows the result of the last compared bit and
// starts lit. The regenerated reference is this design's choice; the
// document compares plaintext and decrypted plaintext without saying how they
// are aligned.
module marker_enc_dec_system
  import marker_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_i,
  input  logic         start_i,
  input  logic [7:0]   flag_i,
  input  logic [7:0]   marker_i,
  input  logic [127:0] iv_ksg_i,
  input  logic [127:0] iv_plt_i,
  output logic         tx_o,
  input  logic         rx_i,
  output logic         led_comp_o,
  output logic         pt_o,
  output logic         pt_valid_o,
  output logic         dpt_o,
  output logic         dpt_valid_o,
  output menc_state_e  enc_state_o,
  output mdec_state_e  dec_state_o,
  output logic         decided_o,
  output logic [3:0]   window_o
);

  logic [127:0] ref_q;
  logic [1:0]   ref_sel;

  marker_encryptor u_enc (
    .clk_i, .rst_i, .start_i, .flag_i, .marker_i, .iv_ksg_i, .iv_plt_i,
    .dout_o(tx_o), .pt_o, .pt_valid_o, .state_o(enc_state_o)
  );

  marker_decryptor u_dec (
    .clk_i, .rst_i, .flag_i, .iv_ksg_i, .din_i(rx_i), .pt_o(dpt_o),
    .pt_valid_o(dpt_valid_o), .state_o(dec_state_o), .decided_o, .window_o,
    .msnum_o()
  );

  always_comb begin
    unique case (dec_state_o)
      MD_INIT: ref_sel = 2'b11;
      MD_LOAD: ref_sel = 2'b00;
      default: ref_sel = dpt_valid_o ? 2'b01 : 2'b00;
    endcase
  end

  lfsr128 u_ref (
    .clk_i, .clr_i(1'b0), .sel_i(ref_sel),
    .reg_in_i((dec_state_o == MD_LOAD) ? iv_plt_i : ref_q), .reg_out_o(ref_q)
  );

  always_ff @(posedge clk_i) begin
    if (rst_i)            led_comp_o <= 1'b1;
    else if (dpt_valid_o) led_comp_o <= (dpt_o == ref_q[0]);
  end

endmodule
