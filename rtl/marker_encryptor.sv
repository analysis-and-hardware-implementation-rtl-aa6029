// Encryption system of the marker-based synchronous stream cipher.
//
// Datapath: an 8-bit marker register that rotates right (bit 0 leaves and
// re-enters at bit 7, so the marker is downloaded once and re-sent every
// cycle), a 128-bit LFSR keystream generator, a 128-bit LFSR plaintext
// register (test source), a 3-bit marker counter, a 7-bit ciphertext counter
// and the output multiplexer (marker bit, ciphertext bit, or '1' when idle).
// Controller: INIT (all cleared, wait for flag 8'hFF) -> Load (marker, keystream
// IV and plaintext IV loaded) -> IDLE (line at '1' until start_i) ->
// MarkerShifting (8 clocks, until the marker counter reaches 3'b111) ->
// CiphertextShifting (128 clocks, until the ciphertext counter reaches
// 7'b1111111) -> MarkerShifting ... rst_i returns to INIT.
//
// One line bit leaves per clock; the keystream and plaintext LFSRs move only
// in CiphertextShifting (they reload their own output to stand still, as the
// LFSR has no hold code). pt_o / pt_valid_o give the plaintext bit that the
// current ciphertext bit carries. All structure and counts follow the
// document; the hold-by-reload is this design's choice.
module marker_encryptor
  import marker_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_i,        // reset_MTR_CON
  input  logic         start_i,      // start_MTR_CON
  input  logic [7:0]   flag_i,       // flag_MTR_CON
  input  logic [7:0]   marker_i,     // bit 0 is sent first
  input  logic [127:0] iv_ksg_i,
  input  logic [127:0] iv_plt_i,
  output logic         dout_o,
  output logic         pt_o,
  output logic         pt_valid_o,
  output menc_state_e  state_o
);

  menc_state_e  st_q, st_d;
  logic [7:0]   marker_q;
  logic [2:0]   mc_q;
  logic [6:0]   ctc_q;
  logic [1:0]   lfsr_sel;
  logic         lfsr_load_iv;
  logic [127:0] ks_q, plt_q;

  always_comb begin
    st_d = st_q;
    unique case (st_q)
      ME_INIT:   if (flag_i == MK_FLAG_READY) st_d = ME_LOAD;
      ME_LOAD:   st_d = ME_IDLE;
      ME_IDLE:   if (start_i) st_d = ME_MARKER;
      ME_MARKER: if (mc_q == 3'b111) st_d = ME_CIPHER;
      ME_CIPHER: if (ctc_q == 7'b111_1111) st_d = ME_MARKER;
      default:   st_d = ME_INIT;
    endcase
    if (rst_i) st_d = ME_INIT;
  end

  always_comb begin
    lfsr_load_iv = 1'b0;
    unique case (st_q)
      ME_INIT:   lfsr_sel = 2'b11;
      ME_LOAD:   begin lfsr_sel = 2'b00; lfsr_load_iv = 1'b1; end
      ME_CIPHER: lfsr_sel = 2'b01;
      default:   lfsr_sel = 2'b00;
    endcase
  end

  lfsr128 u_ksg (
    .clk_i, .clr_i(1'b0), .sel_i(lfsr_sel),
    .reg_in_i(lfsr_load_iv ? iv_ksg_i : ks_q), .reg_out_o(ks_q)
  );

  lfsr128 u_plt (
    .clk_i, .clr_i(1'b0), .sel_i(lfsr_sel),
    .reg_in_i(lfsr_load_iv ? iv_plt_i : plt_q), .reg_out_o(plt_q)
  );

  always_ff @(posedge clk_i) begin
    st_q <= st_d;
    unique case (st_q)
      ME_INIT: begin
        marker_q <= '0;
        mc_q     <= '0;
        ctc_q    <= '0;
      end
      ME_LOAD: marker_q <= marker_i;
      ME_MARKER: begin
        marker_q <= {marker_q[0], marker_q[7:1]};
        mc_q     <= mc_q + 1'b1;
      end
      ME_CIPHER: ctc_q <= ctc_q + 1'b1;
      default: ;
    endcase
  end

  always_comb begin
    unique case (st_q)
      ME_MARKER: dout_o = marker_q[0];
      ME_CIPHER: dout_o = ks_q[0] ^ plt_q[0];
      default:   dout_o = 1'b1;
    endcase
  end

  assign pt_o       = plt_q[0];
  assign pt_valid_o = (st_q == ME_CIPHER);
  assign state_o    = st_q;

endmodule
