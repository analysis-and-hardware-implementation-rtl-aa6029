// Decryption system of the marker-based synchronous stream cipher.
//
// Every received bit is shifted into a 140-bit data register at bit 139 and
// moves one place toward bit 0 per clock. Bits 139..132 (FirstMarker) are
// watched in IDLE for the first marker; bits 15..0 feed the nine marker
// detector windows; bit 0 is XORed with the keystream. The controller runs
// INIT (cleared, wait for flag 8'hFF) -> Load (keystream IV) -> IDLE ->
// CiphertextReceiving (CTSNum = 128 bits) -> MarkerReceiving (MSNum bits) ->
// CiphertextReceiving ... and rst_i returns to INIT.
//
// Resynchronization: on the first clock of MarkerReceiving the marker that
// preceded the 128 ciphertext bits just received sits in window 5 (bits
// 11..4) if nothing slipped; the detector counts a hit in every window that
// holds the marker. On the second clock, if exactly one window counter has
// reached COUNT_MAX, MSNum for the current marker phase becomes window+3
// (Table: window 1 -> 4 ... window 9 -> 12), otherwise 8. So the phase
// boundaries move by the detected slip while every cycle still classifies
// exactly 128 bits as ciphertext.
//
// Each bit carries a one-bit tag (1 = ciphertext) through a second 140-bit
// shift register, set by the controller state in which the bit arrived. When a
// tagged bit reaches bit 0 the keystream LFSR steps and pt_o is the
// decrypted bit with pt_valid_o set; marker and idle bits are dropped. The
// keystream therefore advances exactly 128 steps per synchronization cycle,
// like the transmitter's, and after a resynchronization the next full cycle
// decrypts correctly. pt_o leads the received bit by 140 clocks. The data
// register, windows, counters and MSNum table follow the document; the tag
// register is this design's way of classifying bits at the XOR. Parameter
// COUNT_MAX (default MK_COUNT_MAX = 2) and MARKER (default MK_MARKER) are
// passed to the marker detector; MARKER is also the FirstMarker compared.
module marker_decryptor
  import marker_pkg::*;
#(
  parameter int unsigned COUNT_MAX = MK_COUNT_MAX, // marker sightings per decision
  parameter logic [7:0]  MARKER    = MK_MARKER     // expected marker, bit 0 first
) (
  input  logic         clk_i,
  input  logic         rst_i,        // reset button
  input  logic [7:0]   flag_i,       // regFlag_MRE_CON
  input  logic [127:0] iv_ksg_i,
  input  logic         din_i,        // received line bit
  output logic         pt_o,         // decrypted plaintext bit
  output logic         pt_valid_o,
  output mdec_state_e  state_o,
  output logic         decided_o,    // a marker position was decided
  output logic [3:0]   window_o,     // decided window 1..9
  output logic [3:0]   msnum_o       // MSNum in use
);

  localparam int unsigned L = MK_REG_LEN;

  mdec_state_e  st_q, st_d;
  logic [L-1:0] data_q, data_d, tag_q;
  logic [6:0]   ctc_q;
  logic [3:0]   mc_q, msnum_q, msnum_dec;
  logic [1:0]   ksg_sel;
  logic [127:0] ks_q;
  logic         check, apply, first_marker;
  logic [MK_WINDOWS-1:0] match, hit;

  assign data_d       = {din_i, data_q[L-1:1]};
  assign first_marker = (data_d[L-1 -: 8] == MARKER);
  assign check        = (st_q == MD_MARKER) && (mc_q == 4'd0);
  assign apply        = (st_q == MD_MARKER) && (mc_q == 4'd1);

  marker_detector #(.COUNT_MAX(COUNT_MAX), .MARKER(MARKER)) u_det (
    .clk_i, .clr_i(st_q == MD_INIT), .check_i(check), .apply_i(apply),
    .data_i(data_q[15:0]), .match_o(match), .hit_o(hit),
    .decided_o, .window_o, .msnum_o(msnum_dec)
  );

  always_comb begin
    st_d = st_q;
    unique case (st_q)
      MD_INIT:   if (flag_i == MK_FLAG_READY) st_d = MD_LOAD;
      MD_LOAD:   st_d = MD_IDLE;
      MD_IDLE:   if (first_marker) st_d = MD_CIPHER;
      MD_CIPHER: if (ctc_q == 7'(MK_B - 1)) st_d = MD_MARKER;
      MD_MARKER: if (!check && !apply && mc_q == msnum_q - 4'd1) st_d = MD_CIPHER;
      default:   st_d = MD_INIT;
    endcase
    if (rst_i) st_d = MD_INIT;
  end

  always_ff @(posedge clk_i) begin
    st_q <= st_d;
    if (st_q == MD_INIT) begin
      data_q  <= '0;
      tag_q   <= '0;
      ctc_q   <= '0;
      mc_q    <= '0;
      msnum_q <= 4'(MK_N);
    end else begin
      data_q <= data_d;
      tag_q  <= {(st_q == MD_CIPHER), tag_q[L-1:1]};
      ctc_q  <= (st_q == MD_CIPHER) ? ctc_q + 1'b1 : '0;
      mc_q   <= (st_q == MD_MARKER && st_d == MD_MARKER) ? mc_q + 1'b1 : '0;
      if (apply) msnum_q <= msnum_dec;
    end
  end

  always_comb begin
    unique case (st_q)
      MD_INIT: ksg_sel = 2'b11;
      MD_LOAD: ksg_sel = 2'b00;
      default: ksg_sel = tag_q[0] ? 2'b01 : 2'b00;
    endcase
  end

  lfsr128 u_ksg (
    .clk_i, .clr_i(1'b0), .sel_i(ksg_sel),
    .reg_in_i((st_q == MD_LOAD) ? iv_ksg_i : ks_q), .reg_out_o(ks_q)
  );

  assign pt_o       = data_q[0] ^ ks_q[0];
  assign pt_valid_o = tag_q[0];
  assign state_o    = st_q;
  assign msnum_o    = msnum_q;

endmodule
