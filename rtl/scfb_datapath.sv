// Datapath of an SCFB encryption (DECRYPT=0) or decryption (DECRYPT=1)
// system configured for Grain-128.
//
// KSG1 produces one keystream bit per clock, which is XORed with the data
// input (plaintext when encrypting, received ciphertext when decrypting). The
// ciphertext bit - the XOR result when encrypting, the input when decrypting
// - goes through a 1-bit demultiplexer either into the n-bit sync pattern
// window or into the 96-bit new-IV register. KSG2 loads the key and
// "new IV & 1s" and, after its setup clocks, its registers are copied into
// KSG1. The output multiplexer sends the XOR result or a constant '1' (the
// line idles at '1' until the keystream is ready).
//
// window_match_o compares the window shifted by the current ciphertext bit
// with SYNC_PATTERN, combinationally; the controller qualifies it. The first
// window bit received is its MSB. New-IV bits are collected in arrival order
// into IV_0, IV_1, ... (bit 0 first). The structure follows the document;
// the bit orders are this design's choice, made to match the Grain-128 index
// convention. SP_N and SP_PATTERN (defaults SYNC_N = 8 and "100...00",
// the document's choice) set the window size and the sync pattern.
module scfb_datapath
  import grain128_pkg::*;
  import scfb_pkg::*;
#(
  parameter bit DECRYPT = 1'b0,
  parameter int unsigned SP_N = SYNC_N,                    // sync pattern size n
  parameter logic [SP_N-1:0] SP_PATTERN = {1'b1, {(SP_N-1){1'b0}}} // MSB sent first
) (
  input  logic       clk_i,
  input  scfb_ctrl_t ctrl_i,
  input  fsr_t       key_i,        // K_i at bit i
  input  iv_t        iv_i,         // initial IV of KSG1, IV_i at bit i
  input  logic       data_i,       // plaintext (encrypt) or line bit (decrypt)
  output logic       data_o,       // line bit (encrypt) or plaintext (decrypt)
  output logic       window_match_o,
  output logic       keystream_o,
  output iv_t        new_iv_o
);

  fsr_t nlfsr2, lfsr2;
  logic ks, xored, ct;
  logic [SP_N-1:0] window_q, window_next;
  iv_t  newiv_q;

  ksg1 u_ksg1 (
    .clk_i,
    .clear_i            (ctrl_i.clear_ksg1),
    .key_i,
    .iv_ones_i          (iv_with_ones(iv_i)),
    .nlfsr2_i           (nlfsr2),
    .lfsr2_i            (lfsr2),
    .sel_mux128_nlfsr_i (ctrl_i.sel_mux128_nlfsr1),
    .sel_mux128_lfsr_i  (ctrl_i.sel_mux128_lfsr1),
    .sel_nlfsr_i        (ctrl_i.sel_nlfsr1),
    .sel_lfsr_i         (ctrl_i.sel_lfsr1),
    .sel_mux1_nlfsr_i   (ctrl_i.sel_mux1_nlfsr1),
    .sel_mux1_lfsr_i    (ctrl_i.sel_mux1_lfsr1),
    .keystream_o        (ks),
    .nlfsr_o            (),
    .lfsr_o             ()
  );

  ksg2 u_ksg2 (
    .clk_i,
    .clear_i      (ctrl_i.clear_ksg2),
    .key_i,
    .newiv_ones_i (iv_with_ones(newiv_q)),
    .sel_nlfsr_i  (ctrl_i.sel_nlfsr2),
    .sel_lfsr_i   (ctrl_i.sel_lfsr2),
    .nlfsr_o      (nlfsr2),
    .lfsr_o       (lfsr2)
  );

  assign xored = data_i ^ ks;
  assign ct    = DECRYPT ? data_i : xored;
  assign data_o = ctrl_i.out_data ? xored : 1'b1;

  assign window_next    = {window_q[SP_N-2:0], ct};
  assign window_match_o = (window_next == SP_PATTERN);

  always_ff @(posedge clk_i) begin
    if (ctrl_i.clear_window) window_q <= '0;
    else if (ctrl_i.scan_en) window_q <= window_next;
    if (ctrl_i.collect_iv)   newiv_q  <= {ct, newiv_q[GRAIN_IV_W-1:1]};
  end

  assign keystream_o = ks;
  assign new_iv_o    = newiv_q;

endmodule
