// KSG1: primary Grain-128 keystream generator of the SCFB system.
//
// A Grain-128 NFSR/LFSR pair with four extra multiplexers. The two 128-bit
// multiplexers choose what a parallel load writes: the key and the initial
// "IV&1s" word (select 0), or the state of the setup generator KSG2 (select 1).
// The two 1-bit multiplexers (AND gates) decide whether the output bit is fed
// back into the NFSR and LFSR feedback, which is the initialization mode; in
// the operating mode they feed 0 and the output bit is the keystream bit.
//
// keystream_o is combinational from the current state; a SHIFT clock consumes
// it. clear_i is a synchronous clear that overrides the select codes. The
// select names follow the signal table of the primary generator; the 2-bit
// select code (load/shift/hold/clear) is this design's choice.
module ksg1
  import grain128_pkg::*;
(
  input  logic     clk_i,
  input  logic     clear_i,           // CLEAR_KSG1
  input  fsr_t     key_i,             // KEY, K_i at bit i
  input  fsr_t     iv_ones_i,         // IV&1s
  input  fsr_t     nlfsr2_i,          // NLFSR2_OUT from KSG2
  input  fsr_t     lfsr2_i,           // LFSR2_OUT from KSG2
  input  logic     sel_mux128_nlfsr_i,// 0: key, 1: NLFSR2_OUT
  input  logic     sel_mux128_lfsr_i, // 0: IV&1s, 1: LFSR2_OUT
  input  fsr_sel_e sel_nlfsr_i,       // SEL_NLFSR1
  input  fsr_sel_e sel_lfsr_i,        // SEL_LFSR1
  input  logic     sel_mux1_nlfsr_i,  // 1: output bit feeds NFSR (init mode)
  input  logic     sel_mux1_lfsr_i,   // 1: output bit feeds LFSR (init mode)
  output logic     keystream_o,       // OUTPUT KEYSTREAM
  output fsr_t     nlfsr_o,
  output fsr_t     lfsr_o
);

  fsr_t nfsr_q, lfsr_q;
  logic y, fb_n, fb_l;

  always_comb begin
    y    = output_bit(nfsr_q, lfsr_q);
    fb_n = nfsr_feedback(nfsr_q) ^ lfsr_q[0] ^ (sel_mux1_nlfsr_i & y);
    fb_l = lfsr_feedback(lfsr_q) ^ (sel_mux1_lfsr_i & y);
  end

  always_ff @(posedge clk_i) begin
    if (clear_i) begin
      nfsr_q <= '0;
      lfsr_q <= '0;
    end else begin
      unique case (sel_nlfsr_i)
        FSR_LOAD:  nfsr_q <= sel_mux128_nlfsr_i ? nlfsr2_i : key_i;
        FSR_SHIFT: nfsr_q <= {fb_n, nfsr_q[GRAIN_W-1:1]};
        FSR_HOLD:  nfsr_q <= nfsr_q;
        default:   nfsr_q <= '0;
      endcase
      unique case (sel_lfsr_i)
        FSR_LOAD:  lfsr_q <= sel_mux128_lfsr_i ? lfsr2_i : iv_ones_i;
        FSR_SHIFT: lfsr_q <= {fb_l, lfsr_q[GRAIN_W-1:1]};
        FSR_HOLD:  lfsr_q <= lfsr_q;
        default:   lfsr_q <= '0;
      endcase
    end
  end

  assign keystream_o = y;
  assign nlfsr_o     = nfsr_q;
  assign lfsr_o      = lfsr_q;

endmodule
