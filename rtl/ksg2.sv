// KSG2: setup Grain-128 generator of the SCFB system.
//
// The same NFSR/LFSR pair as KSG1 but permanently in the initialization
// mode: the output bit is always added into both feedback functions and is
// never used as keystream. A load writes the key into the NFSR and the
// collected new IV followed by 32 ones into the LFSR; 256 SHIFT clocks later
// the registers hold the state from which Grain-128 starts its keystream, and
// the SCFB datapath copies that state into KSG1 through nlfsr_o / lfsr_o.
// clear_i is a synchronous clear. The 2-bit select code is this design's
// choice; the document only names SEL_NLFSR2 and SEL_LFSR2.
module ksg2
  import grain128_pkg::*;
(
  input  logic     clk_i,
  input  logic     clear_i,        // CLEAR_KSG2
  input  fsr_t     key_i,          // KEY
  input  fsr_t     newiv_ones_i,   // NEWIV&1s
  input  fsr_sel_e sel_nlfsr_i,    // SEL_NLFSR2
  input  fsr_sel_e sel_lfsr_i,     // SEL_LFSR2
  output fsr_t     nlfsr_o,        // NLFSR2_OUT
  output fsr_t     lfsr_o          // LFSR2_OUT
);

  fsr_t nfsr_q, lfsr_q;
  logic y, fb_n, fb_l;

  always_comb begin
    y    = output_bit(nfsr_q, lfsr_q);
    fb_n = nfsr_feedback(nfsr_q) ^ lfsr_q[0] ^ y;
    fb_l = lfsr_feedback(lfsr_q) ^ y;
  end

  always_ff @(posedge clk_i) begin
    if (clear_i) begin
      nfsr_q <= '0;
      lfsr_q <= '0;
    end else begin
      unique case (sel_nlfsr_i)
        FSR_LOAD:  nfsr_q <= key_i;
        FSR_SHIFT: nfsr_q <= {fb_n, nfsr_q[GRAIN_W-1:1]};
        FSR_HOLD:  nfsr_q <= nfsr_q;
        default:   nfsr_q <= '0;
      endcase
      unique case (sel_lfsr_i)
        FSR_LOAD:  lfsr_q <= newiv_ones_i;
        FSR_SHIFT: lfsr_q <= {fb_l, lfsr_q[GRAIN_W-1:1]};
        FSR_HOLD:  lfsr_q <= lfsr_q;
        default:   lfsr_q <= '0;
      endcase
    end
  end

  assign nlfsr_o = nfsr_q;
  assign lfsr_o  = lfsr_q;

endmodule
