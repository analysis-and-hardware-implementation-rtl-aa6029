// Grain-128 definitions shared by the SCFB keystream generators.
//
// State vectors are indexed the way the cipher is specified: bit i of the
// LFSR vector is s_i and bit i of the NFSR vector is b_i, so bit 0 is the
// stage that leaves the register next. One clock moves every stage down by
// one (vector >> 1) and writes the feedback bit into stage 127. Key bit K_i
// is loaded into b_i, IV bit IV_i into s_i, and s_96..s_127 are set to one.
// The feedback polynomials, the filter function h and the output taps follow
// the Grain-128 definition; this package only gives them as functions.
package grain128_pkg;

  localparam int unsigned GRAIN_W           = 128;  // NFSR and LFSR length
  localparam int unsigned GRAIN_IV_W        = 96;   // IV length
  localparam int unsigned GRAIN_INIT_CLOCKS = 256;  // initialization clocks

  typedef logic [GRAIN_W-1:0]    fsr_t;
  typedef logic [GRAIN_IV_W-1:0] iv_t;

  // Control code of one feedback shift register of a generator.
  typedef enum logic [1:0] {
    FSR_LOAD  = 2'b00,  // parallel load
    FSR_SHIFT = 2'b01,  // one clock of the cipher
    FSR_HOLD  = 2'b10,  // keep the contents
    FSR_CLEAR = 2'b11   // synchronous clear to zero
  } fsr_sel_e;

  // LFSR feedback: s_{i+128} = s_i + s_{i+7} + s_{i+38} + s_{i+70} + s_{i+81} + s_{i+96}
  function automatic logic lfsr_feedback(fsr_t s);
    return s[0] ^ s[7] ^ s[38] ^ s[70] ^ s[81] ^ s[96];
  endfunction

  // NFSR feedback without the s_i term, which the caller adds.
  function automatic logic nfsr_feedback(fsr_t b);
    return b[0] ^ b[26] ^ b[56] ^ b[91] ^ b[96]
         ^ (b[3]  & b[67]) ^ (b[11] & b[13]) ^ (b[17] & b[18])
         ^ (b[27] & b[59]) ^ (b[40] & b[48]) ^ (b[61] & b[65])
         ^ (b[68] & b[84]);
  endfunction

  // Pre-output bit: h(x) + s_{i+93} + sum of b_{i+j}, j in {2,15,36,45,64,73,89}.
  function automatic logic output_bit(fsr_t b, fsr_t s);
    logic h;
    h = (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42])
      ^ (s[60] & s[79]) ^ (b[12] & b[95] & s[95]);
    return h ^ s[93] ^ b[2] ^ b[15] ^ b[36] ^ b[45] ^ b[64] ^ b[73] ^ b[89];
  endfunction

  // IV followed by 32 ones, the LFSR load value ("IV&1s").
  function automatic fsr_t iv_with_ones(iv_t iv);
    return {{(GRAIN_W-GRAIN_IV_W){1'b1}}, iv};
  endfunction

endpackage
