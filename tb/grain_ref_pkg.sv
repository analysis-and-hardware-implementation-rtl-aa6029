// Reference models for the testbenches: Grain-128 written bit by bit from
// its published definition, and the 128-bit LFSR of the marker system.
// Hex helpers follow the convention of the published test vectors: the
// leftmost hex digit's MSB is bit index 0.
package grain_ref_pkg;

  class grain_ref;
    bit b[128];
    bit s[128];

    function new(logic [127:0] key, logic [95:0] iv);
      for (int i = 0; i < 128; i++) b[i] = key[i];
      for (int i = 0; i < 96; i++)  s[i] = iv[i];
      for (int i = 96; i < 128; i++) s[i] = 1'b1;
      repeat (256) void'(clock(1'b1));
    endfunction

    function bit pre_output();
      bit h;
      h = (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42]) ^ (s[60] & s[79])
        ^ (b[12] & b[95] & s[95]);
      return h ^ s[93] ^ b[2] ^ b[15] ^ b[36] ^ b[45] ^ b[64] ^ b[73] ^ b[89];
    endfunction

    function bit clock(bit init);
      bit y, fs, fb;
      y  = pre_output();
      fs = s[0] ^ s[7] ^ s[38] ^ s[70] ^ s[81] ^ s[96];
      fb = s[0] ^ b[0] ^ b[26] ^ b[56] ^ b[91] ^ b[96] ^ (b[3] & b[67])
         ^ (b[11] & b[13]) ^ (b[17] & b[18]) ^ (b[27] & b[59])
         ^ (b[40] & b[48]) ^ (b[61] & b[65]) ^ (b[68] & b[84]);
      if (init) begin fs ^= y; fb ^= y; end
      for (int i = 0; i < 127; i++) begin s[i] = s[i+1]; b[i] = b[i+1]; end
      s[127] = fs;
      b[127] = fb;
      return y;
    endfunction

    // Next keystream bit.
    function bit next();
      return clock(1'b0);
    endfunction

    function logic [127:0] nfsr();
      for (int i = 0; i < 128; i++) nfsr[i] = b[i];
    endfunction
    function logic [127:0] lfsr();
      for (int i = 0; i < 128; i++) lfsr[i] = s[i];
    endfunction
  endclass

  // 128-bit right-shift LFSR, feedback s0^s7^s38^s70^s81^s96 into bit 127.
  function automatic logic [127:0] lfsr_step(logic [127:0] q);
    return {q[0] ^ q[7] ^ q[38] ^ q[70] ^ q[81] ^ q[96], q[127:1]};
  endfunction

  function automatic logic [127:0] hex128(logic [127:0] h);
    for (int i = 0; i < 128; i++) hex128[i] = h[127-i];
  endfunction
  function automatic logic [95:0] hex96(logic [95:0] h);
    for (int i = 0; i < 96; i++) hex96[i] = h[95-i];
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
