// Software model of the marker-based transmitter, shared by the marker
// testbenches. next() returns one line bit per clock: 1 while idle, then
// cycles of the 8-bit marker (bit 0 first) followed by B = 128 ciphertext
// bits, ciphertext = keystream LFSR bit 0 xor plaintext LFSR bit 0, both
// LFSRs stepped once per ciphertext bit (the same 128-bit LFSR as the RTL).
// ptbit(t) gives plaintext bit t of the whole stream, for checking receivers.
package marker_model_pkg;
  import marker_pkg::*;
  import grain_ref_pkg::*;

  class marker_tx;
    logic [127:0] ks, pt, pt0;
    logic [7:0]   marker;
    bit           running;
    int           pos;        // position inside the 136-bit cycle
    int           cycles;
    bit           is_cipher;  // last bit returned was ciphertext

    function new(logic [127:0] iv_ksg, logic [127:0] iv_plt, logic [7:0] m);
      ks = iv_ksg; pt = iv_plt; pt0 = iv_plt; marker = m;
      running = 0; pos = 0; cycles = 0; is_cipher = 0;
    endfunction

    function bit next();
      bit b;
      is_cipher = 0;
      if (!running) return 1'b1;
      if (pos < MK_N) b = marker[pos];
      else begin
        b = ks[0] ^ pt[0];
        ks = lfsr_step(ks); pt = lfsr_step(pt);
        is_cipher = 1;
      end
      pos++;
      if (pos == MK_N + MK_B) begin pos = 0; cycles++; end
      return b;
    endfunction

    // plaintext bits 0..n-1 of the stream, bit i at index i
    function void ptstream(int n, ref bit p[]);
      logic [127:0] q = pt0;
      p = new[n];
      for (int i = 0; i < n; i++) begin p[i] = q[0]; q = lfsr_step(q); end
    endfunction
  endclass
endpackage
