// Bit-level software model of one SCFB (statistical cipher feedback) station,
// used by the SCFB testbenches as the golden reference.
// How: step() is called once per clock with the station's input bit and
// returns the bit the hardware must output in that clock together with the
// controller state it must be in. Encryption and decryption differ only in
// which bit is fed to the sync-pattern scanner (own output vs. line input).
// Timing model (the same as the RTL): INIT until the flag register holds FF,
// one Load_PC clock, 256 Shift_KSG1 clocks (output forced to 1), then CTGen.
// After the clock in which the 8 most recent ciphertext bits equal 10000000,
// the next 96 ciphertext bits are the new IV (first bit -> IV_0), then one
// Load_NewIV clock, 256 Shift_KSG2 clocks and one Load_KSG2 clock; the old
// keystream is used through Load_KSG2 and the re-initialized one afterwards.
// The protocol follows the document; the exact clock accounting is the design's.
package scfb_model_pkg;
  import grain128_pkg::*;
  import scfb_pkg::*;
  import grain_ref_pkg::*;

  class scfb_model;
    bit           decrypt;
    logic [127:0] key;
    logic [95:0]  iv;
    grain_ref     g;
    scfb_state_e  st;
    int           cnt;      // clocks spent in the current counted state
    logic [7:0]   win;
    int           nwin;
    logic [95:0]  newiv;
    int           syncs, reloads;

    function new(bit dec, logic [127:0] k, logic [95:0] v);
      decrypt = dec; key = k; iv = v; st = ST_INIT; cnt = 0; win = 0; nwin = 0;
      syncs = 0; reloads = 0;
    endfunction

    // One clock. din: plaintext (encrypt) or line bit (decrypt).
    // dout is the output bit; exp_st is the state during this clock.
    function void step(bit din, logic [7:0] flag, bit reset, output scfb_state_e exp_st,
                       output bit dout);
      bit obit, ct, ks;
      scfb_state_e nx;
      obit = 1'b1;
      ks = 1'b0; ct = 1'b0;
      exp_st = st;
      nx = st;
      if (st == ST_INIT) begin
        if (flag == FLAG_READY) nx = ST_LOAD_PC;
      end else if (st == ST_LOAD_PC) begin
        nx = ST_SHIFT_KSG1; cnt = 0;
      end else if (st == ST_SHIFT_KSG1) begin
        cnt++;
        if (cnt == GRAIN_INIT_CLOCKS) begin
          nx = ST_CTGEN; g = new(key, iv); win = 0; nwin = 0;
        end
      end else begin
        ks = g.clock(1'b0);     // keystream bit of this clock, then shift
        obit = din ^ ks;
        ct = decrypt ? din : obit;
        if (st == ST_CTGEN) begin
          if (nwin >= SYNC_N-1 && {win[6:0], ct} == SYNC_PATTERN) begin
            nx = ST_NEWIV_COLL; cnt = 0; syncs++;
          end
          win = {win[6:0], ct}; nwin++;
        end else if (st == ST_NEWIV_COLL) begin
          newiv = {ct, newiv[95:1]}; cnt++;
          if (cnt == GRAIN_IV_W) nx = ST_LOAD_NEWIV;
        end else if (st == ST_LOAD_NEWIV) begin
          nx = ST_SHIFT_KSG2; cnt = 0;
        end else if (st == ST_SHIFT_KSG2) begin
          cnt++;
          if (cnt == GRAIN_INIT_CLOCKS) nx = ST_LOAD_KSG2;
        end else begin
          g = new(key, newiv); nx = ST_CTGEN; win = 0; nwin = 0; reloads++;
        end
      end
      if (reset) nx = ST_INIT;
      st = nx;
      dout = obit;
    endfunction
  endclass
endpackage
