// Controller of an SCFB encryption or decryption system.
//
// An eight-state machine: INIT (everything cleared, wait for the flag
// register to read 8'hFF), Load_PC (KSG1 loads key and initial IV, KSG2
// loads the key, the plaintext generator loads its IV), Shift_KSG1 (256
// initialization clocks of KSG1), CTGen (keystream applied, ciphertext scanned
// for the sync pattern), NewIVCollect (the 96 ciphertext bits after the
// pattern go to the new-IV register, scanning off), Load_NewIV (KSG2 loads key
// and new IV), Shift_KSG2 (256 clocks of KSG2 while KSG1 keeps running on the
// old IV), Load_KSG2 (KSG2's state is copied into KSG1), then back to CTGen.
// reset_i returns to INIT from any state. The three counters sit here.
//
// Timing: from the first CTGen cycle one data bit passes per clock in every
// state. window_match_i is the datapath's comparison of the window including
// the current ciphertext bit, so the first new-IV bit is the bit that follows
// the last sync pattern bit. Each of the two load states lasts one clock, so
// the setup phase on the line is 1 + 256 + 1 clocks; that split of the load
// clocks is this design's choice. plt_sel_o drives the plaintext generator
// (lfsr128 codes: 00 load, 01 shift, 11 clear); it holds in the init states
// by reloading, which the caller does by feeding its output back.
// KSG1 only ever gets the load and shift codes (it is cleared through
// clear_ksg1), so the upper bit of its select fields is constant 0; the
// field keeps the full 2-bit code shared with KSG2. SP_N (default SYNC_N =
// 8) is the sync pattern size the pattern counter waits for.
module scfb_controller
  import grain128_pkg::*;
  import scfb_pkg::*;
#(
  parameter int unsigned SP_N = SYNC_N  // sync pattern size n
) (
  input  logic        clk_i,
  input  logic        reset_i,         // reset button, synchronous
  input  logic [7:0]  flag_i,          // flag register
  input  logic        window_match_i,  // window (with current bit) == pattern
  output scfb_ctrl_t  ctrl_o,
  output logic [1:0]  plt_sel_o,       // plaintext generator select
  output logic        plt_hold_o,      // plaintext generator reloads itself
  output logic        led_init_o,      // INIT, Load_PC or Shift_KSG1
  output scfb_state_e state_o,
  output logic        sync_found_o     // sync pattern recognized this clock
);

  scfb_state_e state_q, state_d;
  logic sp_clr, sp_en, iv_clr, iv_en, su_clr, su_en;
  logic [$clog2(SP_N+1)-1:0]               sp_count;
  logic [$clog2(GRAIN_IV_W+1)-1:0]         iv_count;
  logic [$clog2(GRAIN_INIT_CLOCKS+1)-1:0]  su_count;
  logic sync_found, su_last, iv_last;

  scfb_counters #(
    .SYNC_N(SP_N), .IV_BITS(GRAIN_IV_W), .SETUP_CLOCKS(GRAIN_INIT_CLOCKS)
  ) u_counters (
    .clk_i, .sp_clr_i(sp_clr), .sp_en_i(sp_en), .iv_clr_i(iv_clr), .iv_en_i(iv_en),
    .su_clr_i(su_clr), .su_en_i(su_en),
    .sp_count_o(sp_count), .iv_count_o(iv_count), .su_count_o(su_count)
  );

  // The window is compared only when it holds n fresh bits, counting the
  // current one.
  assign sync_found = (state_q == ST_CTGEN) && window_match_i &&
                      (sp_count >= ($bits(sp_count))'(SP_N-1));
  assign su_last    = (su_count == ($bits(su_count))'(GRAIN_INIT_CLOCKS-1));
  assign iv_last    = (iv_count == ($bits(iv_count))'(GRAIN_IV_W-1));

  always_comb begin
    state_d = state_q;
    ctrl_o  = '{
      clear_ksg1: 1'b0, sel_nlfsr1: FSR_SHIFT, sel_lfsr1: FSR_SHIFT,
      sel_mux128_nlfsr1: 1'b0, sel_mux128_lfsr1: 1'b0,
      sel_mux1_nlfsr1: 1'b0, sel_mux1_lfsr1: 1'b0,
      clear_ksg2: 1'b0, sel_nlfsr2: FSR_HOLD, sel_lfsr2: FSR_HOLD,
      out_data: 1'b1, scan_en: 1'b0, clear_window: 1'b0, collect_iv: 1'b0
    };
    plt_sel_o  = 2'b01;
    plt_hold_o = 1'b0;
    led_init_o = 1'b0;
    sp_clr = 1'b1; sp_en = 1'b0;
    iv_clr = 1'b1; iv_en = 1'b0;
    su_clr = 1'b1; su_en = 1'b0;

    unique case (state_q)
      ST_INIT: begin
        ctrl_o.clear_ksg1   = 1'b1;
        ctrl_o.clear_ksg2   = 1'b1;
        ctrl_o.out_data     = 1'b0;
        ctrl_o.clear_window = 1'b1;
        plt_sel_o  = 2'b11;
        led_init_o = 1'b1;
        if (flag_i == FLAG_READY) state_d = ST_LOAD_PC;
      end
      ST_LOAD_PC: begin
        ctrl_o.sel_nlfsr1 = FSR_LOAD;
        ctrl_o.sel_lfsr1  = FSR_LOAD;
        ctrl_o.sel_nlfsr2 = FSR_LOAD;
        ctrl_o.out_data   = 1'b0;
        plt_sel_o  = 2'b00;
        led_init_o = 1'b1;
        state_d    = ST_SHIFT_KSG1;
      end
      ST_SHIFT_KSG1: begin
        ctrl_o.sel_mux1_nlfsr1 = 1'b1;
        ctrl_o.sel_mux1_lfsr1  = 1'b1;
        ctrl_o.out_data        = 1'b0;
        plt_sel_o  = 2'b00;
        plt_hold_o = 1'b1;
        led_init_o = 1'b1;
        su_clr = 1'b0; su_en = 1'b1;
        if (su_last) state_d = ST_CTGEN;
      end
      ST_CTGEN: begin
        ctrl_o.scan_en = 1'b1;
        sp_clr = 1'b0; sp_en = 1'b1;
        if (sync_found) state_d = ST_NEWIV_COLL;
      end
      ST_NEWIV_COLL: begin
        ctrl_o.collect_iv   = 1'b1;
        ctrl_o.clear_window = 1'b1;
        iv_clr = 1'b0; iv_en = 1'b1;
        if (iv_last) state_d = ST_LOAD_NEWIV;
      end
      ST_LOAD_NEWIV: begin
        ctrl_o.sel_nlfsr2   = FSR_LOAD;
        ctrl_o.sel_lfsr2    = FSR_LOAD;
        ctrl_o.clear_window = 1'b1;
        state_d = ST_SHIFT_KSG2;
      end
      ST_SHIFT_KSG2: begin
        ctrl_o.sel_nlfsr2   = FSR_SHIFT;
        ctrl_o.sel_lfsr2    = FSR_SHIFT;
        ctrl_o.clear_window = 1'b1;
        su_clr = 1'b0; su_en = 1'b1;
        if (su_last) state_d = ST_LOAD_KSG2;
      end
      ST_LOAD_KSG2: begin
        ctrl_o.sel_nlfsr1        = FSR_LOAD;
        ctrl_o.sel_lfsr1         = FSR_LOAD;
        ctrl_o.sel_mux128_nlfsr1 = 1'b1;
        ctrl_o.sel_mux128_lfsr1  = 1'b1;
        ctrl_o.clear_window      = 1'b1;
        state_d = ST_CTGEN;
      end
      default: state_d = ST_INIT;
    endcase

    if (reset_i) state_d = ST_INIT;
  end

  always_ff @(posedge clk_i) begin
    state_q <= state_d;
  end

  assign state_o      = state_q;
  assign sync_found_o = sync_found;

endmodule
