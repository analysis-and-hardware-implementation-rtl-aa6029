// Types and constants of the SCFB system built around two Grain-128
// generators (KSG1 primary, KSG2 setup).
//
// One synchronization cycle on the line is: an n-bit sync pattern, the B=96
// following ciphertext bits taken as the new IV, the setup phase in which
// KSG2 initializes from key and new IV, and the synchronous phase in which
// the ciphertext is scanned for the next sync pattern. The controller states
// and their names follow the document; the control word below is this
// design's way of carrying the select signals from the controller to the
// datapath.
package scfb_pkg;
  import grain128_pkg::*;

  localparam int unsigned SYNC_N       = 8;        // sync pattern size n
  localparam logic [7:0]  SYNC_PATTERN = 8'h80;    // "10000000", MSB sent first
  localparam logic [7:0]  FLAG_READY   = 8'hFF;    // flag register "11111111"

  typedef enum logic [2:0] {
    ST_INIT        = 3'd0,
    ST_LOAD_PC     = 3'd1,
    ST_SHIFT_KSG1  = 3'd2,
    ST_CTGEN       = 3'd3,
    ST_NEWIV_COLL  = 3'd4,
    ST_LOAD_NEWIV  = 3'd5,
    ST_SHIFT_KSG2  = 3'd6,
    ST_LOAD_KSG2   = 3'd7
  } scfb_state_e;

  // Control word from controller to datapath.
  typedef struct packed {
    logic     clear_ksg1;          // CLEAR_KSG1
    fsr_sel_e sel_nlfsr1;          // SEL_NLFSR1
    fsr_sel_e sel_lfsr1;           // SEL_LFSR1
    logic     sel_mux128_nlfsr1;   // 1: load NFSR1 from NLFSR2_OUT
    logic     sel_mux128_lfsr1;    // 1: load LFSR1 from LFSR2_OUT
    logic     sel_mux1_nlfsr1;     // 1: KSG1 output fed back (init mode)
    logic     sel_mux1_lfsr1;
    logic     clear_ksg2;          // CLEAR_KSG2
    fsr_sel_e sel_nlfsr2;          // SEL_NLFSR2
    fsr_sel_e sel_lfsr2;           // SEL_LFSR2
    logic     out_data;            // output mux: 1 data bit, 0 constant '1'
    logic     scan_en;             // demux to the sync pattern window
    logic     clear_window;        // empty the sync pattern window
    logic     collect_iv;          // demux to the new IV register
  } scfb_ctrl_t;

endpackage
