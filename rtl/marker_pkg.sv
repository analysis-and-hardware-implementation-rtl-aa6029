// Constants and types of the marker-based synchronous stream cipher.
//
// Every synchronization cycle on the line is an n=8 bit marker followed by
// B=128 ciphertext bits. The receiver keeps k=4 bits of the previous cycle in
// a 140-bit data register (k + n + B) and checks 2k+1 = 9 marker windows
// around the expected marker position. Bits are sent least significant bit
// first, so the marker "10000000" (first bit '1') is the byte 8'h01.
package marker_pkg;

  localparam int unsigned MK_N         = 8;     // marker size n
  localparam int unsigned MK_B         = 128;   // ciphertext bits per cycle B
  localparam int unsigned MK_K         = 4;     // search range k
  localparam int unsigned MK_WINDOWS   = 2*MK_K + 1;
  localparam int unsigned MK_REG_LEN   = MK_K + MK_N + MK_B;  // 140
  localparam int unsigned MK_COUNT_MAX = 2;
  localparam logic [7:0]  MK_MARKER    = 8'h01; // "10000000", bit 0 sent first
  localparam logic [7:0]  MK_FLAG_READY = 8'hFF;

  typedef enum logic [2:0] {
    ME_INIT      = 3'd0,
    ME_LOAD      = 3'd1,
    ME_IDLE      = 3'd2,
    ME_MARKER    = 3'd3,   // MarkerShifting
    ME_CIPHER    = 3'd4    // CiphertextShifting
  } menc_state_e;

  typedef enum logic [2:0] {
    MD_INIT      = 3'd0,
    MD_LOAD      = 3'd1,
    MD_IDLE      = 3'd2,
    MD_CIPHER    = 3'd3,   // CiphertextReceiving
    MD_MARKER    = 3'd4    // MarkerReceiving
  } mdec_state_e;

endpackage
