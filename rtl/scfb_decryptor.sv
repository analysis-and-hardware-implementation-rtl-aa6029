// SCFB decryption system (receiver): scfb_datapath in decrypt mode plus
// scfb_controller.
//
// The received line bit is both XORed with the KSG1 keystream and scanned for
// the sync pattern, so the receiver collects the same new IV as the
// transmitter and, after the same setup phase, runs KSG1 on the same state:
// that is how it resynchronizes after bit slips. dout_o is '1' in INIT,
// Load_PC and Shift_KSG1 and the decrypted bit afterwards, in the same clock
// as datain_i (no pipeline stage). SP_N / SP_PATTERN (defaults 8,
// "10000000") go to datapath and controller; both stations must match.
module scfb_decryptor
  import grain128_pkg::*;
  import scfb_pkg::*;
#(
  parameter int unsigned SP_N = SYNC_N,                    // sync pattern size n
  parameter logic [SP_N-1:0] SP_PATTERN = {1'b1, {(SP_N-1){1'b0}}} // MSB sent first
) (
  input  logic        clk_i,         // Clk_re
  input  logic        reset_i,       // reset_re
  input  logic [7:0]  flag_i,        // flag_re
  input  fsr_t        key_i,         // KeyIn_re
  input  iv_t         iv_i,          // IVKSG1_re
  input  logic        datain_i,      // datain_re
  output logic        dout_o,        // dout_re
  output logic        led_init_o,    // ledINIT_re
  output scfb_state_e state_o,
  output logic        sync_found_o
);

  scfb_ctrl_t ctrl;
  logic       match;

  scfb_controller #(.SP_N(SP_N)) u_ctrl (
    .clk_i, .reset_i, .flag_i, .window_match_i(match), .ctrl_o(ctrl),
    .plt_sel_o(), .plt_hold_o(), .led_init_o, .state_o, .sync_found_o
  );

  scfb_datapath #(.DECRYPT(1'b1), .SP_N(SP_N), .SP_PATTERN(SP_PATTERN)) u_dp (
    .clk_i, .ctrl_i(ctrl), .key_i, .iv_i, .data_i(datain_i), .data_o(dout_o),
    .window_match_o(match), .keystream_o(), .new_iv_o()
  );

endmodule
