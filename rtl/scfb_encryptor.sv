// SCFB encryption system (transmitter): scfb_datapath in encrypt mode plus
// scfb_controller.
//
// Takes one plaintext bit per clock from an external plaintext generator and
// sends one line bit per clock: '1' during INIT, Load_PC and Shift_KSG1, the
// ciphertext from then on. The plaintext generator is outside this system, as
// in the document; plt_sel_o / plt_hold_o tell it when to load, shift or
// stand still. led_init_o is lit in INIT, Load_PC and Shift_KSG1.
// SP_N / SP_PATTERN (defaults 8, "10000000") go to datapath and controller.
module scfb_encryptor
  import grain128_pkg::*;
  import scfb_pkg::*;
#(
  parameter int unsigned SP_N = SYNC_N,                    // sync pattern size n
  parameter logic [SP_N-1:0] SP_PATTERN = {1'b1, {(SP_N-1){1'b0}}} // MSB sent first
) (
  input  logic        clk_i,         // Clk_tr
  input  logic        reset_i,       // reset_tr
  input  logic [7:0]  flag_i,        // flag_tr
  input  fsr_t        key_i,         // KeyIn_tr
  input  iv_t         iv_i,          // IVKSG1_tr
  input  logic        plaintext_i,   // from the plaintext generator
  output logic        dout_o,        // dout_tr
  output logic        led_init_o,    // ledINIT_tr
  output logic [1:0]  plt_sel_o,
  output logic        plt_hold_o,
  output scfb_state_e state_o,
  output logic        sync_found_o
);

  scfb_ctrl_t ctrl;
  logic       match;

  scfb_controller #(.SP_N(SP_N)) u_ctrl (
    .clk_i, .reset_i, .flag_i, .window_match_i(match), .ctrl_o(ctrl),
    .plt_sel_o, .plt_hold_o, .led_init_o, .state_o, .sync_found_o
  );

  scfb_datapath #(.DECRYPT(1'b0), .SP_N(SP_N), .SP_PATTERN(SP_PATTERN)) u_dp (
    .clk_i, .ctrl_i(ctrl), .key_i, .iv_i, .data_i(plaintext_i), .data_o(dout_o),
    .window_match_o(match), .keystream_o(), .new_iv_o()
  );

endmodule
