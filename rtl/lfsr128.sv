// 128-bit LFSR with the Grain-128 LFSR polynomial
// f(x) = 1 + x^32 + x^47 + x^58 + x^90 + x^121 + x^128.
//
// The register is drawn with bit 127 on the left and bit 0 on the right and
// shifts right: every shift writes s0^s7^s38^s70^s81^s96 into bit 127 and
// bit 0 leaves as the output bit (reg_out_o[0]). It is the keystream
// generator and the plaintext register of the marker-based system and the
// plaintext generator of the SCFB test set-up.
//
// Select codes as documented: 2'b00 parallel load from reg_in_i, 2'b01 shift
// right, any other code clears the register. clr_i is an asynchronous clear;
// the systems in this design tie it low and clear with code 2'b11 instead,
// so that their reset buttons stay purely synchronous.
// There is no hold code: a user that must keep the contents loads reg_out_o
// back through reg_in_i.
module lfsr128 (
  input  logic         clk_i,      // CLK_LFSR
  input  logic         clr_i,      // CLR_LFSR, asynchronous, active high
  input  logic [1:0]   sel_i,      // SEL_LFSR
  input  logic [127:0] reg_in_i,   // RegIn_LFSR
  output logic [127:0] reg_out_o   // RegOut_LFSR
);

  logic [127:0] q;
  logic         fb;

  assign fb = q[0] ^ q[7] ^ q[38] ^ q[70] ^ q[81] ^ q[96];

  always_ff @(posedge clk_i or posedge clr_i) begin
    if (clr_i)               q <= '0;
    else if (sel_i == 2'b00) q <= reg_in_i;
    else if (sel_i == 2'b01) q <= {fb, q[127:1]};
    else                     q <= '0;
  end

  assign reg_out_o = q;

endmodule
