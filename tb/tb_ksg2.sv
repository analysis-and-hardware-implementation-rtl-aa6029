// Testbench of ksg2: after a load of key and new IV and 256 shift clocks the
// registers must hold the Grain-128 state at the start of the keystream; the
// keystream of that state must reproduce the published vector.
module tb_ksg2;
  import grain128_pkg::*;
  import grain_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic clear;
  fsr_sel_e seln, sell;
  fsr_t key, ivo, nout, lout;
  int checks = 0, failures = 0;

  ksg2 dut (.clk_i(clk), .clear_i(clear), .key_i(key), .newiv_ones_i(ivo),
    .sel_nlfsr_i(seln), .sel_lfsr_i(sell), .nlfsr_o(nout), .lfsr_o(lout));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    grain_ref r;
    logic [127:0] k, z;
    logic [95:0] iv;
    clear = 1; seln = FSR_HOLD; sell = FSR_HOLD; key = '0; ivo = '0;
    @(posedge clk); #1;
    chk(nout == 0 && lout == 0, "clear");
    clear = 0;
    for (int t = 0; t < 5; t++) begin
      if (t == 0) begin
        k = hex128(128'h0123456789abcdef123456789abcdef0);
        iv = hex96(96'h0123456789abcdef12345678);
      end else begin
        k = rand128(); iv = rand128()[95:0];
      end
      key = k; ivo = {32'hFFFF_FFFF, iv};
      seln = FSR_LOAD; sell = FSR_LOAD; @(posedge clk); #1;
      chk(nout == k && lout == {32'hFFFF_FFFF, iv}, "load");
      seln = FSR_SHIFT; sell = FSR_SHIFT;
      repeat (256) @(posedge clk); #1;
      seln = FSR_HOLD; sell = FSR_HOLD;
      r = new(k, iv);
      chk(nout == r.nfsr() && lout == r.lfsr(), $sformatf("state after 256 clocks, run %0d", t));
      if (t == 0) begin
        // Keystream from the hardware state, using the reference output function.
        r.b = '{default: 0}; r.s = '{default: 0};
        for (int i = 0; i < 128; i++) begin r.b[i] = nout[i]; r.s[i] = lout[i]; end
        for (int i = 0; i < 128; i++) z[i] = r.next();
        chk(z == hex128(128'hdb032aff3788498b57cb894fffb6bb96), "keystream of loaded state");
      end
      repeat (5) @(posedge clk); #1;
      chk(nout == r.nfsr() || t == 0, "hold keeps state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
