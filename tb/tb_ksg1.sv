// Testbench of ksg1: Grain-128 test vectors through the key/IV load path,
// the 256-clock initialization, the KSG2 load path, hold and clear.
module tb_ksg1;
  import grain128_pkg::*;
  import grain_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic clear, m128n, m128l, m1n, m1l, ks;
  fsr_sel_e seln, sell;
  fsr_t key, ivo, n2, l2, nout, lout;
  int checks = 0, failures = 0;

  ksg1 dut (.clk_i(clk), .clear_i(clear), .key_i(key), .iv_ones_i(ivo),
    .nlfsr2_i(n2), .lfsr2_i(l2), .sel_mux128_nlfsr_i(m128n), .sel_mux128_lfsr_i(m128l),
    .sel_nlfsr_i(seln), .sel_lfsr_i(sell), .sel_mux1_nlfsr_i(m1n), .sel_mux1_lfsr_i(m1l),
    .keystream_o(ks), .nlfsr_o(nout), .lfsr_o(lout));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic set(fsr_sel_e s, bit init);
    seln = s; sell = s; m1n = init; m1l = init;
  endtask

  // Load key / IV, run the init clocks, return 128 keystream bits (bit 0 first).
  task automatic run_vector(logic [127:0] k, logic [95:0] iv, output logic [127:0] z,
                            output int init_clocks);
    key = k; ivo = {32'hFFFF_FFFF, iv}; m128n = 0; m128l = 0;
    set(FSR_LOAD, 0); @(posedge clk); #1;
    init_clocks = 0;
    set(FSR_SHIFT, 1);
    repeat (256) begin @(posedge clk); #1; init_clocks++; end
    set(FSR_SHIFT, 0);
    for (int i = 0; i < 128; i++) begin z[i] = ks; @(posedge clk); #1; end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] z, exp_z;
    int n;
    grain_ref r;
    clear = 1; set(FSR_HOLD, 0); m128n = 0; m128l = 0; n2 = '0; l2 = '0;
    key = '0; ivo = '0;
    @(posedge clk); #1;
    chk(nout == 0 && lout == 0, "clear");
    clear = 0;

    run_vector(hex128(128'h0), hex96(96'h0), z, n);
    exp_z = hex128(128'h0fd9deefeb6fad437bf43fce35849cfe);
    chk(z == exp_z, $sformatf("vector 1 keystream %h", z));
    chk(n == 256, "256 init clocks");

    run_vector(hex128(128'h0123456789abcdef123456789abcdef0),
               hex96(96'h0123456789abcdef12345678), z, n);
    exp_z = hex128(128'hdb032aff3788498b57cb894fffb6bb96);
    chk(z == exp_z, $sformatf("vector 2 keystream %h", z));

    // Load path from KSG2: state after init of a random key/IV, then keystream.
    for (int t = 0; t < 4; t++) begin
      logic [127:0] k; logic [95:0] iv; bit ok;
      k = rand128(); iv = rand128()[95:0];
      r = new(k, iv);
      n2 = r.nfsr(); l2 = r.lfsr(); m128n = 1; m128l = 1;
      set(FSR_LOAD, 0); @(posedge clk); #1;
      chk(nout == n2 && lout == l2, "load from KSG2");
      set(FSR_SHIFT, 0); ok = 1;
      for (int i = 0; i < 200; i++) begin
        if (ks != r.next()) ok = 0;
        @(posedge clk); #1;
      end
      chk(ok, "keystream after KSG2 load");
      set(FSR_HOLD, 0); n2 = nout; l2 = lout;
      repeat (3) @(posedge clk); #1;
      chk(nout == n2 && lout == l2, "hold");
      set(FSR_CLEAR, 0); @(posedge clk); #1;
      chk(nout == 0 && lout == 0, "clear code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
