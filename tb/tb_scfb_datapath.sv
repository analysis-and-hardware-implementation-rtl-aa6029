// Self-checking testbench of scfb_datapath (encrypting instance), driven by
// hand-written control words instead of the controller.
// Sequence: clear, load key/IV, 256 initialization clocks with the output
// fed back, then keystream with zero plaintext must equal the published
// Grain-128 vector; random plaintext must give plaintext xor keystream; the
// sync-pattern window must flag 10000000 exactly when the last 8 line bits
// are that pattern; 96 collected line bits must appear in the new-IV
// register (first bit at IV_0); KSG2 loaded with key and new IV and clocked
// 256 times, then copied into KSG1, must give the Grain-128 keystream of
// (key, new IV). The output mux must give 1 when out_data is low.
module tb_scfb_datapath;
  import grain128_pkg::*;
  import scfb_pkg::*;
  import grain_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  scfb_ctrl_t ctrl;
  fsr_t key;
  iv_t iv, niv;
  logic din, dout, wm, ks;
  int checks = 0, failures = 0;

  scfb_datapath #(.DECRYPT(1'b0)) dut (.clk_i(clk), .ctrl_i(ctrl), .key_i(key),
    .iv_i(iv), .data_i(din), .data_o(dout), .window_match_o(wm), .keystream_o(ks),
    .new_iv_o(niv));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic scfb_ctrl_t idle();
    scfb_ctrl_t c = '0;
    c.sel_nlfsr1 = FSR_SHIFT; c.sel_lfsr1 = FSR_SHIFT;
    c.sel_nlfsr2 = FSR_HOLD;  c.sel_lfsr2 = FSR_HOLD;
    c.out_data = 1'b1;
    return c;
  endfunction

  initial begin
    grain_ref g;
    logic [127:0] z;
    logic [7:0] w;
    iv_t exp_iv;
    key = hex128(128'h0123456789abcdef123456789abcdef0);
    iv  = hex96(96'h0123456789abcdef12345678);
    din = 0;
    ctrl = idle(); ctrl.clear_ksg1 = 1; ctrl.clear_ksg2 = 1; ctrl.clear_window = 1;
    ctrl.out_data = 0;
    #1; chk(dout == 1'b1, "output mux gives 1");
    @(posedge clk); #1;
    ctrl = idle(); ctrl.sel_nlfsr1 = FSR_LOAD; ctrl.sel_lfsr1 = FSR_LOAD; ctrl.sel_nlfsr2 = FSR_LOAD;
    @(posedge clk); #1;
    ctrl = idle(); ctrl.sel_mux1_nlfsr1 = 1; ctrl.sel_mux1_lfsr1 = 1;
    repeat (GRAIN_INIT_CLOCKS) @(posedge clk);
    #1;
    ctrl = idle(); ctrl.scan_en = 1;
    for (int i = 0; i < 128; i++) begin
      #1; z[i] = dout; @(posedge clk); #1;
    end
    chk(z == hex128(128'hdb032aff3788498b57cb894fffb6bb96), $sformatf("vector: %h", z));
    // random plaintext against the reference, window detection
    g = new(key, iv);
    for (int i = 0; i < 128; i++) void'(g.next());
    ctrl.clear_window = 1; @(posedge clk); void'(g.next()); #1; ctrl.clear_window = 0;
    w = 0;
    for (int i = 0; i < 1500; i++) begin
      bit e;
      din = 1'($urandom);
      if (i % 100 == 50) din = 1'b1 ^ g.pre_output();   // force a 1 then seven 0
      else if (i % 100 > 50 && i % 100 < 58) din = g.pre_output();
      #1;
      e = din ^ g.next();
      chk(dout == e && ks == (din ^ e), "plaintext xor keystream");
      chk(wm == ({w[6:0], e} == 8'h80), "window match");
      w = {w[6:0], e};
      @(posedge clk); #1;
    end
    // collect 96 line bits as new IV
    ctrl.scan_en = 0; ctrl.collect_iv = 1;
    for (int i = 0; i < GRAIN_IV_W; i++) begin
      din = 1'($urandom); #1;
      exp_iv[i] = din ^ g.next();
      @(posedge clk); #1;
    end
    ctrl.collect_iv = 0;
    chk(niv == exp_iv, "new IV register");
    // KSG2: load key/new IV, 256 clocks; KSG1 keeps running meanwhile
    ctrl.sel_nlfsr2 = FSR_LOAD; ctrl.sel_lfsr2 = FSR_LOAD;
    @(posedge clk); void'(g.next()); #1;
    ctrl.sel_nlfsr2 = FSR_SHIFT; ctrl.sel_lfsr2 = FSR_SHIFT;
    for (int i = 0; i < GRAIN_INIT_CLOCKS; i++) begin
      din = 1'($urandom); #1;
      chk(dout == (din ^ g.next()), "old keystream during KSG2 setup");
      @(posedge clk); #1;
    end
    ctrl.sel_nlfsr2 = FSR_HOLD; ctrl.sel_lfsr2 = FSR_HOLD;
    ctrl.sel_nlfsr1 = FSR_LOAD; ctrl.sel_lfsr1 = FSR_LOAD;
    ctrl.sel_mux128_nlfsr1 = 1; ctrl.sel_mux128_lfsr1 = 1;
    @(posedge clk); #1;
    ctrl = idle();
    g = new(key, exp_iv);
    for (int i = 0; i < 300; i++) begin
      din = 1'($urandom); #1;
      chk(dout == (din ^ g.next()), "keystream of (key, new IV)");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
