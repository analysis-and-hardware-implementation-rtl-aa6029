// Self-checking testbench of scfb_encryptor (SCFB encryption side).
// How: a software model (scfb_model_pkg) runs beside the DUT; every clock
// the line bit, the controller state, the init LED and the sync strobe are
// compared. Run 0 uses the published Grain-128 vector with a zero plaintext so
// the first 128 line bits after the 256-clock setup must equal the vector.
// Later runs use random key, IV and plaintext, a mid-run reset and forced
// sync patterns, so that several resynchronizations (new IV collected, KSG2
// set up in 256 clocks, KSG1 reloaded) are exercised and their clock counts
// (1 Load_PC + 256 setup, 96 IV bits, 256 KSG2 clocks) are checked.
module tb_scfb_encryptor;
  import grain128_pkg::*;
  import scfb_pkg::*;
  import grain_ref_pkg::*;
  import scfb_model_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic reset, pt, dout, led, sync;
  logic [7:0] flag;
  fsr_t key;
  iv_t iv;
  logic [1:0] psel;
  logic phold;
  scfb_state_e st;
  int checks = 0, failures = 0;

  scfb_encryptor dut (.clk_i(clk), .reset_i(reset), .flag_i(flag), .key_i(key),
    .iv_i(iv), .plaintext_i(pt), .dout_o(dout), .led_init_o(led),
    .plt_sel_o(psel), .plt_hold_o(phold), .state_o(st), .sync_found_o(sync));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, m);
    end
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    scfb_model m;
    scfb_state_e es, prev;
    bit eo;
    int fc = 0;
    int run_len, nsh1, nsh2, niv, tot_sync, tot_reload, ncs;
    logic [127:0] z, zvec;
    tot_sync = 0; tot_reload = 0;
    reset = 1; flag = 0; pt = 0;
    key = hex128(128'h0123456789abcdef123456789abcdef0);
    iv  = hex96(96'h0123456789abcdef12345678);
    @(posedge clk); #1; reset = 0;
    for (int run = 0; run < 4; run++) begin
      if (run > 0) begin key = rand128(); iv = rand128()[95:0]; end
      // the DUT is in INIT after the reset of the previous clock
      m = new(1'b0, key, iv);
      nsh1 = 0; nsh2 = 0; niv = 0; ncs = 0; z = '0;
      zvec = hex128(128'hdb032aff3788498b57cb894fffb6bb96);
      run_len = (run == 0) ? 1200 : 5000;
      prev = ST_INIT;
      for (int c = 0; c < run_len; c++) begin
        flag = (c >= 3) ? FLAG_READY : 8'($urandom_range(0, 254));
        pt = (run == 0) ? 1'b0 : 1'($urandom);
        // now and then choose the plaintext so that 10000000 goes on the line
        if (run > 0 && m.st == ST_CTGEN && fc == 0 && $urandom_range(0, 199) == 0) fc = 8;
        if (m.st != ST_CTGEN) fc = 0;
        if (fc > 0) begin
          pt = (fc == 8) ^ m.g.pre_output();
          fc--;
        end
        reset = (run == 3 && c == 2500);
        #1;
        m.step(pt, flag, reset, es, eo);
        chk(st == es, $sformatf("run %0d clk %0d state %0d exp %0d", run, c, st, es));
        chk(dout == eo, $sformatf("run %0d clk %0d dout %0b exp %0b", run, c, dout, eo));
        chk(led == (es inside {ST_INIT, ST_LOAD_PC, ST_SHIFT_KSG1}), "init led");
        chk(sync == (es == ST_CTGEN && m.st == ST_NEWIV_COLL), "sync strobe");
        if (es == ST_INIT) begin nsh1 = 0; nsh2 = 0; niv = 0; end
        if (es == ST_SHIFT_KSG1) nsh1++;
        if (es == ST_SHIFT_KSG2) nsh2++;
        if (es == ST_NEWIV_COLL) niv++;
        if (es >= ST_CTGEN && ncs < 128) begin z[ncs] = dout; ncs++; end
        if (prev == ST_SHIFT_KSG1 && es == ST_CTGEN) begin
          chk(nsh1 == GRAIN_INIT_CLOCKS, $sformatf("setup clocks %0d", nsh1)); nsh1 = 0;
        end
        if (prev == ST_SHIFT_KSG2 && es == ST_LOAD_KSG2) begin
          chk(nsh2 == GRAIN_INIT_CLOCKS, $sformatf("KSG2 clocks %0d", nsh2)); nsh2 = 0;
        end
        if (prev == ST_NEWIV_COLL && es == ST_LOAD_NEWIV) begin
          chk(niv == GRAIN_IV_W, $sformatf("IV bits %0d", niv)); niv = 0;
        end
        prev = es;
        @(posedge clk); #1;
      end
      if (run == 0) chk(z == zvec, $sformatf("keystream vector %h", z));
      $display("run %0d: syncs %0d reloads %0d", run, m.syncs, m.reloads);
      tot_sync += m.syncs; tot_reload += m.reloads;
      reset = 1; @(posedge clk); #1; reset = 0;
    end
    chk(tot_sync >= 4, "enough syncs");
    chk(tot_reload >= 3, "enough KSG reloads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
