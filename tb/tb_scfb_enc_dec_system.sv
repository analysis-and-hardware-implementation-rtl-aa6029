// Self-checking testbench of scfb_enc_dec_system (transmitter, receiver,
// plaintext generator and comparator). The line between tx_o and rx_i is a
// channel model with a variable delay d: raising d by one inserts a bit,
// lowering it drops one. Phases:
//  1. d = 0 (the board loopback): after the 1 + 256 setup clocks the
//     comparator LED must stay on and the decrypted bit must equal the
//     plaintext bit of the same clock;
//  2. one bit inserted (d = 1): errors appear, then after a resynchronization
//     the receiver output equals the plaintext delayed by one clock;
//  3. one bit dropped (d = 0 again): errors, then the comparator LED must be
//     on for the whole last part of the phase.
// The plaintext generator output is checked against the LFSR model, and both
// stations must have resynchronized several times.
module tb_scfb_enc_dec_system;
  import grain128_pkg::*;
  import scfb_pkg::*;
  import grain_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic reset, tx, rx, ltr, lre, comp, plt, dre, str, sre;
  logic [7:0] flag;
  fsr_t key, ivp;
  iv_t iv;
  scfb_state_e sttr, stre;
  int checks = 0, failures = 0;
  int d = 0;
  logic [7:0] hist;

  scfb_enc_dec_system dut (.clk_i(clk), .reset_i(reset), .flag_i(flag), .key_i(key),
    .iv_ksg1_i(iv), .iv_plt_i(ivp), .tx_o(tx), .rx_i(rx), .led_idle_tr_o(ltr),
    .led_idle_re_o(lre), .led_comp_o(comp), .pltout_o(plt), .dout_re_o(dre),
    .state_tr_o(sttr), .state_re_o(stre), .sync_tr_o(str), .sync_re_o(sre));

  assign rx = (d == 0) ? tx : hist[d-1];
  always_ff @(posedge clk) hist <= {hist[6:0], tx};

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int PH = 8000;

  initial begin
    logic [127:0] pq;
    bit ph[$];
    int ntr, nre, err[3], c, since_flag;
    reset = 1; flag = 0;
    key = rand128(); iv = rand128()[95:0]; ivp = rand128();
    ntr = 0; nre = 0; err = '{0, 0, 0};
    @(posedge clk); #1; reset = 0;
    repeat (3) @(posedge clk);
    #1; flag = FLAG_READY;
    pq = ivp; since_flag = 0;
    for (c = 0; c < 3 * PH; c++) begin
      int p;
      p = c / PH;
      if (c == PH) d = 1;
      if (c == 2 * PH) d = 0;
      #1;
      // plaintext generator: held during setup, then one LFSR step per clock
      if (since_flag <= GRAIN_INIT_CLOCKS + 1) chk(ltr && lre && plt == 1'b1, "setup phase");
      else begin
        chk(!ltr && plt == pq[0], "plaintext generator");
        pq = lfsr_step(pq);
      end
      if (since_flag == GRAIN_INIT_CLOCKS + 2) chk(!ltr && sttr == ST_CTGEN, "CTGen 1 + 256 clocks after leaving INIT");
      ph.push_front(plt);
      if (ph.size() > 4) void'(ph.pop_back());
      if (since_flag > GRAIN_INIT_CLOCKS + 2) begin
        bit ok;
        ok = (dre == ph[d]);
        if (!ok && c % PH < PH / 2) err[p]++;
        if (p == 0) chk(comp && ok, $sformatf("clk %0d phase 1 must be error free", c));
        if (c % PH >= PH - 1500) chk(ok, $sformatf("clk %0d phase %0d not recovered", c, p + 1));
        if (p == 2 && c % PH >= PH - 1500) chk(comp, "comparator LED after recovery");
      end
      if (str) ntr++;
      if (sre) nre++;
      since_flag++;
      @(posedge clk);
    end
    $display("syncs: transmitter %0d receiver %0d; errors after events %0d %0d", ntr, nre, err[1], err[2]);
    chk(err[1] > 0 && err[2] > 0, "channel events caused errors");
    chk(ntr >= 10 && nre >= 10, "several resynchronizations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
