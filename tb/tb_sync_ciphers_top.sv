// End-to-end testbench of sync_ciphers_top: both boards (SCFB and marker
// based) at their default sizes, each driven by its own host-port model and
// each with its own channel model between tx and rx whose delay can be
// changed (delay + s = s bits inserted, delay - s = s bits dropped).
// SCFB board: host writes a random key, IV and plaintext IV and the flag;
// phase 1 loopback without errors, phase 2 one inserted bit, phase 3 one
// dropped bit. Marker board: host writes random IVs, the marker and the
// flag, presses start; then +3, -2, +2, -3 bits at random clocks.
// Every mechanism is counted and the test fails if one never happened:
// SCFB setup phases, sync patterns found, KSG2 reloads of KSG1 at the
// receiver, recovery after the insertion and after the drop; marker windows
// decided at the centre, early (bits dropped) and late (bits inserted), and
// comparator recovery after every marker event. Correctness checks: SCFB
// comparator on throughout phase 1 and at the end of phase 3, receiver
// output equal to the plaintext delayed by one clock at the end of phase 2,
// marker comparator on before each event and at the end.
module tb_sync_ciphers_top;
  import scfb_pkg::*;
  import marker_pkg::*;
  import grain_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  // SCFB board pins
  logic s_rst, s_astb, s_dstb, s_pwr, s_oe, s_pwait, s_comp, s_ltr, s_lre, s_tx, s_rx, s_plt, s_dre;
  logic [7:0] s_pdi, s_pdo;
  // marker board pins
  logic m_rst, m_start, m_astb, m_dstb, m_pwr, m_oe, m_pwait, m_comp, m_tx, m_rx, m_dpt, m_dptv;
  logic [7:0] m_pdi, m_pdo;
  int checks = 0, failures = 0;

  sync_ciphers_top u_top (.clk(clk),
    .scfb_btn_reset(s_rst), .scfb_astb(s_astb), .scfb_dstb(s_dstb), .scfb_pwr(s_pwr),
    .scfb_pdb_i(s_pdi), .scfb_pdb_o(s_pdo), .scfb_pdb_oe(s_oe), .scfb_pwait(s_pwait),
    .scfb_led_comp(s_comp), .scfb_init_led_tr(s_ltr), .scfb_init_led_re(s_lre),
    .scfb_tx(s_tx), .scfb_rx(s_rx), .scfb_pltout(s_plt), .scfb_dout_re(s_dre),
    .mk_btn_reset(m_rst), .mk_btn_start(m_start), .mk_astb(m_astb), .mk_dstb(m_dstb),
    .mk_pwr(m_pwr), .mk_pdb_i(m_pdi), .mk_pdb_o(m_pdo), .mk_pdb_oe(m_oe),
    .mk_pwait(m_pwait), .mk_led_comp(m_comp), .mk_tx(m_tx), .mk_rx(m_rx),
    .mk_dpt(m_dpt), .mk_dpt_valid(m_dptv));

  epp_host u_shost (.clk(clk), .astb(s_astb), .dstb(s_dstb), .pwr(s_pwr), .pdb(s_pdi),
    .pdb_brd(s_pdo), .pdb_oe(s_oe), .pwait(s_pwait));
  epp_host u_mhost (.clk(clk), .astb(m_astb), .dstb(m_dstb), .pwr(m_pwr), .pdb(m_pdi),
    .pdb_brd(m_pdo), .pdb_oe(m_oe), .pwait(m_pwait));

  // channel models
  int sd = 0, md = 0;
  logic [15:0] shist, mhist;
  assign s_rx = (sd == 0) ? s_tx : shist[sd-1];
  assign m_rx = (md == 0) ? m_tx : mhist[md-1];
  always_ff @(posedge clk) begin
    shist <= {shist[14:0], s_tx};
    mhist <= {mhist[14:0], m_tx};
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_setup = 0, n_sync = 0, n_reload = 0, n_rec_ins = 0, n_rec_drop = 0;
  int n_centre = 0, n_early = 0, n_late = 0, n_mk_rec = 0;

  always @(posedge clk) begin
    if (u_top.u_scfb.u_sys.sync_tr_o) n_sync++;
    if (u_top.u_scfb.u_sys.state_re_o == ST_LOAD_KSG2) n_reload++;
    if (u_top.u_marker.u_sys.decided_o) begin
      if (u_top.u_marker.u_sys.window_o == 5) n_centre++;
      else if (u_top.u_marker.u_sys.window_o < 5) n_early++;
      else n_late++;
    end
  end

  localparam int PH = 8000;

  // SCFB board
  initial begin : scfb_side
    logic [127:0] k, p;
    logic [95:0] v;
    bit ph[$];
    bit was_bad;
    int since;
    k = rand128(); p = rand128(); v = rand128()[95:0];
    s_rst = 1; repeat (3) @(posedge clk); #1; s_rst = 0;
    for (int i = 0; i < 16; i++) u_shost.write_reg(8'(i), k[127 - 8*i -: 8]);
    for (int i = 0; i < 12; i++) u_shost.write_reg(8'(16 + i), v[95 - 8*i -: 8]);
    for (int i = 0; i < 16; i++) u_shost.write_reg(8'(28 + i), p[127 - 8*i -: 8]);
    u_shost.write_reg(8'd44, 8'hFF);
    while (s_ltr) @(posedge clk);
    #1;
    n_setup++;
    was_bad = 0;
    for (int c = 0; c < 3 * PH; c++) begin
      if (c == PH) begin sd = 1; was_bad = 0; end
      if (c == 2 * PH) begin sd = 0; was_bad = 0; end
      ph.push_front(s_plt);
      if (ph.size() > 4) void'(ph.pop_back());
      if (c < PH) chk(s_comp, $sformatf("SCFB phase 1 clk %0d", c));
      else if (c < 2 * PH) begin
        if (s_dre != ph[1]) was_bad = 1;
        if (c == 2 * PH - 1) n_rec_ins += was_bad;
        if (c >= 2 * PH - 1500) chk(s_dre == ph[1], "SCFB recovered after insertion");
      end else begin
        if (!s_comp) was_bad = 1;
        if (c == 3 * PH - 1) n_rec_drop += was_bad;
        if (c >= 3 * PH - 1500) chk(s_comp, "SCFB recovered after drop");
      end
      @(posedge clk); #1;
    end
  end

  // marker board
  initial begin : marker_side
    logic [127:0] a, b;
    int steps[4] = '{3, -2, 2, -3};
    int at[4];
    bit off;
    a = rand128(); b = rand128();
    foreach (at[i]) at[i] = 2500 + 5000 * i + $urandom_range(0, 135);
    m_rst = 1; m_start = 0; repeat (3) @(posedge clk); #1; m_rst = 0;
    for (int i = 0; i < 16; i++) u_mhost.write_reg(8'(i), a[127 - 8*i -: 8]);
    for (int i = 0; i < 16; i++) u_mhost.write_reg(8'(16 + i), b[127 - 8*i -: 8]);
    u_mhost.write_reg(8'd32, 8'h80);
    u_mhost.write_reg(8'd33, 8'hFF);
    m_start = 1; @(posedge clk); #1; m_start = 0;
    off = 0;
    for (int c = 0; c < 3 * PH; c++) begin
      foreach (at[i]) if (c == at[i]) begin
        chk(m_comp, $sformatf("marker comparator on before event %0d", i));
        if (i > 0 && off) n_mk_rec++;
        md += steps[i]; off = 0;
      end
      if (!m_comp) off = 1;
      @(posedge clk); #1;
    end
    if (off) n_mk_rec++;
    chk(m_comp, "marker comparator on at the end");
  end

  initial begin
    #1;
    wait (n_setup > 0);
    repeat (3 * PH + 10) @(posedge clk);
    $display("SCFB: setups %0d syncs %0d KSG2 reloads %0d recovered after insertion %0d after drop %0d",
             n_setup, n_sync, n_reload, n_rec_ins, n_rec_drop);
    $display("marker: centre %0d early %0d late %0d recoveries %0d",
             n_centre, n_early, n_late, n_mk_rec);
    chk(n_setup > 0, "SCFB setup phase");
    chk(n_sync > 0, "SCFB sync pattern found");
    chk(n_reload > 0, "SCFB KSG2 reload");
    chk(n_rec_ins > 0, "SCFB recovery after insertion");
    chk(n_rec_drop > 0, "SCFB recovery after drop");
    chk(n_centre > 0, "marker centre window");
    chk(n_early > 0, "marker early window (bits dropped)");
    chk(n_late > 0, "marker late window (bits inserted)");
    chk(n_mk_rec == 4, "marker recovery after every event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
