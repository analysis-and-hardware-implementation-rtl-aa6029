// Self-checking testbench of marker_decryptor.
// How: the software transmitter of marker_model_pkg feeds the DUT through a
// channel model that deletes (slip) or inserts 1 to 4 bits in the middle of a
// ciphertext block. Each of the 8 cases (delete/insert x 1..4) happens once,
// in random order at random positions. Checked:
//  - the first plaintext bit leaves the data register exactly 140 clocks
//    after the first ciphertext bit entered it;
//  - every 128-bit block of decrypted plaintext is correct, except in the
//    few blocks right after an event (and the event block must be wrong);
//  - after a deletion of s bits window 5-s is decided, after an insertion of
//    s bits window 5+s, with MSNum = window + 3 (Table 5.1 of the design);
//  - without events window 5 is decided every COUNT_MAX = 2 cycles.
module tb_marker_decryptor;
  import marker_pkg::*;
  import grain_ref_pkg::*;
  import marker_model_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, din, pt, ptv, decided;
  logic [7:0] flag;
  logic [127:0] ivk, ivp;
  logic [3:0] win, msnum;
  mdec_state_e st;
  int checks = 0, failures = 0;

  marker_decryptor dut (.clk_i(clk), .rst_i(rst), .flag_i(flag), .iv_ksg_i(ivk),
    .din_i(din), .pt_o(pt), .pt_valid_o(ptv), .state_o(st), .decided_o(decided),
    .window_o(win), .msnum_o(msnum));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, m);
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int NCYC = 56;
  localparam int NEV  = 8;

  initial begin
    marker_tx m;
    bit q[$];
    bit dec[$];
    bit p[];
    int ev_cyc[NEV], ev_amt[NEV], ev_pos[NEV];   // amt < 0: deletion
    int ev_seen[NEV];
    int first_ct_clk, first_pt_clk, ev, clkc, nwin5, blk, nbad, last_ev_blk;
    int order[NEV];
    rst = 1; flag = 0;
    ivk = rand128(); ivp = rand128();
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (ev_cyc[i]) begin
      ev_cyc[i] = 4 + 6 * i;
      ev_amt[i] = (order[i] < 4) ? -(order[i] + 1) : (order[i] - 3);
      ev_pos[i] = MK_N + $urandom_range(20, 100);
      ev_seen[i] = 0;
    end
    m = new(ivk, ivp, MK_MARKER);
    @(posedge clk); #1; rst = 0;
    flag = MK_FLAG_READY;
    @(posedge clk); #1;
    chk(st == MD_LOAD, "LOAD");
    first_ct_clk = -1; first_pt_clk = -1; ev = 0; nwin5 = 0;
    for (clkc = 0; clkc < 30 + NCYC * (MK_N + MK_B); clkc++) begin
      if (clkc == 20) m.running = 1;
      if (q.size() == 0) begin
        if (ev < NEV && m.cycles == ev_cyc[ev] && m.pos == ev_pos[ev]) begin
          if (ev_amt[ev] < 0) repeat (-ev_amt[ev]) void'(m.next());
          else repeat (ev_amt[ev]) q.push_back(1'($urandom));
          ev++;
        end
        if (q.size() == 0) begin
          q.push_back(m.next());
          if (m.is_cipher && first_ct_clk < 0) first_ct_clk = clkc;
        end
      end
      din = q.pop_front();
      #1;
      if (ptv) begin
        if (first_pt_clk < 0) first_pt_clk = clkc;
        dec.push_back(pt);
      end
      if (decided) begin
        if (win == 5) nwin5++;
        for (int i = 0; i < ev; i++)
          if (!ev_seen[i] && int'(win) == 5 + ev_amt[i]) ev_seen[i] = 1;
      end
      @(posedge clk); #1;
      if (decided_q) chk(msnum == 4'(win_q + 3), "MSNum = window + 3");
    end
    chk(first_pt_clk - first_ct_clk == MK_REG_LEN,
        $sformatf("latency %0d", first_pt_clk - first_ct_clk));
    m.ptstream(dec.size(), p);
    // blockwise comparison
    last_ev_blk = -100;
    for (blk = 0; blk < dec.size() / MK_B; blk++) begin
      bit near = 0;
      nbad = 0;
      for (int i = 0; i < MK_B; i++) if (dec[blk * MK_B + i] != p[blk * MK_B + i]) nbad++;
      foreach (ev_cyc[i]) if (blk >= ev_cyc[i] && blk <= ev_cyc[i] + 4) near = 1;
      foreach (ev_cyc[i]) if (blk == ev_cyc[i]) chk(nbad > 0, $sformatf("event block %0d had no errors", blk));
      if (!near) chk(nbad == 0, $sformatf("block %0d: %0d wrong bits", blk, nbad));
    end
    chk(dec.size() / MK_B >= NCYC - 2, $sformatf("blocks decrypted %0d", dec.size() / MK_B));
    foreach (ev_seen[i]) begin
      $display("event %0d: %s %0d bits at cycle %0d, window %0d decided: %0d",
               i, ev_amt[i] < 0 ? "delete" : "insert", ev_amt[i] < 0 ? -ev_amt[i] : ev_amt[i],
               ev_cyc[i], 5 + ev_amt[i], ev_seen[i]);
      chk(ev_seen[i] == 1, "expected window decided");
    end
    chk(nwin5 >= NCYC / 4, $sformatf("window 5 decisions %0d", nwin5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // MSNum register takes window + 3 at the clock after a decision
  logic decided_q;
  logic [3:0] win_q;
  always_ff @(posedge clk) begin decided_q <= decided; win_q <= win; end
endmodule
