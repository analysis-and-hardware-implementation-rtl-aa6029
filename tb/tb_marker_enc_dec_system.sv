// Self-checking testbench of marker_enc_dec_system (marker transmitter,
// marker receiver, receiver-side plaintext reference and comparator).
// The line from tx_o to rx_i goes through a channel model whose delay d can
// be changed: raising d by s inserts s bits, lowering it drops s bits.
// Sequence: d = 0, then +2, -1, +3, -4 bits at random clocks, about six
// 136-bit cycles apart. Checked:
//  - the transmitter sends 1s until start, the first decrypted bit comes
//    140 clocks after the first ciphertext bit when d = 0;
//  - each 128-bit block of decrypted plaintext is correct except in the
//    few blocks after an event, and the event must cause errors;
//  - the comparator LED is on before every event and at the end, and off at
//    some point after each event;
//  - the receiver decides a window other than 5 after each event.
module tb_marker_enc_dec_system;
  import marker_pkg::*;
  import grain_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, start, tx, rx, comp, pt, ptv, dpt, dptv, decided;
  logic [7:0] flag;
  logic [127:0] ivk, ivp;
  logic [3:0] win;
  menc_state_e est;
  mdec_state_e dst;
  int checks = 0, failures = 0;
  int d = 0;
  logic [15:0] hist;

  marker_enc_dec_system dut (.clk_i(clk), .rst_i(rst), .start_i(start), .flag_i(flag),
    .marker_i(MK_MARKER), .iv_ksg_i(ivk), .iv_plt_i(ivp), .tx_o(tx), .rx_i(rx),
    .led_comp_o(comp), .pt_o(pt), .pt_valid_o(ptv), .dpt_o(dpt), .dpt_valid_o(dptv),
    .enc_state_o(est), .dec_state_o(dst), .decided_o(decided), .window_o(win));

  assign rx = (d == 0) ? tx : hist[d-1];
  always_ff @(posedge clk) hist <= {hist[14:0], tx};

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int NEV = 4;
  localparam int CYC = MK_N + MK_B;

  initial begin
    int steps[NEV] = '{2, -1, 3, -4};
    int ev_clk[NEV], ev_blk[NEV], ev_err[NEV], odd[NEV], comp_off[NEV];
    bit dec[$];
    logic [127:0] q;
    int first_ct, first_pt, ev, total, nblk, nbad;
    rst = 1; start = 0; flag = 0;
    ivk = rand128(); ivp = rand128();
    foreach (ev_clk[i]) begin
      ev_clk[i] = 20 + CYC * (4 + 6 * i) + $urandom_range(0, CYC - 1);
      odd[i] = 0; comp_off[i] = 0; ev_err[i] = 0; ev_blk[i] = 0;
    end
    @(posedge clk); #1; rst = 0; flag = MK_FLAG_READY;
    repeat (5) begin @(posedge clk); #1; chk(tx == 1'b1, "idle line is 1"); end
    start = 1; @(posedge clk); #1; start = 0;
    first_ct = -1; first_pt = -1; ev = 0;
    total = 20 + CYC * (4 + 6 * NEV + 4);
    for (int c = 0; c < total; c++) begin
      if (ev < NEV && c == ev_clk[ev]) begin
        chk(comp, $sformatf("comparator on before event %0d", ev));
        ev_blk[ev] = dec.size() / MK_B;
        d += steps[ev]; ev++;
      end
      #1;
      if (ptv && first_ct < 0) first_ct = c;
      if (dptv) begin
        if (first_pt < 0) first_pt = c;
        dec.push_back(dpt);
      end
      if (ev > 0) begin
        if (!comp) comp_off[ev-1]++;
        if (decided && win != 5) odd[ev-1]++;
      end
      @(posedge clk);
    end
    chk(first_pt - first_ct == MK_REG_LEN, $sformatf("latency %0d", first_pt - first_ct));
    chk(comp, "comparator on at the end");
    q = ivp;
    nblk = dec.size() / MK_B;
    for (int b = 0; b < nblk; b++) begin
      bit near;
      near = 0; nbad = 0;
      for (int i = 0; i < MK_B; i++) begin
        if (dec[b * MK_B + i] != q[0]) nbad++;
        q = lfsr_step(q);
      end
      foreach (ev_blk[i]) if (b >= ev_blk[i] && b <= ev_blk[i] + 4) near = 1;
      foreach (ev_blk[i]) if (b >= ev_blk[i] && b <= ev_blk[i] + 2) ev_err[i] += nbad;
      if (!near) chk(nbad == 0, $sformatf("block %0d: %0d wrong bits", b, nbad));
    end
    foreach (odd[i]) begin
      chk(ev_err[i] > 0, $sformatf("event %0d caused no errors", i));
      $display("event %0d (%0d bits): %0d off-centre decisions, comparator off %0d clocks",
               i, steps[i], odd[i], comp_off[i]);
      chk(odd[i] > 0 && comp_off[i] > 0, "event detected and corrected");
    end
    chk(nblk >= 4 + 6 * NEV, $sformatf("blocks %0d", nblk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
