// Workload testbench: synchronization recovery delay (SRD) of the SCFB
// stations for sync pattern sizes n = 4, 6, 8, 10, 12 and the formats
// "100...00" and "111...11", the grid of the SCFB sync pattern study. Ten
// scfb_encryptor/scfb_decryptor pairs, one per (n, format), share key, IV
// and a random plaintext stream. Each line is a channel with a variable delay
// d (0..7): raising d inserts bits, lowering it drops bits. Every GAP clocks
// all channels get the same event, d changed by 1 or 2. The decryptor output
// must equal the plaintext delayed by d (the stations add no latency). For
// each event and pair the SRD is the number of clocks from the event to the
// last wrong decrypted bit before the next event. The channel has no bit
// errors and the keystream generator is Grain-128 with a 96-bit IV, as in
// the hardware design; the study itself used an AES-based SCFB, so only the
// trend is compared, not the values.
// Checked: every pair is error free for the last 2000 clocks before each
// event (recovered), for "100...00" the mean SRD grows from n = 4 to 8 to
// 12, and at n = 12 "100...00" has a smaller mean SRD than "111...11" (the
// study's two findings). All means are printed.
module tb_scfb_srd;
  import grain128_pkg::*;
  import scfb_pkg::*;
  import grain_ref_pkg::*;

  localparam int NN = 5;
  localparam int NEV = 8;
  localparam int GAP = 40000;

  function automatic int unsigned nsz(int i);
    return 4 + 2 * i;
  endfunction
  // pattern of size n, MSB sent first: 100...00 (f = 0) or 111...11 (f = 1)
  function automatic logic [11:0] pat(int i, int f);
    logic [11:0] v;
    v = f ? 12'hFFF : 12'h800;
    return v >> (12 - nsz(i));
  endfunction

  logic clk = 0;
  always #5 clk = ~clk;

  logic reset, ptx;
  logic [7:0] flag;
  fsr_t key;
  iv_t iv;
  int d = 0;
  logic tx [2][NN], rx [2][NN], dre [2][NN];
  logic [7:0] hist [2][NN];
  int checks = 0, failures = 0;

  for (genvar f = 0; f < 2; f++) begin : g_f
    for (genvar i = 0; i < NN; i++) begin : g_n
      scfb_encryptor #(.SP_N(nsz(i)), .SP_PATTERN(nsz(i)'(pat(i, f)))) u_tr (
        .clk_i(clk), .reset_i(reset), .flag_i(flag), .key_i(key), .iv_i(iv),
        .plaintext_i(ptx), .dout_o(tx[f][i]), .led_init_o(), .plt_sel_o(),
        .plt_hold_o(), .state_o(), .sync_found_o());
      scfb_decryptor #(.SP_N(nsz(i)), .SP_PATTERN(nsz(i)'(pat(i, f)))) u_re (
        .clk_i(clk), .reset_i(reset), .flag_i(flag), .key_i(key), .iv_i(iv),
        .datain_i(rx[f][i]), .dout_o(dre[f][i]), .led_init_o(), .state_o(),
        .sync_found_o());
      assign rx[f][i] = (d == 0) ? tx[f][i] : hist[f][i][d-1];
      always_ff @(posedge clk) hist[f][i] <= {hist[f][i][6:0], tx[f][i]};
    end
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit ph[$];
    int last_bad [2][NN], late_bad [2][NN], sum [2][NN];
    real mean [2][NN];
    int total, start, ev_at;
    reset = 1; flag = 0; ptx = 0;
    key = rand128(); iv = rand128()[95:0];
    sum = '{default: 0};
    @(posedge clk); #1; reset = 0;
    repeat (3) @(posedge clk);
    #1; flag = FLAG_READY;
    start = GRAIN_INIT_CLOCKS + 3;
    total = start + GAP * (NEV + 1);
    ev_at = start + GAP;
    for (int c = 0; c < total; c++) begin
      if (c == ev_at) begin
        int nd;
        do nd = d + ($urandom_range(0, 1) ? 1 : -1) * $urandom_range(1, 2);
        while (nd < 0 || nd > 7);
        d = nd;
        last_bad = '{default: c}; late_bad = '{default: 0};
      end
      ptx = 1'($urandom);
      #1;
      ph.push_front(ptx);
      if (ph.size() > 8) void'(ph.pop_back());
      if (c >= start && ph.size() > d)
        for (int f = 0; f < 2; f++)
          for (int i = 0; i < NN; i++)
            if (dre[f][i] !== ph[d]) begin
              if (c < ev_at) chk(0, $sformatf("n %0d format %0d error before any event", nsz(i), f));
              last_bad[f][i] = c;
              if (c >= ev_at + GAP - 2000) late_bad[f][i]++;
            end
      if (c == ev_at + GAP - 1) begin
        for (int f = 0; f < 2; f++)
          for (int i = 0; i < NN; i++) begin
            sum[f][i] += last_bad[f][i] - ev_at;
            chk(late_bad[f][i] == 0, $sformatf("n %0d format %0d not recovered after event at %0d",
                                                nsz(i), f, ev_at));
          end
        ev_at += GAP;
      end
      @(posedge clk); #1;
    end
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < NN; i++) begin
        mean[f][i] = real'(sum[f][i]) / NEV;
        $display("n %2d format %s: mean SRD %8.1f bits over %0d events", nsz(i),
                 f ? "111...11" : "100...00", mean[f][i], NEV);
      end
    chk(mean[0][0] < mean[0][2] && mean[0][2] < mean[0][4], "SRD grows with n for 100...00");
    chk(mean[0][4] < mean[1][4], "100...00 faster than 111...11 at n = 12");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
