// Self-checking testbench of marker_encryptor.
// How: the DUT line output is compared every clock with the software
// transmitter of marker_model_pkg (idle ones, then 8 marker bits with bit 0
// first and 128 ciphertext bits per cycle). Also checked: the plaintext tap
// while ciphertext is sent, the state sequence INIT -> LOAD -> IDLE ->
// MARKER/CIPHER, that the start button is needed, the 136-clock cycle length
// and 8/128 clocks per phase, and reset back to INIT. Two runs: the document's
// marker 10000000 and a random marker with random IVs.
module tb_marker_encryptor;
  import marker_pkg::*;
  import grain_ref_pkg::*;
  import marker_model_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, start, dout, pt, ptv;
  logic [7:0] flag, marker;
  logic [127:0] ivk, ivp;
  menc_state_e st;
  int checks = 0, failures = 0;

  marker_encryptor dut (.clk_i(clk), .rst_i(rst), .start_i(start), .flag_i(flag),
    .marker_i(marker), .iv_ksg_i(ivk), .iv_plt_i(ivp), .dout_o(dout), .pt_o(pt),
    .pt_valid_o(ptv), .state_o(st));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, m);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    marker_tx m;
    bit eb;
    logic [127:0] pq;
    int last_marker, nmk, ncph, ncyc;
    menc_state_e prev;
    rst = 1; start = 0; flag = 0;
    for (int run = 0; run < 2; run++) begin
      ivk = rand128(); ivp = rand128();
      marker = (run == 0) ? MK_MARKER : 8'($urandom);
      @(posedge clk); #1; rst = 0;
      chk(st == ME_INIT, "INIT after reset");
      repeat (3) begin flag = 8'($urandom_range(0, 254)); @(posedge clk); #1; end
      chk(st == ME_INIT, "waits for flag FF");
      flag = MK_FLAG_READY; @(posedge clk); #1;
      chk(st == ME_LOAD, "LOAD");
      @(posedge clk); #1;
      chk(st == ME_IDLE, "IDLE");
      repeat (5) begin chk(st == ME_IDLE && dout == 1'b1, "idle ones"); @(posedge clk); #1; end
      m = new(ivk, ivp, marker);
      pq = ivp;
      start = 1; @(posedge clk); #1; start = 0;
      m.running = 1;
      last_marker = -1; nmk = 0; ncph = 0; ncyc = 0; prev = ME_IDLE;
      for (int c = 0; c < 136 * 12; c++) begin
        eb = m.next();
        chk(dout == eb, $sformatf("run %0d clk %0d dout %0b exp %0b", run, c, dout, eb));
        chk(ptv == m.is_cipher, "pt_valid");
        chk(st == (m.is_cipher ? ME_CIPHER : ME_MARKER), "state");
        if (ptv) begin chk(pt == pq[0], "plaintext tap"); pq = lfsr_step(pq); end
        if (st == ME_MARKER) nmk++;
        if (st == ME_CIPHER) ncph++;
        if (st == ME_MARKER && prev != ME_MARKER) begin
          if (last_marker >= 0) chk(c - last_marker == MK_N + MK_B, "cycle length 136");
          if (last_marker >= 0) ncyc++;
          last_marker = c;
        end
        prev = st;
        @(posedge clk); #1;
      end
      chk(nmk == 12 * MK_N && ncph == 12 * MK_B, $sformatf("phase clocks %0d %0d", nmk, ncph));
      chk(ncyc == 11, "cycles seen");
      rst = 1; @(posedge clk); #1;
    end
    rst = 0; #1;
    chk(st == ME_INIT, "reset goes to INIT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
