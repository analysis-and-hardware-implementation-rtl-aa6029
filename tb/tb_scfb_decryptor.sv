// Self-checking testbench of scfb_decryptor (SCFB decryption side).
// How: a software SCFB encryptor (scfb_model_pkg) produces the line signal
// from random plaintext (with sync patterns forced now and then); a channel
// model delays the line by d bits and can drop (slip) or insert bits. The
// DUT output and state are compared every clock with a software decryptor
// fed with the same line bits. Recovery is checked against the plaintext
// itself: the channel is started misaligned (d = 2, so the receiver's setup
// ends 2 clocks early), then a slip and an insertion are applied; after each
// event the decrypted bits must return to error free, and the 300 bits
// before the next event must all be correct.
module tb_scfb_decryptor;
  import grain128_pkg::*;
  import scfb_pkg::*;
  import grain_ref_pkg::*;
  import scfb_model_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic reset, din, dout, led, sync;
  logic [7:0] flag;
  fsr_t key;
  iv_t iv;
  scfb_state_e st;
  int checks = 0, failures = 0;

  scfb_decryptor dut (.clk_i(clk), .reset_i(reset), .flag_i(flag), .key_i(key),
    .iv_i(iv), .datain_i(din), .dout_o(dout), .led_init_o(led), .state_o(st),
    .sync_found_o(sync));

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

  localparam int SEG = 4000;
  localparam int NSEG = 4;

  initial begin
    scfb_model enc, dec;
    scfb_state_e es_e, es_d;
    bit eo, dm, pt;
    int fc, ok_run, seg_bad;
    int qsrc[$];          // per line bit: encryptor clock it came from, -1 inserted/idle
    bit qbit[$];
    bit pt_hist[int];
    int src;
    int err_after[NSEG];
    reset = 1; flag = 0; fc = 0;
    foreach (err_after[i]) err_after[i] = 0;
    key = rand128(); iv = rand128()[95:0];
    @(posedge clk); #1; reset = 0;
    enc = new(1'b0, key, iv);
    dec = new(1'b1, key, iv);
    // initial misalignment: two idle bits already on the line
    repeat (2) begin qbit.push_back(1'b1); qsrc.push_back(-1); end
    for (int c = 0; c < SEG * NSEG; c++) begin
      flag = FLAG_READY;
      // encryptor side
      pt = 1'($urandom);
      if (enc.st == ST_CTGEN && fc == 0 && $urandom_range(0, 149) == 0) fc = 8;
      if (enc.st != ST_CTGEN) fc = 0;
      if (fc > 0) begin pt = (fc == 8) ^ enc.g.pre_output(); fc--; end
      enc.step(pt, flag, 1'b0, es_e, eo);
      pt_hist[c] = (es_e >= ST_CTGEN) ? pt : 1'b1;
      qbit.push_back(eo); qsrc.push_back(es_e >= ST_CTGEN ? c : -1);
      // channel events at segment boundaries
      if (c == SEG)     begin void'(qbit.pop_front()); void'(qsrc.pop_front()); end
      if (c == 2 * SEG) begin qbit.push_front(1'($urandom)); qsrc.push_front(-1); end
      if (c == 3 * SEG) begin void'(qbit.pop_front()); void'(qsrc.pop_front());
                              void'(qbit.pop_front()); void'(qsrc.pop_front()); end
      din = qbit.pop_front(); src = qsrc.pop_front();
      #1;
      dec.step(din, flag, 1'b0, es_d, dm);
      chk(st == es_d, $sformatf("clk %0d state %0d exp %0d", c, st, es_d));
      chk(dout == dm, $sformatf("clk %0d dout %0b exp %0b", c, dout, dm));
      chk(sync == (es_d == ST_CTGEN && dec.st == ST_NEWIV_COLL), "sync strobe");
      chk(led == (es_d inside {ST_INIT, ST_LOAD_PC, ST_SHIFT_KSG1}), "init led");
      // plaintext recovery in the last 300 clocks of each segment
      if (c % SEG >= SEG - 300) begin
        chk(src >= 0 && dout == pt_hist[src],
            $sformatf("segment %0d clk %0d not recovered", c / SEG, c));
      end
      if (c % SEG < 1000 && src >= 0 && dout != pt_hist[src]) err_after[c / SEG]++;
      @(posedge clk); #1;
    end
    // each channel event (and the initial offset) must really have hurt
    for (int i = 0; i < NSEG; i++) begin
      $display("segment %0d: %0d wrong bits after the event", i, err_after[i]);
      chk(err_after[i] > 0, $sformatf("event %0d caused no errors", i));
    end
    $display("encryptor syncs %0d, decryptor syncs %0d reloads %0d",
             enc.syncs, dec.syncs, dec.reloads);
    chk(dec.reloads >= 8, "decryptor resynchronized repeatedly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
