// Self-checking testbench of scfb_controller. The window-match input is
// driven randomly; a state model checks the state every clock and the clock
// counts of each phase: Load_PC 1, Shift_KSG1 256, NewIVCollect 96,
// Load_NewIV 1, Shift_KSG2 256, Load_KSG2 1. Also checked: a match is
// ignored until 8 bits have entered the window after CTGen is entered, the
// init LED, the output/collect enables per state, the plaintext generator
// selects, and that reset returns to INIT from any state.
module tb_scfb_controller;
  import grain128_pkg::*;
  import scfb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic reset, wm, led, sync, phold;
  logic [7:0] flag;
  logic [1:0] psel;
  scfb_ctrl_t ctrl;
  scfb_state_e st;
  int checks = 0, failures = 0;

  scfb_controller dut (.clk_i(clk), .reset_i(reset), .flag_i(flag), .window_match_i(wm),
    .ctrl_o(ctrl), .plt_sel_o(psel), .plt_hold_o(phold), .led_init_o(led),
    .state_o(st), .sync_found_o(sync));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    scfb_state_e ms;
    int cnt, nct, nsync, visits[8];
    reset = 1; flag = 0; wm = 0;
    @(posedge clk); #1; reset = 0;
    ms = ST_INIT; cnt = 0; nct = 0; nsync = 0;
    foreach (visits[i]) visits[i] = 0;
    for (int c = 0; c < 20000; c++) begin
      scfb_state_e nx;
      wm = ($urandom_range(0, 29) == 0);
      flag = (c > 5 && $urandom_range(0, 3) == 0) ? FLAG_READY : 8'($urandom_range(0, 254));
      reset = ($urandom_range(0, 4999) == 0);
      #1;
      chk(st == ms, $sformatf("clk %0d state %0d exp %0d", c, st, ms));
      visits[ms]++;
      chk(led == (ms inside {ST_INIT, ST_LOAD_PC, ST_SHIFT_KSG1}), "init led");
      chk(ctrl.out_data == !(ms inside {ST_INIT, ST_LOAD_PC, ST_SHIFT_KSG1}), "output enable");
      chk(ctrl.collect_iv == (ms == ST_NEWIV_COLL), "collect enable");
      chk(ctrl.scan_en == (ms == ST_CTGEN), "scan enable");
      chk(psel == (ms == ST_INIT ? 2'b11 : ms inside {ST_LOAD_PC, ST_SHIFT_KSG1} ? 2'b00 : 2'b01),
          "plaintext generator select");
      nx = ms;
      case (ms)
        ST_INIT:       if (flag == FLAG_READY) nx = ST_LOAD_PC;
        ST_LOAD_PC:    nx = ST_SHIFT_KSG1;
        ST_SHIFT_KSG1: if (cnt == 255) nx = ST_CTGEN;
        ST_CTGEN:      if (wm && nct >= 7) nx = ST_NEWIV_COLL;
        ST_NEWIV_COLL: if (cnt == 95) nx = ST_LOAD_NEWIV;
        ST_LOAD_NEWIV: nx = ST_SHIFT_KSG2;
        ST_SHIFT_KSG2: if (cnt == 255) nx = ST_LOAD_KSG2;
        ST_LOAD_KSG2:  nx = ST_CTGEN;
        default: ;
      endcase
      chk(sync == (ms == ST_CTGEN && nx == ST_NEWIV_COLL), "sync strobe");
      if (sync) begin nsync++; chk(nct >= 7, "match ignored before 8 bits"); end
      if (ms == ST_CTGEN) nct++; else nct = 0;
      if (reset) nx = ST_INIT;
      cnt = (nx == ms) ? cnt + 1 : 0;
      ms = nx;
      @(posedge clk); #1;
    end
    foreach (visits[i]) chk(visits[i] > 0, $sformatf("state %0d visited", i));
    chk(nsync > 10, $sformatf("syncs %0d", nsync));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
