// Self-checking testbench of scfb_counters: random clear/enable patterns on
// the sync-pattern, IV and setup counters against a software model,
// including saturation of the sync-pattern counter at n = 8 and a full
// 0..255 run of the setup counter.
module tb_scfb_counters;
  logic clk = 0;
  always #5 clk = ~clk;
  logic spc, spe, ivc, ive, suc, sue;
  logic [3:0] sp; logic [6:0] iv; logic [8:0] su;
  int checks = 0, failures = 0;

  scfb_counters dut (.clk_i(clk), .sp_clr_i(spc), .sp_en_i(spe), .iv_clr_i(ivc),
    .iv_en_i(ive), .su_clr_i(suc), .su_en_i(sue), .sp_count_o(sp),
    .iv_count_o(iv), .su_count_o(su));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int msp, miv, msu;
    spc = 1; ivc = 1; suc = 1; spe = 0; ive = 0; sue = 0;
    @(posedge clk); #1;
    msp = 0; miv = 0; msu = 0;
    chk(sp == 0 && iv == 0 && su == 0, "clear");
    for (int c = 0; c < 3000; c++) begin
      spc = ($urandom_range(0, 19) == 0); spe = 1'($urandom);
      ivc = ($urandom_range(0, 49) == 0); ive = 1'($urandom);
      suc = (c < 1000) ? ($urandom_range(0, 99) == 0) : (c == 1000); sue = (c >= 1000) ? 1 : 1'($urandom);
      @(posedge clk); #1;
      if (spc) msp = 0; else if (spe && msp != 8) msp++;
      if (ivc) miv = 0; else if (ive) miv = (miv + 1) % 128;
      if (suc) msu = 0; else if (sue) msu = (msu + 1) % 512;
      chk(sp == 4'(msp), "sync-pattern counter");
      chk(iv == 7'(miv), "IV counter");
      chk(su == 9'(msu), "setup counter");
      if (c == 1256) chk(su == 256, "setup counter counts 256 clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
