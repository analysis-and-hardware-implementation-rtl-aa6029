// Self-checking testbench of marker_detector_component: random windows,
// enables and clears against a model of the saturating match counter
// (out_check = window differs from the marker, out_wincounter = count has
// reached COUNT_MAX = 2).
module tb_marker_detector_component;
  logic clk = 0;
  always #5 clk = ~clk;
  logic clr, en, oc, ow;
  logic [7:0] w;
  int checks = 0, failures = 0;

  marker_detector_component dut (.clk_i(clk), .clr_i(clr), .en_i(en), .window_i(w),
    .out_check_o(oc), .out_wincounter_o(ow));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cnt = 0, nhit = 0;
    clr = 1; en = 0; w = 0;
    @(posedge clk); #1; clr = 0;
    for (int c = 0; c < 4000; c++) begin
      w = ($urandom_range(0, 2) == 0) ? 8'h01 : 8'($urandom);
      en = 1'($urandom) && (w == 8'h01);
      clr = ($urandom_range(0, 9) == 0);
      #1;
      chk(oc == (w != 8'h01), "out_check");
      chk(ow == (cnt == 2), "out_wincounter");
      if (ow) nhit++;
      @(posedge clk); #1;
      if (clr) cnt = 0; else if (en && cnt != 2) cnt++;
    end
    chk(nhit > 50, "counter reached COUNT_MAX");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
