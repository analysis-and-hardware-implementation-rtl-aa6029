// Testbench of lfsr128: load, shift against the reference polynomial,
// clear codes and the asynchronous clear.
module tb_lfsr128;
  import grain_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic clr;
  logic [1:0] sel;
  logic [127:0] din, q, model;
  int checks = 0, failures = 0;

  lfsr128 dut (.clk_i(clk), .clr_i(clr), .sel_i(sel), .reg_in_i(din), .reg_out_o(q));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clr = 1; sel = 2'b00; din = '0;
    #2; chk(q == 0, "async clear");
    clr = 0;
    for (int t = 0; t < 6; t++) begin
      din = rand128(); sel = 2'b00; @(posedge clk); #1;
      chk(q == din, "load");
      model = din; sel = 2'b01;
      for (int i = 0; i < 300; i++) begin
        @(posedge clk); #1; model = lfsr_step(model);
        if (i % 50 == 49) chk(q == model, "shift");
      end
      sel = (t % 2) ? 2'b10 : 2'b11; @(posedge clk); #1;
      chk(q == 0, "clear code");
    end
    din = rand128(); sel = 2'b00; @(posedge clk); #1;
    sel = 2'b01; #2; clr = 1; #1;
    chk(q == 0, "async clear between clocks");
    clr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
