// Self-checking testbench of scfb_board_top (SCFB board: host registers plus
// the encryption/decryption system). The host model writes key, IV and
// plaintext-generator IV of the published Grain-128 vector 2 through the
// parallel port (registers 0-15 key, 16-27 IV, 28-43 plaintext IV, 44 flag;
// first byte holds bits 0-7, MSB = lowest bit index), reads them back, then
// writes FF to the flag register. With a zero plaintext IV the plaintext is
// all zero, so the 128 line bits after the 1 + 256 setup clocks must be the
// published keystream. With the loopback the comparator LED must stay on,
// the init LEDs must be on exactly during setup, and the reset button must
// return everything to INIT (LEDs on, flag cleared).
module tb_scfb_board_top;
  logic clk = 0;
  always #5 clk = ~clk;

  logic btn, astb, dstb, pwr, oe, pwait, comp, ltr, lre, tx, plt, dre;
  logic [7:0] pdi, pdo;
  int checks = 0, failures = 0;

  scfb_board_top dut (.mclk(clk), .btn_reset(btn), .astb(astb), .dstb(dstb), .pwr(pwr),
    .pdb_i(pdi), .pdb_o(pdo), .pdb_oe(oe), .pwait(pwait), .led_comp(comp),
    .init_led_tr(ltr), .init_led_re(lre), .tx_o(tx), .rx_i(tx), .pltout_o(plt),
    .dout_re_o(dre));

  epp_host u_host (.clk(clk), .astb(astb), .dstb(dstb), .pwr(pwr), .pdb(pdi),
    .pdb_brd(pdo), .pdb_oe(oe), .pwait(pwait));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] key = 128'h0123456789abcdef123456789abcdef0;
    logic [95:0]  iv  = 96'h0123456789abcdef12345678;
    logic [127:0] z, zexp = 128'hdb032aff3788498b57cb894fffb6bb96;
    logic [7:0] r;
    int n;
    btn = 1; repeat (3) @(posedge clk); #1; btn = 0;
    for (int i = 0; i < 16; i++) u_host.write_reg(8'(i), key[127 - 8*i -: 8]);
    for (int i = 0; i < 12; i++) u_host.write_reg(8'(16 + i), iv[95 - 8*i -: 8]);
    for (int i = 0; i < 16; i++) u_host.write_reg(8'(28 + i), 8'h00);
    for (int i = 0; i < 16; i++) begin
      u_host.read_reg(8'(i), r);
      chk(r == key[127 - 8*i -: 8], $sformatf("key register %0d read back", i));
    end
    chk(ltr && lre && tx == 1'b1, "idle before flag");
    u_host.write_reg(8'd44, 8'hFF);
    // wait for the end of the setup phase (the host cycle itself ends a few
    // clocks after the flag register was written)
    n = 0;
    while (ltr && n < 400) begin chk(tx == 1'b1 && comp, "setup"); @(posedge clk); #1; n++; end
    chk(n >= 250 && n <= 258, $sformatf("setup lasted %0d clocks", n));
    for (int i = 0; i < 128; i++) begin
      z[127 - i] = tx;
      chk(comp, "comparator");
      @(posedge clk); #1;
    end
    chk(z == zexp, $sformatf("line bits %h", z));
    for (int i = 0; i < 4000; i++) begin
      chk(comp && !ltr && !lre && plt == 1'b0 && dre == 1'b0, "steady state");
      @(posedge clk); #1;
    end
    btn = 1; @(posedge clk); #1; btn = 0; @(posedge clk); #1;
    chk(ltr && lre, "reset returns to INIT");
    u_host.read_reg(8'd44, r);
    chk(r == 8'h00, "flag cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
