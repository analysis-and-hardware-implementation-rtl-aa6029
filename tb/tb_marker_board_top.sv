// Self-checking testbench of marker_board_top (marker board: host registers
// plus the marker encryption/decryption system). The host model writes the
// keystream IV (registers 0-15), the plaintext IV (16-31), the marker 0x80
// (register 32, "10000000" written MSB first) and FF to the flag (33),
// then presses start. With the loopback: the line must carry 1, then seven
// 0s, then 128 ciphertext bits, repeating every 136 clocks, and match the
// software transmitter; the decrypted output must match the plaintext LFSR
// and the comparator LED must stay on. Reset clears the host registers.
module tb_marker_board_top;
  import marker_pkg::*;
  import grain_ref_pkg::*;
  import marker_model_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic btn, bstart, astb, dstb, pwr, oe, pwait, comp, tx, dpt, dptv;
  logic [7:0] pdi, pdo;
  int checks = 0, failures = 0;

  marker_board_top dut (.mclk(clk), .btn_reset(btn), .btn_start(bstart), .astb(astb),
    .dstb(dstb), .pwr(pwr), .pdb_i(pdi), .pdb_o(pdo), .pdb_oe(oe), .pwait(pwait),
    .led_comp(comp), .tx_o(tx), .rx_i(tx), .dpt_o(dpt), .dpt_valid_o(dptv));

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
    logic [127:0] ivk, ivp, kv, pv, q;
    marker_tx m;
    logic [7:0] r;
    int ndp;
    ivk = rand128(); ivp = rand128();
    // bit i of a vector is bit 7 - i%8 of byte i/8
    for (int i = 0; i < 128; i++) begin kv[127 - i] = ivk[i]; pv[127 - i] = ivp[i]; end
    btn = 1; bstart = 0; repeat (3) @(posedge clk); #1; btn = 0;
    for (int i = 0; i < 16; i++) u_host.write_reg(8'(i), kv[127 - 8*i -: 8]);
    for (int i = 0; i < 16; i++) u_host.write_reg(8'(16 + i), pv[127 - 8*i -: 8]);
    u_host.write_reg(8'd32, 8'h80);
    u_host.write_reg(8'd33, 8'hFF);
    u_host.read_reg(8'd32, r);
    chk(r == 8'h80, "marker register");
    repeat (10) begin @(posedge clk); #1; chk(tx == 1'b1, "idle ones before start"); end
    m = new(ivk, ivp, MK_MARKER);
    bstart = 1; @(posedge clk); #1; bstart = 0;
    m.running = 1;
    q = ivp; ndp = 0;
    for (int c = 0; c < 136 * 20; c++) begin
      chk(tx == m.next(), $sformatf("line bit %0d", c));
      if (c < 8) chk(tx == (c == 0), "marker 10000000");
      if (dptv) begin chk(dpt == q[0], "decrypted plaintext"); q = lfsr_step(q); ndp++; end
      chk(comp, "comparator");
      @(posedge clk); #1;
    end
    chk(ndp > 128 * 17, $sformatf("decrypted bits %0d", ndp));
    btn = 1; @(posedge clk); #1; btn = 0;
    u_host.read_reg(8'd33, r);
    chk(r == 8'h00, "reset clears the flag register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
