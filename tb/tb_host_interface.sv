// Self-checking testbench of host_interface (EPP-style parallel port).
// A host model performs address and data write/read cycles with random
// timing: strobe low, wait for pwait high, strobe high, wait for pwait low.
// Checked: all registers written with random values read back, writes to
// addresses beyond the register file are ignored and read as 0, the address
// register reads back, pwait rises within 4 clocks of a strobe (2-flop
// synchronizer plus one clock), the board drives the bus only on reads, and
// reset clears the registers.
module tb_host_interface;
  localparam int N = 45;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, astb, dstb, pwr, oe, pwait;
  logic [7:0] pin, pout;
  logic [7:0] regs [N];
  int checks = 0, failures = 0;

  host_interface #(.NUM_REGS(N)) dut (.clk_i(clk), .rst_i(rst), .astb_n_i(astb),
    .dstb_n_i(dstb), .pwr_i(pwr), .pdb_i(pin), .pdb_o(pout), .pdb_oe_o(oe),
    .pwait_o(pwait), .regs_o(regs));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one EPP cycle; is_addr selects astb, rd selects read
  task automatic cyc(bit is_addr, bit rd, logic [7:0] wdata, output logic [7:0] rdata);
    int n;
    n = 0;
    pwr = rd; pin = wdata;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #2;
    if (is_addr) astb = 0; else dstb = 0;
    while (!pwait) begin @(posedge clk); #1; n++; end
    chk(n <= 4, $sformatf("pwait after %0d clocks", n));
    chk(oe == rd, "bus drive only on read");
    rdata = pout;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #2;
    astb = 1; dstb = 1;
    while (pwait) @(posedge clk);
    #1;
    chk(!oe, "bus released");
  endtask

  initial begin
    logic [7:0] model [N];
    logic [7:0] r;
    rst = 1; astb = 1; dstb = 1; pwr = 0; pin = 0;
    repeat (3) @(posedge clk); #1; rst = 0;
    foreach (regs[i]) chk(regs[i] == 0, "reset value");
    foreach (model[i]) model[i] = 0;
    for (int t = 0; t < 400; t++) begin
      int a;
      logic [7:0] d;
      a = $urandom_range(0, N + 4);
      d = 8'($urandom);
      cyc(1, 0, 8'(a), r);
      if ($urandom_range(0, 1)) begin
        cyc(0, 0, d, r);
        if (a < N) model[a] = d;
      end else begin
        cyc(0, 1, 8'hxx, r);
        chk(r == ((a < N) ? model[a] : 8'h00), $sformatf("read reg %0d", a));
        cyc(1, 1, 8'hxx, r);
        chk(r == 8'(a), "address read back");
      end
    end
    foreach (regs[i]) chk(regs[i] == model[i], $sformatf("reg %0d", i));
    rst = 1; @(posedge clk); #1; rst = 0;
    foreach (regs[i]) chk(regs[i] == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
