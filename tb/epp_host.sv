// Testbench-only model of the host PC side of the EPP-style parallel port.
// write_reg/read_reg perform an address cycle followed by a data cycle:
// strobe low, wait until the board raises pwait, strobe high, wait until
// pwait drops. Strobes are active low, pwr = 1 marks a read. The board
// drives the data bus only while pdb_oe is high (modelled as separate
// in/out buses since the tristate pins live outside the design).
module epp_host (
  input  logic       clk,
  output logic       astb,
  output logic       dstb,
  output logic       pwr,
  output logic [7:0] pdb,       // host to board
  input  logic [7:0] pdb_brd,   // board to host
  input  logic       pdb_oe,
  input  logic       pwait
);
  initial begin astb = 1; dstb = 1; pwr = 0; pdb = 0; end

  task automatic strobe(bit is_addr, bit rd, logic [7:0] d, output logic [7:0] r);
    int n;
    pwr = rd; pdb = d;
    @(posedge clk); #2;
    if (is_addr) astb = 0; else dstb = 0;
    n = 0;
    while (!pwait && n < 20) begin @(posedge clk); #1; n++; end
    r = pdb_oe ? pdb_brd : 8'hzz;
    #1; astb = 1; dstb = 1;
    n = 0;
    while (pwait && n < 20) begin @(posedge clk); #1; n++; end
  endtask

  task automatic write_reg(logic [7:0] a, logic [7:0] d);
    logic [7:0] r;
    strobe(1, 0, a, r);
    strobe(0, 0, d, r);
  endtask

  task automatic read_reg(logic [7:0] a, output logic [7:0] d);
    logic [7:0] r;
    strobe(1, 0, a, r);
    strobe(0, 1, 8'h00, d);
  endtask
endmodule
