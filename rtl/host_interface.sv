// Host register interface in the style of the Digilent parallel-port
// (EPP-like) protocol used to load keys, IVs and the start flag.
//
// It holds an 8-bit address register and NUM_REGS 8-bit data registers. The
// host runs four kinds of transfer cycles: address write, address read, data
// write and data read. A cycle starts when the host pulls astb_n (address) or
// dstb_n (data) low with pwr giving the direction (1 read, 0 write); the
// interface performs the transfer, raises pwait, and drops pwait once the
// host has released the strobe. During a read the interface drives pdb_o and
// asserts pdb_oe; the tri-state pad itself is outside this module. Strobes
// and pwr pass through two-flop synchronizers, so a cycle takes a few mclk
// periods. Writes to addresses at or above NUM_REGS are ignored and read as 0.
// rst_i clears all registers. The register set and signal names follow the
// document; the strobe polarity, handshake order and synchronizers are this
// design's choice.
module host_interface #(
  parameter int unsigned NUM_REGS = 45
) (
  input  logic       clk_i,      // mclk
  input  logic       rst_i,
  input  logic       astb_n_i,   // astb
  input  logic       dstb_n_i,   // dstb
  input  logic       pwr_i,      // pwr: 1 read, 0 write
  input  logic [7:0] pdb_i,      // pdb, host to board
  output logic [7:0] pdb_o,      // pdb, board to host
  output logic       pdb_oe_o,   // board drives pdb
  output logic       pwait_o,    // pwait
  output logic [7:0] regs_o [NUM_REGS]
);

  typedef enum logic [0:0] {IF_READY, IF_RELEASE} if_state_e;

  logic [1:0] astb_sync, dstb_sync, pwr_sync;
  logic       astb, dstb, pwr;
  logic [7:0] addr_q;
  logic [7:0] rd_data;
  if_state_e  st_q;

  always_ff @(posedge clk_i) begin
    astb_sync <= {astb_sync[0], ~astb_n_i};
    dstb_sync <= {dstb_sync[0], ~dstb_n_i};
    pwr_sync  <= {pwr_sync[0],  pwr_i};
  end
  assign astb = astb_sync[1];
  assign dstb = dstb_sync[1];
  assign pwr  = pwr_sync[1];

  always_comb begin
    rd_data = '0;
    for (int unsigned r = 0; r < NUM_REGS; r++)
      if (addr_q == 8'(r)) rd_data = regs_o[r];
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      st_q    <= IF_READY;
      addr_q  <= '0;
      pwait_o <= 1'b0;
      for (int unsigned r = 0; r < NUM_REGS; r++) regs_o[r] <= '0;
    end else begin
      unique case (st_q)
        IF_READY:
          if (astb || dstb) begin
            if (astb && !pwr) addr_q <= pdb_i;
            if (dstb && !pwr)
              for (int unsigned r = 0; r < NUM_REGS; r++)
                if (addr_q == 8'(r)) regs_o[r] <= pdb_i;
            pwait_o <= 1'b1;
            st_q    <= IF_RELEASE;
          end
        IF_RELEASE:
          if (!astb && !dstb) begin
            pwait_o <= 1'b0;
            st_q    <= IF_READY;
          end
        default: st_q <= IF_READY;
      endcase
    end
  end

  assign pdb_oe_o = pwr && (astb || dstb);
  assign pdb_o    = astb ? addr_q : rd_data;

endmodule
