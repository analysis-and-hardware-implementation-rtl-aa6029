// The three counters of the SCFB controller.
//
// SyncPattern_COUNTER counts ciphertext bits shifted into the sync pattern
// window since scanning restarted and holds at SYNC_N, so that the window is
// compared only once it is filled with fresh bits. NewIV_COUNTER counts the
// collected new-IV bits. SETUP_COUNTER counts the 256 initialization clocks
// of KSG1 (at start-up) or KSG2 (every setup phase). Each counter has a
// synchronous clear (priority) and a count enable. The counting rules are the
// document's; the widths and the clear-over-enable priority are this design's.
module scfb_counters #(
  parameter int unsigned SYNC_N   = 8,
  parameter int unsigned IV_BITS  = 96,
  parameter int unsigned SETUP_CLOCKS = 256
) (
  input  logic clk_i,
  input  logic sp_clr_i, sp_en_i,
  input  logic iv_clr_i, iv_en_i,
  input  logic su_clr_i, su_en_i,
  output logic [$clog2(SYNC_N+1)-1:0]     sp_count_o,
  output logic [$clog2(IV_BITS+1)-1:0]    iv_count_o,
  output logic [$clog2(SETUP_CLOCKS+1)-1:0] su_count_o
);

  localparam int unsigned SPW = $clog2(SYNC_N+1);

  always_ff @(posedge clk_i) begin
    if (sp_clr_i)                                  sp_count_o <= '0;
    else if (sp_en_i && sp_count_o != SPW'(SYNC_N)) sp_count_o <= sp_count_o + 1'b1;

    if (iv_clr_i)     iv_count_o <= '0;
    else if (iv_en_i) iv_count_o <= iv_count_o + 1'b1;

    if (su_clr_i)     su_count_o <= '0;
    else if (su_en_i) su_count_o <= su_count_o + 1'b1;
  end

endmodule
