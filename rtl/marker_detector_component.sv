// One marker detector component: marker comparator, window counter and
// counter comparator for one 8-bit window of the receiver's data register.
//
// out_check_o is the marker comparator: 0 when the window holds the marker,
// 1 otherwise. For the marker "10000000" (window value 8'h01, bit 0 received
// first) this is the NOT of bit 0 ORed with bits 7..1. The window counter
// counts up by one on a clock with en_i set (the controller sets it at a check
// when out_check_o is 0); clr_i clears it synchronously and wins over en_i.
// The counter saturates at COUNT_MAX, and out_wincounter_o is 1 while it
// equals COUNT_MAX. Saturation is this design's choice; the document only
// says the counter holds when the marker is absent.
module marker_detector_component #(
  parameter logic [7:0]  MARKER    = 8'h01,
  parameter int unsigned COUNT_MAX = 2
) (
  input  logic       clk_i,          // Clk_WC
  input  logic       clr_i,          // Clr_WC
  input  logic       en_i,           // EN_WC
  input  logic [7:0] window_i,
  output logic       out_check_o,    // 0: window holds the marker
  output logic       out_wincounter_o
);

  localparam int unsigned CW = $clog2(COUNT_MAX + 1);
  logic [CW-1:0] count_q;

  assign out_check_o = (window_i != MARKER);

  always_ff @(posedge clk_i) begin
    if (clr_i)                                        count_q <= '0;
    else if (en_i && count_q != CW'(COUNT_MAX))       count_q <= count_q + 1'b1;
  end

  assign out_wincounter_o = (count_q == CW'(COUNT_MAX));

endmodule
