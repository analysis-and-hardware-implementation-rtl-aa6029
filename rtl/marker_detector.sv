// Marker detector of the marker-based receiver.
//
// The 16 lowest bits of the data register (bit 0 oldest) form 2k+1 = 9
// overlapping 8-bit windows: window j (1..9) is bits j+6 down to j-1. Window
// 5 is the expected marker position; windows 1-4 mean the marker arrived 4..1
// bits early (bits slipped), windows 6-9 that it arrived 1..4 bits late
// (bits inserted). On check_i every component whose window holds the marker
// counts once. On apply_i, if exactly one window counter has reached
// COUNT_MAX, that window is taken as the marker position: decided_o is set and
// msnum_o = window + 3 is the number of bits the next marker phase must take
// (4 for window 1 up to 12 for window 9). If any counter has reached COUNT_MAX
// on apply_i, all counters are cleared. If none or more than one has, msnum_o
// is the nominal 8. The window table and COUNT_MAX follow the document; the
// clear-on-ambiguity rule is this design's reading of it. COUNT_MAX is a
// parameter (default MK_COUNT_MAX = 2, the document's choice) so that the
// values 1, 5, 10 and 20 the document compares can be built too; MARKER
// (default MK_MARKER, "10000000") likewise for its other marker formats.
module marker_detector
  import marker_pkg::*;
#(
  parameter int unsigned COUNT_MAX = MK_COUNT_MAX, // sightings needed for a decision
  parameter logic [7:0]  MARKER    = MK_MARKER     // bit 0 received first
) (
  input  logic        clk_i,
  input  logic        clr_i,
  input  logic        check_i,
  input  logic        apply_i,
  input  logic [15:0] data_i,          // data register bits 15..0
  output logic [MK_WINDOWS-1:0] match_o,  // window j-1 holds the marker now
  output logic [MK_WINDOWS-1:0] hit_o,    // window counter j-1 at COUNT_MAX
  output logic        decided_o,
  output logic [3:0]  window_o,        // decided window 1..9, 0 if none
  output logic [3:0]  msnum_o
);

  logic [MK_WINDOWS-1:0] out_check;
  logic clr_all;
  int unsigned nhits;

  assign clr_all = clr_i || (apply_i && (|hit_o));

  for (genvar j = 0; j < MK_WINDOWS; j++) begin : g_win
    marker_detector_component #(.MARKER(MARKER), .COUNT_MAX(COUNT_MAX)) u_comp (
      .clk_i, .clr_i(clr_all), .en_i(check_i && !out_check[j]),
      .window_i(data_i[j +: 8]), .out_check_o(out_check[j]),
      .out_wincounter_o(hit_o[j])
    );
  end

  assign match_o = ~out_check;

  always_comb begin
    nhits    = 0;
    window_o = '0;
    for (int unsigned j = 0; j < MK_WINDOWS; j++)
      if (hit_o[j]) begin
        nhits    = nhits + 1;
        window_o = 4'(j + 1);
      end
    decided_o = apply_i && (nhits == 1);
    if (!decided_o) window_o = '0;
    msnum_o   = decided_o ? 4'(window_o + 4'd3) : 4'(MK_N);
  end

endmodule
