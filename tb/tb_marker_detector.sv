// Self-checking testbench of marker_detector (nine windows over data bits
// 15..0). For each window j the marker is placed at bits j+6..j-1 for two
// check pulses; on apply the detector must decide window j with MSNum j+3
// (4..12) and clear its counters. Also: one sighting is not enough, two
// windows at COUNT_MAX at once are ambiguous (no decision, MSNum 8, counters
// cleared), and random data with no marker never decides.
module tb_marker_detector;
  logic clk = 0;
  always #5 clk = ~clk;
  logic clr, check, apply, decided;
  logic [15:0] data;
  logic [8:0] match, hit;
  logic [3:0] win, msn;
  int checks = 0, failures = 0;

  marker_detector dut (.clk_i(clk), .clr_i(clr), .check_i(check), .apply_i(apply),
    .data_i(data), .match_o(match), .hit_o(hit), .decided_o(decided),
    .window_o(win), .msnum_o(msn));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // data with the marker 00000001 (bit j-1 set, j+6..j clear) in window j only
  function automatic logic [15:0] place(int j);
    logic [15:0] d;
    do begin
      d = 16'($urandom);
      d[j+6 -: 8] = 8'h01;
    end while (count_markers(d) != 1);
    return d;
  endfunction
  function automatic int count_markers(logic [15:0] d);
    int n = 0;
    for (int j = 0; j < 9; j++) if (d[j +: 8] == 8'h01) n++;
    return n;
  endfunction

  task automatic pulse(bit c, bit a);
    check = c; apply = a; #1;
  endtask

  initial begin
    clr = 1; check = 0; apply = 0; data = 0;
    @(posedge clk); #1; clr = 0;
    for (int rep = 0; rep < 4; rep++)
      for (int j = 1; j <= 9; j++) begin
        int jj;
        jj = (rep == 0) ? j : $urandom_range(1, 9);
        // two sightings, each followed by an apply
        for (int s = 0; s < 2; s++) begin
          data = place(jj); pulse(1, 0);
          chk(match == 9'(1 << (jj - 1)), "match vector");
          @(posedge clk); #1;
          data = 16'($urandom); pulse(0, 1);
          if (s == 0) chk(!decided && msn == 8, "one sighting is not enough");
          else begin
            chk(decided && win == 4'(jj) && msn == 4'(jj + 3),
                $sformatf("window %0d decided %0b win %0d msnum %0d", jj, decided, win, msn));
          end
          @(posedge clk); #1; pulse(0, 0);
        end
        chk(hit == 0, "counters cleared after decision");
      end
    // ambiguous: windows 2 and 7 both reach COUNT_MAX
    repeat (2) begin
      data = place(2); pulse(1, 0); @(posedge clk); #1;
      data = place(7); pulse(1, 0); @(posedge clk); #1;
    end
    pulse(0, 1);
    chk(hit == 9'b001000010, "two windows at COUNT_MAX");
    chk(!decided && win == 0 && msn == 8, "ambiguous: no decision");
    @(posedge clk); #1; pulse(0, 0);
    chk(hit == 0, "ambiguous: counters cleared");
    // no marker
    for (int c = 0; c < 500; c++) begin
      do data = 16'($urandom); while (count_markers(data) != 0);
      pulse(1'($urandom), 1'($urandom));
      chk(!decided && msn == 8, "no marker, no decision");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
