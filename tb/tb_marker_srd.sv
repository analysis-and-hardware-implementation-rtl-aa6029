// Workload testbench: synchronization recovery delay (SRD) of the marker
// receiver for COUNT_MAX = 1, 2, 5, 10 and 20 and the markers "10000000",
// "01111111" and "11111111", the grid the marker study compares. Fifteen
// marker_decryptor instances, one per (marker, COUNT_MAX), are fed by three
// software transmitters (one per marker, same IVs) through channels that
// apply the same events: 1..4 bits dropped or inserted (random size,
// direction and position) once every GAP cycles of 136 bits. Before the
// first marker the line carries 0 bits (own choice: with the transmitter
// model's idle 1s the all-ones marker would be seen in the idle). For every
// event and instance the SRD is the number of clocks from the event to the
// last wrongly decrypted bit before the next event; it includes the 140-clock
// receiver latency. The channel has no bit errors.
// Checked: for "10000000" every instance with COUNT_MAX >= 2 is error free
// for the last 5 cycles before each event (recovered), the mean SRD does not
// decrease from COUNT_MAX = 2 to 5 to 10 to 20, the complementary marker
// "01111111" also recovers for COUNT_MAX >= 2 and its mean SRD at COUNT_MAX = 2
// is within 10 % of that of "10000000", and "11111111" has a larger mean SRD
// than "10000000" at COUNT_MAX = 2 (the document's two marker findings). The
// other combinations and all means are printed, not checked: a marker that
// matches in several windows at once (all-ones) can keep the counters
// ambiguous for many cycles, and COUNT_MAX = 1 can move on one sighting.
module tb_marker_srd;
  import marker_pkg::*;
  import grain_ref_pkg::*;
  import marker_model_pkg::*;

  localparam int NF = 3;
  localparam int NI = 5;
  localparam int NEV = 8;
  localparam int GAP = 40;                 // cycles between events
  localparam int CYC = MK_N + MK_B;

  // COUNT_MAX of instance i and marker of format f (bit 0 first); constant
  // functions, so each generate instance gets a plain elaboration constant
  function automatic int unsigned cm(int i);
    case (i)
      0: return 1;
      1: return 2;
      2: return 5;
      3: return 10;
      default: return 20;
    endcase
  endfunction
  function automatic logic [7:0] mk(int f);
    case (f)
      0: return 8'h01;                     // "10000000"
      1: return 8'hFE;                     // "01111111"
      default: return 8'hFF;               // "11111111"
    endcase
  endfunction

  // marker of format f as a string in send order
  function automatic string mks(int f);
    string t;
    t = "";
    for (int b = 0; b < 8; b++) t = {t, mk(f)[b] ? "1" : "0"};
    return t;
  endfunction

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  logic [NF-1:0] din;
  logic [7:0] flag;
  logic [127:0] ivk, ivp;
  logic [NI-1:0] pt [NF], ptv [NF];
  int checks = 0, failures = 0;

  for (genvar f = 0; f < NF; f++) begin : g_f
    for (genvar i = 0; i < NI; i++) begin : g_dec
      marker_decryptor #(.COUNT_MAX(cm(i)), .MARKER(mk(f))) u_dec (.clk_i(clk),
        .rst_i(rst), .flag_i(flag), .iv_ksg_i(ivk), .din_i(din[f]), .pt_o(pt[f][i]),
        .pt_valid_o(ptv[f][i]), .state_o(), .decided_o(), .window_o(), .msnum_o());
    end
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #40000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    marker_tx m [NF];
    bit q [NF][$];
    bit p[];
    int vclk [NF][NI][$];                  // clock of each decrypted bit
    bit vbit [NF][NI][$];
    int ev_clk[NEV], ev_amt[NEV];
    int ev, total;
    real mean [NF][NI];
    rst = 1; flag = 0;
    ivk = rand128(); ivp = rand128();
    for (int f = 0; f < NF; f++) m[f] = new(ivk, ivp, mk(f));
    @(posedge clk); #1; rst = 0; flag = MK_FLAG_READY;
    ev = 0;
    foreach (ev_clk[i]) begin
      int s;
      ev_clk[i] = 20 + CYC * (GAP * i + 10) + $urandom_range(0, CYC - 1);
      s = $urandom_range(1, 4);
      ev_amt[i] = $urandom_range(0, 1) ? s : -s;
    end
    total = 20 + CYC * (GAP * NEV + 10);
    for (int c = 0; c < total; c++) begin
      if (c == 20) for (int f = 0; f < NF; f++) m[f].running = 1;
      if (ev < NEV && c == ev_clk[ev]) begin
        for (int f = 0; f < NF; f++)
          if (ev_amt[ev] < 0) repeat (-ev_amt[ev]) void'(m[f].next());
          else repeat (ev_amt[ev]) q[f].push_back(1'($urandom));
        ev++;
      end
      for (int f = 0; f < NF; f++) begin
        if (q[f].size() == 0) q[f].push_back(m[f].running ? m[f].next() : 1'b0);
        din[f] = q[f].pop_front();
      end
      #1;
      // the first clocks are skipped: registers are cleared only in INIT
      for (int f = 0; f < NF; f++)
        for (int i = 0; i < NI; i++)
          if (c >= 10 && ptv[f][i]) begin
            vclk[f][i].push_back(c); vbit[f][i].push_back(pt[f][i]);
          end
      @(posedge clk); #1;
    end
    m[0].ptstream(vbit[0][0].size() + 8 * CYC, p);
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < NI; i++) begin
        int sum, nrec;
        sum = 0; nrec = 0;
        for (int e = 0; e < NEV; e++) begin
          int lo, hi, last_bad, late_bad;
          lo = ev_clk[e];
          hi = (e + 1 < NEV) ? ev_clk[e + 1] : total;
          last_bad = lo; late_bad = 0;
          foreach (vbit[f][i][t]) begin
            if (vclk[f][i][t] > lo && vclk[f][i][t] < hi && vbit[f][i][t] != p[t]) begin
              last_bad = vclk[f][i][t];
              if (vclk[f][i][t] >= hi - 5 * CYC) late_bad++;
            end
          end
          sum += last_bad - lo;
          if (late_bad == 0) nrec++;
          if (f < 2 && cm(i) >= 2)
            chk(late_bad == 0, $sformatf("marker %s COUNT_MAX %0d event %0d not recovered",
                                         mks(f), cm(i), e));
        end
        mean[f][i] = real'(sum) / NEV;
        $display("marker %s COUNT_MAX %2d: mean SRD %7.1f bits, %0d of %0d events recovered",
                 mks(f), cm(i), mean[f][i], nrec, NEV);
      end
    end
    for (int i = 2; i < NI; i++)
      chk(mean[0][i] >= mean[0][i-1],
          $sformatf("SRD grows with COUNT_MAX (%0d vs %0d)", cm(i), cm(i-1)));
    chk(mean[0][1] > 0, "events caused errors");
    // complementary markers behave alike; all-ones is slower at COUNT_MAX = 2
    chk(mean[1][1] > 0.9 * mean[0][1] && mean[1][1] < 1.1 * mean[0][1],
        "complementary markers give similar SRD");
    chk(mean[2][1] > mean[0][1], "all-ones marker slower than 10000000");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
