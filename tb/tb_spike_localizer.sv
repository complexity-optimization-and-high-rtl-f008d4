// tb_spike_localizer: random candidate sets (maxima, time stamps, IDs and
// coordinates clustered so that some candidates are within R of each other
// and others are not) are loaded with `start`. A behavioural greedy model
// (largest remaining maximum first, lowest slot on ties, remove everything
// closer than R on both axes) gives the expected report sequence, which
// must appear one report per clock starting the clock after `start`, with
// `busy` falling the clock after the last report. Empty candidate sets must
// produce no report.
module tb_spike_localizer;
  import botm_pkg::*;
  localparam int NF = 6;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_multi = 0, n_supp = 0;
  logic start = 0;
  logic [7:0] part = 0;
  logic [NF-1:0] cand = '0;
  logic [NF-1:0][DISC_W-1:0] maxv = '0;
  logic [NF-1:0][TS_W-1:0] pts = '0;
  logic [NF-1:0][GID_W-1:0] gid = '0;
  logic [NF-1:0][XY_W-1:0] x = '0, y = '0;
  logic [XY_W-1:0] r = 16'd70;
  logic rep_valid;
  spike_t rep;
  logic busy;
  spike_localizer #(.NF(NF)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int exp_g [$];
      int exp_t [$];
      bit rem [NF];
      int nrem, w, k;
      exp_g.delete(); exp_t.delete();
      part = 8'($urandom % 8);
      for (int j = 0; j < NF; j++) begin
        cand[j] = ($urandom % 3) != 0;
        maxv[j] = DISC_W'(1 + $urandom % 200);
        pts[j]  = TS_W'($urandom);
        gid[j]  = GID_W'($urandom);
        x[j]    = XY_W'(1000 + ($urandom % 3) * 100 + $urandom % 60);
        y[j]    = XY_W'(1000 + ($urandom % 2) * 100 + $urandom % 60);
      end
      if (n % 50 == 0) cand = '0;
      // model
      nrem = 0;
      for (int j = 0; j < NF; j++) begin rem[j] = cand[j]; nrem += int'(cand[j]); end
      while (nrem > 0) begin
        w = -1;
        for (int j = 0; j < NF; j++) if (rem[j] && (w < 0 || int'(maxv[j]) > int'(maxv[w]))) w = j;
        exp_g.push_back(int'(gid[w])); exp_t.push_back(int'(signed'(pts[w])));
        for (int j = 0; j < NF; j++) begin
          int dx, dy;
          dx = int'(x[j]) - int'(x[w]);
          dy = int'(y[j]) - int'(y[w]);
          if (dx < 0) dx = -dx;
          if (dy < 0) dy = -dy;
          if (rem[j] && (j == w || (dx < int'(r) && dy < int'(r)))) begin
            rem[j] = 0; nrem--;
            if (j != w) n_supp++;
          end
        end
      end
      if (exp_g.size() > 1) n_multi++;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      k = 0;
      // reports arrive on consecutive clocks
      for (int c = 0; c < NF + 3; c++) begin
        if (rep_valid) begin
          checks++;
          if (k >= exp_g.size() || c != k + 1 || int'(rep.gid) != exp_g[k] || rep.ts != TS_W'(exp_t[k]) || rep.part != part)
          begin
            failures++;
            if (failures < 4) $display("n%0d c%0d k%0d got g%0d t%0d exp g%0d t%0d size %0d", n, c, k, rep.gid, rep.ts, exp_g[k], exp_t[k], exp_g.size());
          end
          k++;
        end
        if (!busy) break;
        @(posedge clk); #1;
      end
      checks++;
      if (k != exp_g.size() || busy) failures++;
    end
    $display("sets with several regions %0d, suppressed neighbours %0d", n_multi, n_supp);
    checks++; if (n_multi < 20 || n_supp < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
