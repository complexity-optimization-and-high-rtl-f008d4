// tb_botm_full: one complete run of the spike sorter at its default size
// (1024 electrodes, 8 partitions x 82 filter slots, 5 electrodes per
// neuron, 50-tap templates, minimal detection window 10) with the default
// 500 Hz - 3 kHz band-pass in the path.
//
// Six neuron slots in partitions 0 and 1 are configured; the rest stay
// invalid. Each neuron's matched-filter coefficients are its template after
// the band-pass (computed here by running the same fixed-point recursion
// over the template) divided by 256, and its constant is minus half the
// resulting energy, so a full-size spike drives its discriminant clearly
// above zero. Noise and spikes are injected into the raw electrode stream.
// A behavioural model recomputes band-pass, filter sums, discriminants,
// windows, localization and marginal acceptance, and the design's
// accepted spikes must match it exactly. Each fold must take
// N_P*(E*T+E+6) clocks when nothing is reported.
module tb_botm_full;
  import botm_pkg::*;
  localparam int NE = N_ELEC_D, NP = 2, NF = 3, E = E_D, T = T_D;
  localparam int NS = 230, W = T + 2, SH = 12;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [9:0] in_elec = 0;
  logic signed [ADC_W-1:0] in_data = 0;
  cfg_wr_t cfg = '0;
  logic spk_valid, overrun, busy;
  spike_t spk;
  botm_top dut (.*);

  // ---------------- scenario tables -------------------------------------
  int x [NS][NE];
  int emap [NP][NF][E];
  int gidt [NP][NF];
  int px [NP][NF], py [NP][NF];
  int coef [NP][NF][E][T];
  int cst [NP][NF];
  int shape [T];
  int tapv [NS][NE];     // band-passed stream, as the taps hold it
  int bpt [NP][NF][E][T]; // band-passed template
  int amp [NP][NF][E];
  int cfrac [NP][NF];       // constant = -energy * cfrac / 10
  int ldw = L_DW_MIN_D;

  // ---------------- model state -----------------------------------------
  bit act [NP]; int cnt [NP]; int mx [NP][NF]; int mt [NP][NF];
  bit mvalid;
  int mmask [1024]; int mfirst [1024]; int mneed [1024];
  typedef struct { int gid; int ts; int part; int at; } ev_t;
  ev_t expq [$], gotq [$];
  int n_win = 0, n_stretch = 0, n_supp = 0, n_multi = 0, n_macc = 0, n_mrej = 0, n_reconf = 0;
  int cur_frame = -1;

  always @(posedge clk)
    if (spk_valid) gotq.push_back('{int'(spk.gid), int'(spk.ts), int'(spk.part), cur_frame});

  task automatic cfgw(cfg_target_e tg, int p, int j, int s, int idx, int v);
    cfg.we = 1; cfg.target = tg; cfg.part = 8'(p); cfg.filt = 8'(j); cfg.slot = 4'(s);
    cfg.idx = 16'(idx); cfg.data = 32'(v);
    @(posedge clk); #1 cfg.we = 0;
  endtask

  function automatic int energy(int p, int j);
    int e = 0;
    for (int s = 0; s < E; s++) for (int k = 0; k < T; k++) e += bpt[p][j][s][k] * (bpt[p][j][s][k] / 256);
    return e;
  endfunction

  task automatic load_neuron(int p, int j);
    for (int s = 0; s < E; s++) begin
      cfgw(CFG_MAP, p, j, s, 0, emap[p][j][s]);
      bp_template(p, j, s);
      for (int k = 0; k < T; k++) begin
        coef[p][j][s][k] = bpt[p][j][s][T - 1 - k] / 256;
        cfgw(CFG_COEF, p, j, s, k, coef[p][j][s][k]);
      end
    end
    cst[p][j] = -((energy(p, j) >>> SH) * cfrac[p][j] / 10);
    cfgw(CFG_CONST, p, j, 0, 0, cst[p][j]);
    $display("neuron %0d/%0d: constant %0d", p, j, cst[p][j]);
    cfgw(CFG_NXY, p, j, 0, 0, (px[p][j] << 16) | py[p][j]);
  endtask

  // fixed-point band-pass recursion, identical in arithmetic to the design
  longint bw1 [NE], bw2 [NE];
  function automatic longint sat(longint v, int bits);
    longint hi = (longint'(1) <<< (bits-1)) - 1;
    if (v > hi) return hi;
    if (v < -hi-1) return -hi-1;
    return v;
  endfunction
  function automatic longint bq(ref longint w1, ref longint w2, input longint xv);
    longint w, y;
    w = sat(((xv <<< 22) - (longint'(BQ_A1_D) * w1 + longint'(BQ_A2_D) * w2)) >>> 14, BQ_ST_W);
    y = sat((longint'(BQ_B0_D) * w + longint'(BQ_B1_D) * w1 + longint'(BQ_B2_D) * w2) >>> 14, TAP_W);
    w2 = w1; w1 = w;
    return y;
  endfunction
  task automatic bp_template(int p, int j, int s);
    longint a = 0, b = 0;
    for (int k = 0; k < T; k++) bpt[p][j][s][k] = int'(bq(a, b, longint'(amp[p][j][s] * shape[k])));
  endtask

  task automatic add_spike(int p, int j, int t0, int gain_pct);
    for (int s = 0; s < E; s++) for (int k = 0; k < T; k++)
      if (t0 + k < NS) x[t0 + k][emap[p][j][s]] += amp[p][j][s] * shape[k] * gain_pct / 100;
  endtask

  // model of one partition's fold for sample n
  task automatic model_fold(int n, int p);
    int d [NF]; bit any; longint acc;
    any = 0;
    for (int j = 0; j < NF; j++) begin
      acc = 0;
      for (int s = 0; s < E; s++) for (int k = 0; k < T; k++)
        if (n - k >= 0) acc += longint'(tapv[n - k][emap[p][j][s]]) * coef[p][j][s][k];
      d[j] = int'(acc >>> SH) + cst[p][j];
      if (d[j] > 4095) d[j] = 4095;
      if (d[j] < -4096) d[j] = -4096;
      if (mvalid && d[j] > 0) any = 1;
    end
    if (!mvalid) return;
    if (!act[p]) begin
      if (any) begin act[p] = 1; cnt[p] = 1; for (int j = 0; j < NF; j++) begin mx[p][j] = d[j]; mt[p][j] = n; end end
    end else if (cnt[p] >= ldw && !any) begin
      bit rem [NF]; int nr, w, nreg;
      act[p] = 0; n_win++;
      if (cnt[p] > ldw) n_stretch++;
      nr = 0; nreg = 0;
      for (int j = 0; j < NF; j++) begin rem[j] = mx[p][j] > 0; nr += int'(rem[j]); end
      while (nr > 0) begin
        w = -1;
        for (int j = 0; j < NF; j++) if (rem[j] && (w < 0 || mx[p][j] > mx[p][w])) w = j;
        nreg++;
        marg(gidt[p][w], mt[p][w], p, n);
        for (int j = 0; j < NF; j++) begin
          int dx, dy;
          dx = px[p][j] - px[p][w]; dy = py[p][j] - py[p][w];
          if (dx < 0) dx = -dx;
          if (dy < 0) dy = -dy;
          if (rem[j] && (j == w || (dx < 70 && dy < 70))) begin
            rem[j] = 0; nr--;
            if (j != w) n_supp++;
          end
        end
      end
      if (nreg > 1) n_multi++;
    end else begin
      cnt[p]++;
      for (int j = 0; j < NF; j++) if (d[j] > mx[p][j]) begin mx[p][j] = d[j]; mt[p][j] = n; end
    end
  endtask

  task automatic marg(int g, int t, int p, int n);
    int m, c;
    if (mmask[g] == 0 || n - mfirst[g] > 3) begin
      if (mmask[g] != 0) n_mrej++;   // earlier partial report never confirmed
      m = 0; mfirst[g] = n;
    end
    else m = mmask[g];
    m |= 1 << p;
    c = 0;
    for (int i = 0; i < NP; i++) c += (m >> i) & 1;
    if (c >= mneed[g]) begin
      expq.push_back('{g, t, p, n});
      mmask[g] = 0;
      if (mneed[g] > 1) n_macc++;
    end else begin
      mmask[g] = m;
    end
  endtask

  task automatic send_frame(int n);
    cur_frame = n;
    for (int e = 0; e < NE; e++) begin
      in_valid = 1; in_elec = 10'(e); in_data = ADC_W'(x[n][e]);
      @(posedge clk); #1;
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int fcyc, quiet_len;
    // template: negative trough then a smaller positive phase
    for (int k = 0; k < T; k++)
      shape[k] = (k < 10) ? -2 * k : (k < 20) ? -2 * (20 - k) : (k < 32) ? ((k < 26) ? k - 20 : 32 - k) : 0;
    // neurons: p0: 1, 2 (close), 9 (marginal); p1: 3, 4, 9
    gidt = '{'{1, 2, 9}, '{3, 4, 9}};
    px   = '{'{100, 130, 300}, '{600, 900, 300}};
    py   = '{'{100, 100, 100}, '{100, 100, 100}};
    cfrac = '{'{5, 5, 5}, '{5, 5, 8}};
    for (int p = 0; p < NP; p++) for (int j = 0; j < NF; j++) for (int s = 0; s < E; s++) begin
      amp[p][j][s]  = 1 + (p + j + s) % 3;
      emap[p][j][s] = (p == 0) ? ((j == 0) ? s : (j == 1) ? s + 2 : 40 + s)
                               : ((j == 0) ? 500 + s : (j == 1) ? 900 + s : 40 + s);
    end
    amp[1][2] = amp[0][2];
    for (int g = 0; g < 1024; g++) begin mmask[g] = 0; mfirst[g] = 0; mneed[g] = 1; end
    mneed[9] = 2;
    for (int p = 0; p < NP; p++) begin act[p] = 0; cnt[p] = 0; end
    mvalid = 0;
    for (int n = 0; n < NS; n++) for (int e = 0; e < NE; e++) x[n][e] = int'($urandom % 9) - 4;
    add_spike(0, 0, 55, 100);
    add_spike(1, 0, 56, 100); add_spike(1, 1, 56, 100);
    add_spike(0, 2, 75, 100);
    add_spike(0, 2, 95, 65);
    add_spike(0, 0, 115, 100); add_spike(0, 2, 115, 100);
    add_spike(1, 1, 125, 100);
    add_spike(0, 0, 135, 100); add_spike(0, 0, 139, 100);
    add_spike(0, 0, 160, 100); add_spike(0, 1, 161, 100);
    add_spike(1, 1, 165, 90);
    for (int e = 0; e < NE; e++) begin bw1[e] = 0; bw2[e] = 0; end
    for (int n = 0; n < NS; n++) for (int e = 0; e < NE; e++) tapv[n][e] = int'(bq(bw1[e], bw2[e], longint'(x[n][e])));

    repeat (3) @(posedge clk); #1 rst_n = 1;
    cfgw(CFG_REG, 0, 0, 0, 0, SH);
    cfgw(CFG_MARG, 0, 0, 0, 9, 2);
    for (int p = 0; p < NP; p++) for (int j = 0; j < NF; j++) load_neuron(p, j);

    quiet_len = -1;
    for (int n = 0; n < NS; n++) begin
      if (n == W) begin
        for (int p = 0; p < NP; p++) for (int j = 0; j < NF; j++)
          cfgw(CFG_NID, p, j, 0, 0, (1 << GID_W) | gidt[p][j]);
        mvalid = 1;
      end
      if (n == 100) begin
        // on-the-fly adaptation: neuron 4 gets a new template scale
        amp[1][1] = '{3, 3, 2, 1, 1};
        load_neuron(1, 1);
        n_reconf++;
      end
      send_frame(n);
      for (int p = 0; p < NP; p++) model_fold(n, p);
      fcyc = 0;
      @(posedge clk); #1;
      while (busy) begin @(posedge clk); #1; fcyc++; end
      if (n == 3) quiet_len = fcyc;
      repeat (2) @(posedge clk); #1;
    end
    // folds of a quiet frame
    checks++;
    if (quiet_len != N_P_D * (E * T + E + 6)) begin failures++; $display("quiet frame took %0d clocks", quiet_len); end
    // compare accepted spikes
    checks++;
    if (gotq.size() != expq.size()) begin failures++; $display("got %0d spikes, expected %0d", gotq.size(), expq.size()); end
    for (int i = 0; i < expq.size(); i++) begin
      checks++;
      if (i >= gotq.size() || gotq[i].gid != expq[i].gid || gotq[i].ts != expq[i].ts ||
          gotq[i].part != expq[i].part || gotq[i].at != expq[i].at) begin
        failures++;
        $display("spike %0d expected gid %0d ts %0d part %0d at %0d", i, expq[i].gid, expq[i].ts, expq[i].part, expq[i].at);
        if (i < gotq.size())
          $display("          got gid %0d ts %0d part %0d at %0d", gotq[i].gid, gotq[i].ts, gotq[i].part, gotq[i].at);
      end else begin
        $display("spike gid %0d peak at sample %0d, classified at sample %0d (partition %0d)", expq[i].gid, expq[i].ts, expq[i].at, expq[i].part);
      end
    end
    // overrun: two frames back to back
    checks++;
    if (overrun) failures++;
    send_frame(0); send_frame(1);
    repeat (2) @(posedge clk); #1;
    checks++;
    if (!overrun) failures++;
    else $display("overrun flagged");
    // partial marginal reports still pending at the end were never confirmed
    for (int g = 0; g < 1024; g++) if (mmask[g] != 0) n_mrej++;
    $display("windows %0d stretched %0d suppressed %0d multi-region %0d marginal-accepted %0d marginal-rejected %0d reconfig %0d",
             n_win, n_stretch, n_supp, n_multi, n_macc, n_mrej, n_reconf);
    checks++; if (n_win == 0) failures++;
    checks++; if (n_stretch == 0) failures++;
    checks++; if (n_supp == 0) failures++;
    checks++; if (n_multi == 0) failures++;
    checks++; if (n_macc == 0) failures++;
    checks++; if (n_mrej == 0) failures++;
    checks++; if (n_reconf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
