// tb_botm_top: end-to-end test of the spike sorter at a reduced size
// (16 electrodes, 2 partitions x 3 filter slots, 2 electrodes per neuron,
// 6-tap templates).
//
// Stimulus: a 10-bit electrode stream with small random noise and injected
// spikes of five neurons; neuron 9 sits in the marginal zone and is held by
// both partitions. The band-pass is set to a pass-through through its
// coefficient registers, the minimal detection window is set to 4, and the
// neuron slots become valid only after the tap memories hold real data.
// A behavioural model in this file recomputes, per sample and partition,
// the matched-filter sums, discriminants, detection windows, region
// localization and marginal acceptance, and the accepted spikes of the
// design must equal the model's list (ID, time stamp, partition, and the
// sampling cycle in which they are output).
// Mechanisms that must each occur at least once (counted in the model):
// a detection window, a window stretched beyond its minimum, a neighbour
// suppressed by localization, several regions in one window (temporal
// overlap), a marginal spike accepted, a marginal report rejected, an
// on-the-fly coefficient rewrite, and a sampling-cycle overrun. The clock
// count of a frame without spikes is checked against N_P*(E*T+E+6).
module tb_botm_top;
  import botm_pkg::*;
  localparam int NE = 16, NP = 2, NF = 3, E = 2, T = 6;
  localparam int NS = 140, W = 8, SH = 12;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [3:0] in_elec = 0;
  logic signed [ADC_W-1:0] in_data = 0;
  cfg_wr_t cfg = '0;
  logic spk_valid, overrun, busy;
  spike_t spk;
  botm_top #(.N_ELEC(NE), .N_P(NP), .NF(NF), .E(E), .T(T)) dut (.*);

  // ---------------- scenario tables -------------------------------------
  int x [NS][NE];
  int emap [NP][NF][E];
  int gidt [NP][NF];
  int px [NP][NF], py [NP][NF];
  int coef [NP][NF][E][T];
  int cst [NP][NF];
  int shape [T] = '{-1, -3, -2, 1, 2, 1};
  int amp [NP][NF][E];
  int cfrac [NP][NF];       // constant = -energy * cfrac / 10
  int ldw = 4;

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
    for (int s = 0; s < E; s++) for (int k = 0; k < T; k++) e += amp[p][j][s] * shape[k] * amp[p][j][s] * shape[k];
    return e * 256;
  endfunction

  task automatic load_neuron(int p, int j);
    for (int s = 0; s < E; s++) begin
      cfgw(CFG_MAP, p, j, s, 0, emap[p][j][s]);
      for (int k = 0; k < T; k++) begin
        coef[p][j][s][k] = amp[p][j][s] * shape[T - 1 - k];
        cfgw(CFG_COEF, p, j, s, k, coef[p][j][s][k]);
      end
    end
    cst[p][j] = -((energy(p, j) >>> SH) * cfrac[p][j] / 10);
    cfgw(CFG_CONST, p, j, 0, 0, cst[p][j]);
    cfgw(CFG_NXY, p, j, 0, 0, (px[p][j] << 16) | py[p][j]);
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
        if (n - k >= 0) acc += longint'(256 * x[n - k][emap[p][j][s]]) * coef[p][j][s][k];
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
      in_valid = 1; in_elec = 4'(e); in_data = ADC_W'(x[n][e]);
      @(posedge clk); #1;
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int fcyc, quiet_len;
    // neurons: p0: 1, 2 (close), 9 (marginal); p1: 3, 4, 9
    emap = '{'{'{0, 1}, '{1, 2}, '{6, 7}}, '{'{10, 11}, '{12, 13}, '{6, 7}}};
    gidt = '{'{1, 2, 9}, '{3, 4, 9}};
    px   = '{'{100, 130, 300}, '{600, 900, 300}};
    py   = '{'{100, 100, 100}, '{100, 100, 100}};
    amp  = '{'{'{20, 12}, '{16, 14}, '{18, 15}}, '{'{20, 13}, '{17, 12}, '{18, 15}}};
    cfrac = '{'{5, 5, 5}, '{5, 5, 8}};
    for (int g = 0; g < 1024; g++) begin mmask[g] = 0; mfirst[g] = 0; mneed[g] = 1; end
    mneed[9] = 2;
    for (int p = 0; p < NP; p++) begin act[p] = 0; cnt[p] = 0; end
    mvalid = 0;
    for (int n = 0; n < NS; n++) for (int e = 0; e < NE; e++) x[n][e] = int'($urandom % 9) - 4;
    add_spike(0, 0, 12, 100);
    add_spike(0, 2, 28, 100);
    add_spike(0, 2, 44, 65);
    add_spike(0, 0, 60, 100); add_spike(0, 2, 60, 100);
    add_spike(0, 0, 76, 100); add_spike(0, 0, 80, 100);
    add_spike(1, 0, 92, 100); add_spike(1, 1, 92, 100);
    add_spike(1, 1, 108, 100);
    add_spike(0, 0, 116, 100); add_spike(0, 1, 117, 100);
    add_spike(1, 1, 124, 90);

    repeat (3) @(posedge clk); #1 rst_n = 1;
    // band-pass as pass-through (x * 256), short minimal window
    cfgw(CFG_BPF, 0, 0, 0, 0, 16384);
    for (int i = 1; i < 5; i++) cfgw(CFG_BPF, 0, 0, 0, i, 0);
    cfgw(CFG_REG, 0, 0, 0, 0, SH);
    cfgw(CFG_REG, 0, 0, 0, 1, ldw);
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
        amp[1][1] = '{22, 9};
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
    if (quiet_len != NP * (E * T + E + 6)) begin failures++; $display("quiet frame took %0d clocks", quiet_len); end
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
