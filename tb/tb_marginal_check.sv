// tb_marginal_check: ordinary neurons (one partition) must pass at once;
// a marginal neuron held by 2, 3 or 4 partitions must be output only when
// that many distinct partitions report it within the window, never for a
// single partition's report, never when one partition repeats itself, and
// not when the reports are further apart than the window (the count then
// restarts). Expected outputs come from the scenario itself.
module tb_marginal_check;
  import botm_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0;
  cfg_wr_t cfg = '0;
  logic in_valid = 0;
  spike_t in_rep = '0;
  logic [TS_W-1:0] now = 0;
  logic [MWIN_W-1:0] mwin = 4'd3;
  logic out_valid;
  spike_t out;
  marginal_check #(.N_P(NP)) dut (.*);

  task automatic need(int g, int n);
    cfg.we = 1; cfg.target = CFG_MARG; cfg.idx = 16'(g); cfg.data = 32'(n);
    @(posedge clk); #1 cfg.we = 0;
  endtask

  // one report; `exp` says whether it must be output
  task automatic rep(int g, int p, int t, bit exp);
    in_valid = 1; in_rep.gid = GID_W'(g); in_rep.part = 8'(p); in_rep.ts = TS_W'(t + 1000);
    now = TS_W'(t);
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (out_valid != exp || (exp && (out.gid != GID_W'(g) || out.ts != TS_W'(t + 1000)))) begin
      failures++;
      $display("gid %0d part %0d t %0d: out %0d exp %0d", g, p, t, out_valid, exp);
    end
    if (exp) n_acc++;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    need(10, 2); need(11, 3); need(12, 4);
    // ordinary neuron
    rep(5, 0, 1, 1);
    rep(5, 3, 1, 1);
    // marginal, two partitions, same sample
    rep(10, 0, 2, 0); rep(10, 1, 2, 1);
    // marginal, reports two samples apart
    rep(10, 1, 10, 0); rep(10, 0, 12, 1);
    // false report: only one partition; later a real one restarts the count
    rep(10, 1, 20, 0); n_rej++;
    rep(10, 0, 30, 0); rep(10, 1, 31, 1);
    // same partition twice does not count twice
    rep(10, 1, 40, 0); rep(10, 1, 40, 0); rep(10, 0, 41, 1);
    // three and four partitions
    rep(11, 0, 50, 0); rep(11, 2, 50, 0); rep(11, 3, 51, 1);
    rep(12, 0, 60, 0); rep(12, 1, 60, 0); rep(12, 2, 61, 0); rep(12, 3, 62, 1);
    rep(12, 0, 70, 0); rep(12, 1, 70, 0); rep(12, 2, 70, 0); n_rej++;
    // window expired: 5 samples apart with window 3
    rep(11, 0, 80, 0); rep(11, 1, 85, 0); rep(11, 2, 86, 0); rep(11, 3, 86, 1);
    $display("accepted %0d, rejected false reports %0d", n_acc, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
