// tb_dw_detector: two partitions of three neurons are interleaved fold by
// fold as in the sorter. Discriminant traces are mostly negative with
// random positive bursts (short ones, long ones that stretch the window
// past its minimum, and back-to-back ones). A behavioural model of the
// window rules (open on the first crossing, close at the first all-negative
// sample at least L_min samples later, per-neuron maximum and its sample)
// gives the expected window ends, candidate masks, maxima and time stamps.
// A directed case checks the shortest window: a one-sample crossing at
// sample s closes exactly at sample s + L_min.
module tb_dw_detector;
  import botm_pkg::*;
  localparam int NP = 2, NF = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_ext = 0, n_win = 0;
  logic en = 0;
  logic [0:0] part = 0;
  logic [NF-1:0][DISC_W-1:0] d = '0;
  logic [NF-1:0] valid = '1;
  logic [TS_W-1:0] ts = 0;
  logic [7:0] l_dw_min = 8'd4;
  logic win_end;
  logic [NF-1:0] cand;
  logic [NF-1:0][DISC_W-1:0] maxv;
  logic [NF-1:0][TS_W-1:0] pts;
  dw_detector #(.N_P(NP), .NF(NF)) dut (.*);

  // reference state
  bit act [NP]; int cnt [NP]; int mx [NP][NF]; int mt [NP][NF];
  int burst [NP][NF];

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(int p, int dv [NF]);
    bit any; bit e_end; bit e_cand [NF];
    any = 0;
    for (int j = 0; j < NF; j++) if (valid[j] && dv[j] > 0) any = 1;
    e_end = 0;
    if (!act[p]) begin
      if (any) begin act[p] = 1; cnt[p] = 1; for (int j = 0; j < NF; j++) begin mx[p][j] = dv[j]; mt[p][j] = int'(ts); end end
    end else if (cnt[p] >= int'(l_dw_min) && !any) begin
      act[p] = 0; e_end = 1;
      if (cnt[p] > int'(l_dw_min)) n_ext++;
    end else begin
      cnt[p]++;
      for (int j = 0; j < NF; j++) if (dv[j] > mx[p][j]) begin mx[p][j] = dv[j]; mt[p][j] = int'(ts); end
    end
    part = 1'(p); en = 1;
    for (int j = 0; j < NF; j++) d[j] = DISC_W'(dv[j]);
    @(posedge clk); #1;
    en = 0;
    checks++;
    if (win_end != e_end) begin failures++; $display("win_end mismatch ts=%0d p=%0d", ts, p); end
    if (e_end) begin
      n_win++;
      for (int j = 0; j < NF; j++) begin
        checks++;
        if (cand[j] != (valid[j] && mx[p][j] > 0) ||
            (cand[j] && (int'(signed'(maxv[j])) != mx[p][j] || int'(pts[j]) != mt[p][j]))) failures++;
      end
    end
  endtask

  initial begin
    int dv [NF];
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int p = 0; p < NP; p++) begin act[p] = 0; cnt[p] = 0; for (int j = 0; j < NF; j++) burst[p][j] = 0; end
    // directed: single-sample crossing at ts=3 on partition 0, neuron 1
    for (int s = 0; s < 12; s++) begin
      ts = TS_W'(s);
      for (int p = 0; p < NP; p++) begin
        for (int j = 0; j < NF; j++) dv[j] = -50;
        if (p == 0 && s == 3) dv[1] = 77;
        step(p, dv);
        if (p == 0 && s == 3 + int'(l_dw_min)) begin
          checks++;
          if (!win_end || cand != 3'b010 || signed'(maxv[1]) != 77 || pts[1] != 3) failures++;
        end
      end
    end
    // random bursts
    for (int s = 12; s < 3000; s++) begin
      ts = TS_W'(s);
      if (s == 1500) valid = 3'b101;
      for (int p = 0; p < NP; p++) begin
        for (int j = 0; j < NF; j++) begin
          if (burst[p][j] == 0 && ($urandom % 60) == 0) burst[p][j] = 1 + $urandom % 9;
          if (burst[p][j] > 0) begin dv[j] = 1 + $urandom % 3000; burst[p][j]--; end
          else dv[j] = -int'($urandom % 4000);
        end
        step(p, dv);
      end
    end
    $display("windows %0d, stretched past minimum %0d", n_win, n_ext);
    checks++; if (n_win < 20 || n_ext < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
