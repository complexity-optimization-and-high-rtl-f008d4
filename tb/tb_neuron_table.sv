// tb_neuron_table: writes random IDs, valid flags and coordinates to every
// (partition, slot), checks the valid flags reset to zero, and reads every
// partition row back (one clock latency), with rewrites of other rows
// happening at the same time.
module tb_neuron_table;
  import botm_pkg::*;
  localparam int NP = 3, NF = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cfg_wr_t cfg = '0;
  logic [1:0] rd_part = 0;
  logic [NF-1:0] valid;
  logic [NF-1:0][GID_W-1:0] gid;
  logic [NF-1:0][XY_W-1:0] x, y;
  neuron_table #(.N_P(NP), .NF(NF)) dut (.*);
  logic mv [NP][NF];
  logic [GID_W-1:0] mg [NP][NF];
  logic [XY_W-1:0] mx [NP][NF], my [NP][NF];

  task automatic wr(cfg_target_e tg, int p, int j, logic [31:0] v);
    cfg.we = 1; cfg.target = tg; cfg.part = 8'(p); cfg.filt = 8'(j); cfg.data = v;
    @(posedge clk); #1 cfg.we = 0;
  endtask

  task automatic rd_check(int p);
    rd_part = 2'(p);
    @(posedge clk); #1;
    for (int j = 0; j < NF; j++) begin
      checks++;
      if (valid[j] != mv[p][j] || (mv[p][j] && (gid[j] != mg[p][j] || x[j] != mx[p][j] || y[j] != my[p][j])))
        failures++;
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int p = 0; p < NP; p++) for (int j = 0; j < NF; j++) mv[p][j] = 0;
    for (int p = 0; p < NP; p++) rd_check(p);
    for (int p = 0; p < NP; p++) for (int j = 0; j < NF; j++) begin
      mv[p][j] = 1'($urandom); mg[p][j] = GID_W'($urandom);
      mx[p][j] = XY_W'($urandom); my[p][j] = XY_W'($urandom);
      wr(CFG_NID, p, j, {21'd0, mv[p][j], mg[p][j]});
      wr(CFG_NXY, p, j, {mx[p][j], my[p][j]});
    end
    for (int p = 0; p < NP; p++) rd_check(p);
    // rewrite a row, then read all rows again
    for (int j = 0; j < NF; j++) begin
      mv[1][j] = 1; mg[1][j] = GID_W'(j + 100);
      wr(CFG_NID, 1, j, {21'd0, 1'b1, mg[1][j]});
    end
    for (int p = 0; p < NP; p++) rd_check(p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
