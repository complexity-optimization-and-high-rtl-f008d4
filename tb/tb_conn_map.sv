// tb_conn_map: writes random electrode numbers into every (partition,
// filter, slot) entry of the connectivity map, including writes that land
// while reads are going on, and checks that each (partition, slot) read
// returns the entries of all filters one clock later.
module tb_conn_map;
  import botm_pkg::*;
  localparam int NE = 64, NP = 3, NF = 4, E = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cfg_wr_t cfg = '0;
  logic [1:0] rd_part = 0, rd_slot = 0;
  logic [NF-1:0][5:0] rd_elec;
  conn_map #(.N_ELEC(NE), .N_P(NP), .NF(NF), .E(E)) dut (.*);
  logic [5:0] model [NP][NF][E];

  task automatic wr(int p, int j, int e, int v);
    cfg.we = 1; cfg.target = CFG_MAP; cfg.part = 8'(p); cfg.filt = 8'(j);
    cfg.slot = 4'(e); cfg.data = 32'(v);
    @(posedge clk); #1 cfg.we = 0;
    if (p < NP && j < NF && e < E) model[p][j][e] = 6'(v);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int p = 0; p < NP; p++) for (int j = 0; j < NF; j++) for (int e = 0; e < E; e++)
      wr(p, j, e, $urandom % NE);
    wr(NP, 0, 0, 5); // out of range: ignored
    for (int r = 0; r < 3; r++)
      for (int p = 0; p < NP; p++) for (int e = 0; e < E; e++) begin
        rd_part = 2'(p); rd_slot = 2'(e);
        if (r == 1) wr((p + 1) % NP, $urandom % NF, $urandom % E, $urandom % NE);
        else begin @(posedge clk); #1; end
        for (int j = 0; j < NF; j++) begin
          checks++;
          if (rd_elec[j] != model[p][j][e]) begin failures++; if (failures < 5) $display("p%0d e%0d j%0d got %0d exp %0d", p, e, j, rd_elec[j], model[p][j][e]); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
