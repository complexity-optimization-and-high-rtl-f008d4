// tb_tap_ram: runs the tap memory as the folds do. Each sampling cycle a
// new sample is written for every (partition, slot) at the pointer, and
// then every age k = 0..T-1 is read back and compared with a testbench
// history of the last T samples of that (partition, slot); the pointer then
// moves back by one modulo T. Ages beyond the history written so far are
// not checked.
module tb_tap_ram;
  import botm_pkg::*;
  localparam int NP = 2, E = 3, T = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0] ptr = 0;
  logic wr_en = 0;
  logic [0:0] wr_part = 0, rd_part = 0;
  logic [1:0] wr_slot = 0, rd_slot = 0;
  logic [2:0] rd_age = 0;
  logic [TAP_W-1:0] wr_data = 0, rd_data;
  tap_ram #(.N_P(NP), .E(E), .T(T)) dut (.*);
  logic [TAP_W-1:0] hist [NP][E][$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      for (int p = 0; p < NP; p++) for (int e = 0; e < E; e++) begin
        automatic logic [TAP_W-1:0] v = TAP_W'($urandom);
        wr_en <= 1; wr_part <= 1'(p); wr_slot <= 2'(e); wr_data <= v;
        hist[p][e].push_front(v);
        @(posedge clk);
      end
      wr_en <= 0;
      for (int p = 0; p < NP; p++) for (int e = 0; e < E; e++)
        for (int k = 0; k < T; k++) begin
          rd_part <= 1'(p); rd_slot <= 2'(e); rd_age <= 3'(k);
          @(posedge clk); #1;
          if (k < hist[p][e].size()) begin
            checks++;
            if (rd_data != hist[p][e][k]) failures++;
          end
        end
      ptr <= (ptr == 0) ? 3'(T - 1) : ptr - 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
